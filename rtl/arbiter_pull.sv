// arbiter_pull - two-input arbiter on pull channels (merge element of the funnel).
//
// Two active input ports (req1/ack1, req2/ack2) and one passive output port
// (req_out in, ack_out out). A request on the output is forwarded to both
// inputs. Inputs acknowledge when they hold data; a mutex on ack1/ack2 picks
// the first, whose select (sel1 or sel2) then rises and drives the output
// acknowledge (ack_out = sel1 | sel2) and the data multiplexer. The loser
// keeps its acknowledge up and wins the next output request, so two eager
// inputs alternate. Per input: req_i = C(req_out, !sel_i), which withdraws
// the request of the served input once the output returns to zero, and
// sel_i = C(grant_i & ack_i, req_out). sel1/sel2 are bundled data and are
// also passed on as the dual-rail subtree identifier of the flit.
// Structure follows the reference pull arbiter; which signal the AND gate
// before each select C-element takes besides the grant is this design's
// reading (the input acknowledge). Reset clears every C-element.
module arbiter_pull (
  input  logic clk,
  input  logic rst,
  output logic req1,
  input  logic ack1,
  output logic req2,
  input  logic ack2,
  input  logic req_out,
  output logic ack_out,
  output logic sel1,
  output logic sel2
);
  logic g1, g2;

  mutex2 u_mutex (.clk, .rst, .in1(ack1), .in2(ack2), .out1(g1), .out2(g2));

  c_element u_req1 (.clk, .rst, .a(req_out), .b(!sel1), .z(req1));
  c_element u_req2 (.clk, .rst, .a(req_out), .b(!sel2), .z(req2));
  c_element u_sel1 (.clk, .rst, .a(g1 & ack1), .b(req_out), .z(sel1));
  c_element u_sel2 (.clk, .rst, .a(g2 & ack2), .b(req_out), .z(sel2));

  assign ack_out = sel1 | sel2;

  a_one_sel: assert property (@(posedge clk) disable iff (rst) !(sel1 && sel2));
endmodule
