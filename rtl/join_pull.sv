// join_pull - join on pull channels.
//
// Two active input ports and one passive output port. The output's request is
// forwarded to both inputs, and the output is acknowledged when both inputs
// have acknowledged (a C-element), so it returns to zero when both have. In
// the pipelined link it merges a channel's synchronisation channel with its
// data channel at the link output. The data comes from input 2 only.
// The reference names the component; the gates are this design's choice.
module join_pull (
  input  logic clk,
  input  logic rst,
  output logic in1_req,
  input  logic in1_ack,
  output logic in2_req,
  input  logic in2_ack,
  input  logic out_req,
  output logic out_ack
);
  assign in1_req = out_req;
  assign in2_req = out_req;
  c_element u_c (.clk, .rst, .a(in1_ack), .b(in2_ack), .z(out_ack));
endmodule
