// fork_pull - fork on pull channels.
//
// One active input port (in_req out, in_ack in) feeds two passive output
// ports. The input is requested when both outputs request (a C-element), and
// its acknowledge (with the data) goes to both outputs. In the pipelined link
// it splits each channel's input into the synchronisation channel and the
// data channel. The reference names the component; the C-element
// implementation is the standard one and this design's choice.
module fork_pull (
  input  logic clk,
  input  logic rst,
  output logic in_req,
  input  logic in_ack,
  input  logic out1_req,
  output logic out1_ack,
  input  logic out2_req,
  output logic out2_ack
);
  c_element u_c (.clk, .rst, .a(out1_req), .b(out2_req), .z(in_req));
  assign out1_ack = in_ack;
  assign out2_ack = in_ack;
endmodule
