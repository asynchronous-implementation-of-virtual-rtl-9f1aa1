// passivator - non-latching push-to-pull passivator.
//
// Joins a push channel A (the link input, where the sender requests with
// a_req) with a pull channel B (where the link's inner side requests data
// with b_req). One C-element drives both acknowledges: a transfer happens
// when both sides request, and both return to zero when both withdraw. The
// data wires pass beside the block unchanged. The input data must stay valid
// from a_req rising until a_ack falls (broad data validity), as in the
// reference design. Timing: one C-element (one cycle).
module passivator (
  input  logic clk,
  input  logic rst,
  input  logic a_req,
  output logic a_ack,
  input  logic b_req,
  output logic b_ack
);
  logic c;
  c_element u_c (.clk, .rst, .a(a_req), .b(b_req), .z(c));
  assign a_ack = c;
  assign b_ack = c;
endmodule
