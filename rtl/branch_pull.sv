// branch_pull - two-output branch on pull channels (branch element of the horn).
//
// One active input port (req out, ack + sel1/sel2 in) and two passive output
// ports (req1/ack1, req2/ack2). The input is requested while an output
// requests and the other output is not being acknowledged:
// req = (req1 & !ack2) | (req2 & !ack1). The input acknowledge is steered to
// the output named by the bundled select bits: ack1 = sel1 & ack,
// ack2 = sel2 & ack. Gates as in the reference pull branch; the data
// demultiplexer is a plain fan-out of the data to both outputs.
// Purely combinational.
module branch_pull (
  output logic req,
  input  logic ack,
  input  logic sel1,
  input  logic sel2,
  input  logic req1,
  output logic ack1,
  input  logic req2,
  output logic ack2
);
  assign ack1 = sel1 & ack;
  assign ack2 = sel2 & ack;
  assign req  = (req1 & !ack2) | (req2 & !ack1);
endmodule
