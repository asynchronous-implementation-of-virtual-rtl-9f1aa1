// latch_simple - bundled-data pull latch with the simple latch controller.
//
// Pipeline register of the funnel and horn trees. Both ports are pull
// channels: toward the input the latch is active (rin out, ain + in_data in),
// toward the output passive (rout in, aout + out_data out). Controller:
// aout = C(ain, rout) and rin = !aout; aout also closes the data latch. An
// empty latch requests from its input at once; the data is taken over, and
// the output acknowledged, when the output side requests; the latch opens
// again after both sides have returned to zero. The output data therefore
// stays valid until after aout falls (extended early), which the 1-of-4
// encoder after the funnel needs. The gate-level reading of the controller
// diagram (C-element on ain and rout, inverter from aout to rin) is this
// design's interpretation. The transparent latch is emulated by a register
// that follows in_data while the latch is open.
// Timing: aout one cycle after ain and rout are both high.
module latch_simple #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  output logic         rin,
  input  logic         ain,
  input  logic [W-1:0] in_data,
  input  logic         rout,
  output logic         aout,
  output logic [W-1:0] out_data
);
  c_element u_c (.clk, .rst, .a(ain), .b(rout), .z(aout));
  assign rin = !aout;

  always_ff @(posedge clk) begin
    if (rst)        out_data <= '0;
    else if (!aout) out_data <= in_data;
  end
endmodule
