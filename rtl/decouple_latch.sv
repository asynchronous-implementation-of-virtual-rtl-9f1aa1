// decouple_latch - pull latch with decoupled input and output handshakes.
//
// Sits at every funnel input of the pipelined link. Both ports are pull
// channels (active toward the input: rin out, ain in; passive toward the
// output: rout in, aout out). The latch closes (lt) when data is offered
// (ain) and the output requests (rout); it then withdraws its input request
// and acknowledges the output at the same time. The two sides return to zero
// independently: aout falls as soon as rout falls, and the latch opens and
// requests new input once ain has fallen and the output handshake is over.
// This lets the funnel's arbiter finish its handshake without waiting for the
// virtual channel's synchronisation handshake to start returning to zero.
// Behaviour follows the reference controller's signal transition graph
// (Ain+ and Rout+ -> Lt+ -> Rin-, Aout+; Rout- -> Aout-; Ain- and Rout- ->
// Lt- -> Rin+); the state encoding (lt, aout) is this design's.
// Output data is valid while aout is high and held until the next capture.
module decouple_latch #(
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
  logic lt;

  assign rin = !lt;

  always_ff @(posedge clk) begin
    if (rst) begin
      lt       <= 1'b0;
      aout     <= 1'b0;
      out_data <= '0;
    end else begin
      if (!lt && !aout && ain && rout) begin   // Lt+, Aout+, Rin-
        lt       <= 1'b1;
        aout     <= 1'b1;
        out_data <= in_data;
      end else begin
        if (aout && !rout) aout <= 1'b0;        // Aout-
        if (lt && !aout && !ain) lt <= 1'b0;     // Lt-, Rin+
      end
    end
  end

  a_out_4phase: assert property (@(posedge clk) disable iff (rst) $rose(aout) |-> $past(rout));
endmodule
