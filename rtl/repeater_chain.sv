// repeater_chain - repeaters on a bundle of long link wires.
//
// Models a global wire bundle split by STAGES repeaters. Each repeater adds
// one cycle of delay to every wire of the bundle alike, so delay-insensitive
// codes and single control wires cross it unchanged, only later. There is no
// handshake: the repeaters are plain buffers, as on the non-pipelined links.
// STAGES = 0 is a plain wire. Reset clears all repeater outputs.
// The reference design only counts repeaters per wire to express link
// length; one clock of delay per repeater is this design's timing model.
module repeater_chain #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] out
);
  if (STAGES == 0) begin : g_wire
    assign out = in;
  end else begin : g_rep
    logic [WIDTH-1:0] q [STAGES];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int s = 0; s < STAGES; s++) q[s] <= '0;
      end else begin
        q[0] <= in;
        for (int s = 1; s < STAGES; s++) q[s] <= q[s-1];
      end
    end
    assign out = q[STAGES-1];
  end
endmodule
