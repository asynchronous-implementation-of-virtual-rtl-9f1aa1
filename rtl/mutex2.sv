// mutex2 - two-input mutual exclusion element.
//
// Grants at most one of two requests and holds the grant until that request
// is withdrawn. The reference design uses a transistor-level mutex with a
// metastability filter and simulates it behaviourally; this RTL version is a
// clocked arbiter. When both requests arrive in the same cycle the winner is
// taken by a toggling priority bit (own choice; an analog mutex decides
// arbitrarily). Timing: a grant appears one cycle after its request while the
// mutex is free; a grant is withdrawn one cycle after its request falls, and
// the other side may be granted in the cycle after that.
// Interface: in1, in2 requests; out1, out2 grants (never both high).
module mutex2 (
  input  logic clk,
  input  logic rst,
  input  logic in1,
  input  logic in2,
  output logic out1,
  output logic out2
);
  logic prio2;   // on a tie, grant input 2 when set

  always_ff @(posedge clk) begin
    if (rst) begin
      out1  <= 1'b0;
      out2  <= 1'b0;
      prio2 <= 1'b0;
    end else if (out1) begin
      if (!in1) out1 <= 1'b0;
    end else if (out2) begin
      if (!in2) out2 <= 1'b0;
    end else if (in1 && in2) begin
      out1  <= !prio2;
      out2  <= prio2;
      prio2 <= !prio2;
    end else begin
      out1 <= in1;
      out2 <= in2;
    end
  end

  a_exclusive: assert property (@(posedge clk) disable iff (rst) !(out1 && out2));
endmodule
