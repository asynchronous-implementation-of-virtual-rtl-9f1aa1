// c_element - two-input Muller C-element.
//
// The output copies the inputs when they agree and holds its value when they
// differ; it is the basic state-holding gate of all the link circuits (in the
// reference standard-cell design a single AO-type complex gate with feedback).
// Here it is a flip-flop on the emulation clock: the output follows the
// inputs one cycle after they agree. Reset (active high, synchronous) loads
// INIT. Interface: a, b in; z out.
module c_element #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic z
);
  always_ff @(posedge clk) begin
    if (rst)         z <= INIT;
    else if (a == b) z <= a;
  end
endmodule
