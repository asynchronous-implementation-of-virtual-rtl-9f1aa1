// latch_1of4 - delay-insensitive 1-of-4 pipeline latch stage.
//
// One stage of the pipelined physical channel. Every wire is latched by a
// C-element whose other input is the inverted acknowledge from the next stage,
// so a codeword is taken over when the next stage is empty and a spacer when
// the next stage has taken the codeword. Completion detection on the outputs
// (group OR, then AND and OR over the groups into a C-element) gives the
// acknowledge to the previous stage. The stage carries G 1-of-4 groups and S
// dual-rail pairs (the select wires of the pipelined link), all completed
// together. Structure follows the reference quad-rail FIFO stage.
// Timing: a wire moves one stage per cycle; the acknowledge follows one cycle
// after the outputs complete.
module latch_1of4 #(
  parameter int unsigned G = 8,
  parameter int unsigned S = 0
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [4*G+2*S-1:0] in,
  output logic               ack_prev,
  output logic [4*G+2*S-1:0] out,
  input  logic               ack_next
);
  localparam int unsigned NW = 4*G + 2*S;
  logic [G+S-1:0] gvalid;

  for (genvar k = 0; k < NW; k++) begin : g_wire
    c_element u_c (.clk, .rst, .a(in[k]), .b(!ack_next), .z(out[k]));
  end
  for (genvar g = 0; g < G; g++) begin : g_grp
    assign gvalid[g] = |out[4*g +: 4];
  end
  for (genvar s = 0; s < S; s++) begin : g_dr
    assign gvalid[G + s] = out[4*G + 2*s] | out[4*G + 2*s + 1];
  end
  c_element u_done (.clk, .rst, .a(&gvalid), .b(|gvalid), .z(ack_prev));
endmodule
