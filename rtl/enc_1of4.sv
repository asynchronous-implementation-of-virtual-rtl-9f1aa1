// enc_1of4 - bundled-data to delay-insensitive encoder.
//
// Each pair of data bits becomes one 1-of-4 group (the function of the DE24HS
// decoder cell of the reference design), and each of the S extra select bits
// pairs of bits arrives already dual-rail {t, f} and is only gated. While en
// (the bundled data-valid) is low every wire is low, the empty codeword.
// Own choices: active-high wires (the reference cell has inverted outputs),
// and the wire order {dual-rail pairs, 1-of-4 groups}.
// The data must not change while en is high (extended-early data validity).
// Interface: data[W], sel_dr[2S], en in; code[2W+2S] out. Purely combinational.
module enc_1of4
  import vc_link_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned S = 0
) (
  input  logic [W-1:0]        data,
  input  logic [2*S:0]        sel_dr,   // bit 2S unused, keeps S = 0 legal
  input  logic                en,
  output logic [2*W+2*S-1:0]  code
);
  for (genvar g = 0; g < W/2; g++) begin : g_grp
    assign code[4*g +: 4] = en ? onehot4(data[2*g +: 2]) : 4'b0000;
  end
  for (genvar s = 0; s < 2*S; s++) begin : g_dr
    assign code[2*W + s] = en & sel_dr[s];
  end
endmodule
