// dec_1of4 - delay-insensitive to bundled-data decoder with completion detection.
//
// Decodes W/2 1-of-4 groups back to W data bits and S dual-rail pairs back to
// their true rails. Completion detection as in the reference decoder: every
// group (and pair) is OR-ed to a group-valid signal; the AND of all of them
// and the OR of all of them drive a C-element whose output `valid` rises when
// every group holds a codeword and falls when every group is empty. `valid`
// is the bundled data-valid (a request or acknowledge, depending on the
// channel type); the data outputs are valid while it is high (early scheme).
// Timing: valid follows the wires after one C-element (one cycle).
module dec_1of4
  import vc_link_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned S = 0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [2*W+2*S-1:0]  code,
  output logic [W-1:0]        data,
  output logic [2*S:0]        sel_t,   // true rails; bit 2S unused
  output logic                valid
);
  localparam int unsigned NG = W/2 + S;
  logic [NG-1:0] gvalid;

  for (genvar g = 0; g < W/2; g++) begin : g_grp
    assign data[2*g +: 2] = decode4(code[4*g +: 4]);
    assign gvalid[g]      = |code[4*g +: 4];
  end
  for (genvar s = 0; s < S; s++) begin : g_dr
    assign gvalid[W/2 + s] = code[2*W + 2*s] | code[2*W + 2*s + 1];
  end
  for (genvar s = 0; s < 2*S; s++) begin : g_sel
    assign sel_t[s] = code[2*W + s];
  end
  assign sel_t[2*S] = 1'b0;

  c_element u_done (.clk, .rst, .a(&gvalid), .b(|gvalid), .z(valid));
endmodule
