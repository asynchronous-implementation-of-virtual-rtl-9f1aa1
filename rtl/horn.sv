// horn - steers flits from one pull channel to N outputs (receiving end of the
// pipelined link).
//
// Mirror of the funnel: a latch at the root, then log2(N) levels of pull
// branches, each branch output followed by a simple latch. A branch reads the
// top dual-rail select pair of the flit ({sel2, sel1}, bits [Wl-1:Wl-2] of a
// Wl-bit flit), strips it and forwards the remaining bits to output 1 (sel1,
// the lower-numbered subtree) or output 2. So a flit leaves at the output with
// the number of the funnel input it entered. Output latches are W bits wide.
// Interface: pull input where the horn is active (in_req out, in_ack +
// in_data in); per output i a pull channel where it is passive (out_req[i]
// in, out_ack[i] + out_data[i] out). N must be a power of two, N >= 2.
// Timing: a flit passes one branch and one latch per level, plus the root latch.
// The branch-and-latch tree follows the reference design; the latch
// placement (one on each branch output) is this design's reading of its
// figure, and the output latches being W bits wide is its own choice.
module horn #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 16,
  localparam int unsigned L  = $clog2(N),
  localparam int unsigned WI = W + 2*L
) (
  input  logic          clk,
  input  logic          rst,
  output logic          in_req,
  input  logic          in_ack,
  input  logic [WI-1:0] in_data,
  input  logic [N-1:0]  out_req,
  output logic [N-1:0]  out_ack,
  output logic [W-1:0]  out_data [N]
);
  // Latched node signals per level; level L = the root latch, 0 = the outputs.
  // nreq: request into a node latch's output side; nack/ndat: its output.
  logic [N-1:0]  nreq [L+1];
  logic [N-1:0]  nack [L+1];
  logic [WI-1:0] ndat [L+1][N];
  // Request of each node latch toward its input (driven by the latch).
  logic [N-1:0]  lrin [L+1];

  logic [WI-1:0] root_q;
  latch_simple #(.W(WI)) u_root (
    .clk, .rst, .rin(in_req), .ain(in_ack), .in_data(in_data),
    .rout(nreq[L][0]), .aout(nack[L][0]), .out_data(root_q));
  assign ndat[L][0] = root_q;
  assign lrin[L][0] = 1'b0;

  for (genvar l = L; l >= 1; l--) begin : g_lvl
    localparam int unsigned WL = W + 2*l;       // flit width at this level
    for (genvar j = 0; j < (N >> l); j++) begin : g_node
      logic          b_ack1, b_ack2;
      logic [WL-3:0] q1, q2;
      branch_pull u_br (
        .req(nreq[l][j]), .ack(nack[l][j]),
        .sel1(ndat[l][j][WL-2]), .sel2(ndat[l][j][WL-1]),
        .req1(lrin[l-1][2*j]),   .ack1(b_ack1),
        .req2(lrin[l-1][2*j+1]), .ack2(b_ack2));
      latch_simple #(.W(WL-2)) u_lat1 (
        .clk, .rst, .rin(lrin[l-1][2*j]), .ain(b_ack1), .in_data(ndat[l][j][WL-3:0]),
        .rout(nreq[l-1][2*j]), .aout(nack[l-1][2*j]), .out_data(q1));
      latch_simple #(.W(WL-2)) u_lat2 (
        .clk, .rst, .rin(lrin[l-1][2*j+1]), .ain(b_ack2), .in_data(ndat[l][j][WL-3:0]),
        .rout(nreq[l-1][2*j+1]), .aout(nack[l-1][2*j+1]), .out_data(q2));
      assign ndat[l-1][2*j]   = WI'(q1);
      assign ndat[l-1][2*j+1] = WI'(q2);
    end
  end

  // Unused node slots of the upper levels.
  for (genvar l = 1; l <= L; l++) begin : g_pad
    for (genvar j = (N >> l); j < N; j++) begin : g_slot
      if (!(l == L && j == 0)) begin : g_zero
        assign nack[l][j] = 1'b0;
        assign ndat[l][j] = '0;
        assign lrin[l][j] = 1'b0;
      end
      assign nreq[l][j] = 1'b0;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    assign nreq[0][i]  = out_req[i];
    assign out_ack[i]  = nack[0][i];
    assign out_data[i] = ndat[0][i][W-1:0];
  end
endmodule
