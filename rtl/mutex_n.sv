// mutex_n - N-input mutex built as a tree of two-input mutexes.
//
// Structure of the reference design's N-channel mutex: neighbouring request
// pairs are OR-ed and arbitrated by an N/2-input mutex; each request is then
// AND-ed with the grant of its pair and the pair is resolved by a two-input
// mutex. The tree is written level by level: level 0 holds N/2 two-input
// mutexes on the requests, level l the mutexes of the pair-ORs of level l-1,
// and a grant at level l enables the pair below it; the top grant is always 1.
// A grant therefore passes log2(N) mutex levels (log2(N) cycles here). N must be a power of two, at least 2.
// Interface: in[N] requests, out[N] grants, at most one high.
module mutex_n #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic [N-1:0] out
);
  localparam int unsigned L = $clog2(N);   // mutex2 levels, leaves = level 0

  // req[l]: requests entering level l (N >> l of them, pairs OR-ed per level);
  // gnt[l]: grants leaving level l, which enable the pair below.
  logic [N-1:0] req [L+1];
  logic [N-1:0] gnt [L+1];

  assign req[0] = in;
  assign gnt[L] = '1;
  for (genvar l = 1; l <= L; l++) begin : g_or
    for (genvar j = 0; j < N; j++) begin : g_bit
      if (j < (N >> l)) begin : g_pair
        assign req[l][j] = req[l-1][2*j] | req[l-1][2*j+1];
      end else begin : g_none
        assign req[l][j] = 1'b0;
      end
    end
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned M = N >> l;     // requests at this level
    logic [M-1:0] gated;
    for (genvar j = 0; j < M; j++) begin : g_in
      assign gated[j] = req[l][j] & gnt[l+1][j/2];
    end
    for (genvar j = 0; j < M/2; j++) begin : g_m
      mutex2 u_m (.clk, .rst, .in1(gated[2*j]), .in2(gated[2*j+1]),
                  .out1(gnt[l][2*j]), .out2(gnt[l][2*j+1]));
    end
    if (M < N) begin : g_pad
      assign gnt[l][N-1:M] = '0;
    end
  end

  assign out = gnt[0];

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(out));
endmodule
