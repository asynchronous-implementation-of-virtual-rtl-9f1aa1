// horn_chain - steers flits from one pull channel to N outputs through an
// unbalanced (chain-shaped) branch tree; the receiving end matching
// funnel_chain.
//
// A latch at the root, then N-1 branch nodes in a row. Node k reads the top
// select pair of its flit ({sel2, sel1}, bits [Wk-1:Wk-2] of a
// Wk = W + 2(N-1-k) bit flit): sel1 sends the W data bits through a latch to
// output k, sel2 strips the pair and passes the rest through a latch to node
// k+1 (to output N-1 after the last node). The pairs below the one that picks
// the output are ignored. Chain shape and latch placement mirror funnel_chain
// and are this design's own choice, after the reference's sketch of an
// unbalanced funnel and horn.
// Like the balanced horn it must only be offered a flit for an output that
// requests; in the link the synchronisation channels guarantee this.
// Interface: pull input where the horn is active (in_req out, in_ack +
// in_data in); per output i a pull channel where it is passive (out_req[i]
// in, out_ack[i] + out_data[i] out). N >= 2.
// Timing: a flit for output k passes the root latch and k+1 branches and
// latches.
module horn_chain #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 16,
  localparam int unsigned WI = W + 2*(N-1)
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
  // Latch in front of node k: request from node k's branch, acknowledge and
  // data (zero-extended to WI bits) toward it.
  logic [N-2:0]  hreq, hack;
  logic [WI-1:0] hdat [N-1];

  logic [WI-1:0] root_q;
  latch_simple #(.W(WI)) u_root (
    .clk, .rst, .rin(in_req), .ain(in_ack), .in_data(in_data),
    .rout(hreq[0]), .aout(hack[0]), .out_data(root_q));
  assign hdat[0] = root_q;

  for (genvar k = 0; k < N-1; k++) begin : g_node
    localparam int unsigned WK = W + 2*(N-1-k);   // flit width at this node
    logic r1, a1, r2, a2;
    branch_pull u_br (
      .req(hreq[k]), .ack(hack[k]),
      .sel1(hdat[k][WK-2]), .sel2(hdat[k][WK-1]),
      .req1(r1), .ack1(a1), .req2(r2), .ack2(a2));
    latch_simple #(.W(W)) u_lat1 (
      .clk, .rst, .rin(r1), .ain(a1), .in_data(hdat[k][W-1:0]),
      .rout(out_req[k]), .aout(out_ack[k]), .out_data(out_data[k]));
    if (k == N-2) begin : g_last
      latch_simple #(.W(W)) u_lat2 (
        .clk, .rst, .rin(r2), .ain(a2), .in_data(hdat[k][W-1:0]),
        .rout(out_req[N-1]), .aout(out_ack[N-1]), .out_data(out_data[N-1]));
    end else begin : g_next
      logic [WK-3:0] q2;
      latch_simple #(.W(WK-2)) u_lat2 (
        .clk, .rst, .rin(r2), .ain(a2), .in_data(hdat[k][WK-3:0]),
        .rout(hreq[k+1]), .aout(hack[k+1]), .out_data(q2));
      assign hdat[k+1] = WI'(q2);
    end
  end
endmodule
