// funnel_chain - merges N pull channels onto one through an unbalanced
// (chain-shaped) arbiter tree, for differentiated bandwidth shares.
//
// Variant of the funnel for the pipelined link. Node k (k = 0 .. N-2, node 0
// at the root) is a pull arbiter with a data multiplexer followed by a simple
// latch, exactly as in the balanced funnel. Its input 1 is channel k; its
// input 2 is node k+1, or channel N-1 for the last node. When every channel
// is eager each arbiter alternates, so channel k gets 1/2^(k+1) of the output
// and the last two channels 1/2^(N-1) each (for N = 4: 1/2, 1/4, 1/8, 1/8). A
// channel that is idle leaves its share to the channels below it.
// Flit format: W data bits and N-1 dual-rail pairs {sel2, sel1}, the root's
// pair on top (bits [W+2(N-1)-1 : W+2(N-1)-2]), node k's pair below it. A
// flit of channel k has sel2 set in the pairs of nodes 0 .. k-1 and sel1 in
// node k's pair; the pairs of the nodes it did not pass are filled with sel1
// (2'b01), so every pair is a valid dual-rail code on the wires.
// The chain shape, its use of N-1 select pairs and the padding are this
// design's own choices; the reference only sketches the unbalanced tree for
// four channels and the shares 1/2, 1/4, 1/8, 1/8.
// Interface: per input i a pull channel where the funnel is active (in_req[i]
// out, in_ack[i] + in_data[i] in); one pull output where it is passive
// (out_req in, out_ack + out_data out). N >= 2.
// Timing: a flit of channel k passes k+1 arbiters and latches.
module funnel_chain #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 16,
  localparam int unsigned WO = W + 2*(N-1)
) (
  input  logic          clk,
  input  logic          rst,
  output logic [N-1:0]  in_req,
  input  logic [N-1:0]  in_ack,
  input  logic [W-1:0]  in_data [N],
  input  logic          out_req,
  output logic          out_ack,
  output logic [WO-1:0] out_data
);
  localparam logic [2*N-1:0] PAD = {N{2'b01}};

  // Output of node k's latch (zero-extended to WO bits).
  logic [N-2:0]  creq, cack;
  logic [WO-1:0] cdat [N-1];

  for (genvar k = 0; k < N-1; k++) begin : g_node
    localparam int unsigned WK = W + 2*(N-1-k);   // width after this node
    logic          r2, a2, m_ack, s1, s2, l_rin;
    logic [WK-3:0] d1, d2;
    logic [WK-1:0] m_data, q;

    // Input 1: channel k, its unused lower pairs padded with sel1.
    assign d1 = (WK-2)'({PAD, in_data[k]});
    if (k == N-2) begin : g_last
      assign in_req[N-1] = r2;
      assign a2 = in_ack[N-1];
      assign d2 = in_data[N-1];
    end else begin : g_next
      assign creq[k+1] = r2;
      assign a2 = cack[k+1];
      assign d2 = cdat[k+1][WK-3:0];
    end

    arbiter_pull u_arb (
      .clk, .rst,
      .req1(in_req[k]), .ack1(in_ack[k]),
      .req2(r2),        .ack2(a2),
      .req_out(l_rin), .ack_out(m_ack), .sel1(s1), .sel2(s2));
    assign m_data = {s2, s1, (s1 ? d1 : d2)};
    latch_simple #(.W(WK)) u_lat (
      .clk, .rst,
      .rin(l_rin), .ain(m_ack), .in_data(m_data),
      .rout(creq[k]), .aout(cack[k]), .out_data(q));
    assign cdat[k] = WO'(q);
  end

  assign creq[0]  = out_req;
  assign out_ack  = cack[0];
  assign out_data = cdat[0];
endmodule
