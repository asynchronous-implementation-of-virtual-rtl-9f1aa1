// funnel - merges N pull channels onto one (sending end of the pipelined link).
//
// A balanced binary tree with log2(N) levels. Each node is a pull arbiter
// with a data multiplexer, followed by a simple latch; the latch output of a
// level-l node carries the W data bits plus one dual-rail select pair per
// level (2l bits), the newest pair on top: bits [W+2l-1 : W+2l-2] = {sel2,
// sel1}, where sel1 means "from the lower-numbered subtree". Channel i enters
// leaf input i. Because every arbiter alternates between two eager inputs,
// eager channels share the output equally (a form of round robin).
// Interface: per input i a pull channel where the funnel is active (in_req[i]
// out, in_ack[i] + in_data[i] in); one pull output where it is passive
// (out_req in, out_ack + out_data out). N must be a power of two, N >= 2.
// Timing: a flit passes one arbiter and one latch per level.
// The tree, the arbiter-multiplexer-latch node and the dual-rail select pairs
// follow the reference design; the bit order of the pairs and sel1 meaning
// the lower-numbered subtree are this design's own choices.
module funnel #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 16,
  localparam int unsigned L  = $clog2(N),
  localparam int unsigned WO = W + 2*L
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
  // Node signals per level; level 0 = the inputs, level L = the root.
  logic [N-1:0]  nreq [L+1];
  logic [N-1:0]  nack [L+1];
  logic [WO-1:0] ndat [L+1][N];

  for (genvar i = 0; i < N; i++) begin : g_in
    assign in_req[i]  = nreq[0][i];
    assign nack[0][i] = in_ack[i];
    assign ndat[0][i] = WO'(in_data[i]);
  end

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int unsigned WI = W + 2*(l-1);   // width entering this level
    for (genvar j = 0; j < (N >> l); j++) begin : g_node
      logic          m_ack, s1, s2, l_rin;
      logic [WI+1:0] m_data, q;
      arbiter_pull u_arb (
        .clk, .rst,
        .req1(nreq[l-1][2*j]),   .ack1(nack[l-1][2*j]),
        .req2(nreq[l-1][2*j+1]), .ack2(nack[l-1][2*j+1]),
        .req_out(l_rin), .ack_out(m_ack), .sel1(s1), .sel2(s2));
      assign m_data = {s2, s1, (s1 ? ndat[l-1][2*j][WI-1:0] : ndat[l-1][2*j+1][WI-1:0])};
      latch_simple #(.W(WI+2)) u_lat (
        .clk, .rst,
        .rin(l_rin), .ain(m_ack), .in_data(m_data),
        .rout(nreq[l][j]), .aout(nack[l][j]), .out_data(q));
      assign ndat[l][j] = WO'(q);
    end
  end

  // Unused node slots of the upper levels.
  for (genvar l = 1; l <= L; l++) begin : g_pad
    for (genvar j = (N >> l); j < N; j++) begin : g_slot
      if (!(l == L && j == 0)) begin : g_zero
        assign nreq[l][j] = 1'b0;
      end
      assign nack[l][j] = 1'b0;
      assign ndat[l][j] = '0;
    end
  end

  assign nreq[L][0] = out_req;
  assign out_ack    = nack[L][0];
  assign out_data   = ndat[L][0];
endmodule
