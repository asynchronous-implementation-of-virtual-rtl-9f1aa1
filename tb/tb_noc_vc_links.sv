// tb_noc_vc_links - end-to-end testbench of the top level at its default size
// (16 channels of 16 bits, 2 repeater stages per link wire), no parameter
// overrides.
//
// The three link implementations in the top are driven side by side, each by
// its own set of per-channel 4-phase sources and sinks (link_traffic), which
// check every flit's value and order and the handshake rules. Phases:
//  1  every source and sink eager;
//  2  the sinks of channels 2 and 5 stop accepting; the other channels must
//     keep flowing on every link;
//  3  all sinks back, random idle gaps on every source and sink;
//  4  sources stop, everything in flight drains; every channel must have
//     delivered exactly what it sent.
// Mechanisms are counted by watching the links from outside, and each must
// have happened at least once:
//  - separate wires: two channels of link1 complete in the same cycle;
//  - link2 arbitration: two or more channels ready at once, the shared wires
//    passing from one channel to another, and a ready channel left waiting
//    over 500 cycles (the arbiter is not fair);
//  - link3 funnel: the root arbiter serving its two halves in turn;
//  - link3 pipelining: a new flit leaves the funnel root while an earlier
//    one is still on its way through the wires and the horn (at two stages
//    the funnel is the slower part, so the wires alone hardly ever hold two
//    flits; that count is only printed, and long links are tested apart);
//  - link3 decoupling latch finishing its output handshake while its input
//    still acknowledges;
//  - link3 interleaving flits of different channels on the shared wires;
//  - link3 sync stall: a channel whose receiver is not ready keeps its input
//    waiting while other channels deliver.
// The mechanisms counted are those the reference design describes for each
// link; the phases and their lengths are this testbench's own.
module tb_noc_vc_links;
  localparam int unsigned N = 16, W = 16, L = $clog2(N);

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;

  logic [N-1:0] src_en = '0, snk_en = '0;
  logic         gaps = 1'b0;

  logic [W-1:0] in_data [3][N], out_data [3][N];
  logic [N-1:0] in_req [3], in_ack [3], out_req [3], out_ack [3];
  int unsigned  sent [3][N], rcvd [3][N], errors [3][N];
  longint unsigned lat_sum [3][N];

  noc_vc_links dut (.clk, .rst,
    .l1_in_data(in_data[0]), .l1_in_req(in_req[0]), .l1_in_ack(in_ack[0]),
    .l1_out_data(out_data[0]), .l1_out_req(out_req[0]), .l1_out_ack(out_ack[0]),
    .l2_in_data(in_data[1]), .l2_in_req(in_req[1]), .l2_in_ack(in_ack[1]),
    .l2_out_data(out_data[1]), .l2_out_req(out_req[1]), .l2_out_ack(out_ack[1]),
    .l3_in_data(in_data[2]), .l3_in_req(in_req[2]), .l3_in_ack(in_ack[2]),
    .l3_out_data(out_data[2]), .l3_out_req(out_req[2]), .l3_out_ack(out_ack[2]));

  for (genvar k = 0; k < 3; k++) begin : g_traffic
    link_traffic #(.N(N), .W(W)) u_t (.clk, .rst, .src_en, .snk_en, .gaps,
      .in_data(in_data[k]), .in_req(in_req[k]), .in_ack(in_ack[k]),
      .out_data(out_data[k]), .out_req(out_req[k]), .out_ack(out_ack[k]),
      .sent(sent[k]), .rcvd(rcvd[k]), .errors(errors[k]), .lat_sum(lat_sum[k]));
  end

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism monitors (sample the values held during the last cycle) ----
  int m_l1_parallel = 0, m_l2_contention = 0, m_l2_switch = 0, m_l2_starved = 0;
  int m_l3_alternate = 0, m_l3_two_in_flight = 0, m_l3_decoupled = 0;
  int m_l3_interleave = 0, m_l3_two_in_path = 0, m_l3_sync_stall = 0;

  logic [N-1:0] p_ack [3];
  logic         p_f_ack = 1'b0, p_h_ack = 1'b0, p_rs1 = 1'b0, p_rs2 = 1'b0;
  logic [N-1:0] p_l2_sel = '0;
  int           l2_last = -1, l3_last_ch = -1, root_last = -1, l3_fly = 0, l3_path = 0;
  int           l2_wait [N];
  logic [N-1:0] l2_starved_seen = '0;
  logic [N-1:0] dec_aout, dec_ain, p_dec_aout = '0;

  for (genvar i = 0; i < N; i++) begin : g_probe
    assign dec_aout[i] = dut.u_link3.g_send[i].u_dec.aout;
    assign dec_ain[i]  = dut.u_link3.g_send[i].u_dec.ain;
  end

  initial begin
    for (int k = 0; k < 3; k++) p_ack[k] = '0;
    for (int i = 0; i < N; i++) l2_wait[i] = 0;
  end

  always @(posedge clk) begin
    if (!rst) begin
      logic [N-1:0] rise1, rise3, sel2now;
      int nready;
      // link1: several channels finish in the same cycle
      rise1 = out_ack[0] & ~p_ack[0];
      if ($countones(rise1) >= 2) m_l1_parallel++;
      // link2: contention, hand-over and starvation
      nready = $countones(dut.u_link2.rdy_req);
      if (nready >= 2) m_l2_contention++;
      sel2now = dut.u_link2.s_sel;
      if (sel2now != 0 && p_l2_sel == 0) begin
        int c;
        c = $clog2(sel2now);
        if (l2_last >= 0 && c != l2_last) m_l2_switch++;
        l2_last = c;
      end
      for (int i = 0; i < N; i++) begin
        if (dut.u_link2.rdy_req[i] && !in_ack[1][i]) l2_wait[i]++;
        else l2_wait[i] = 0;
        if (l2_wait[i] > 500 && !l2_starved_seen[i]) begin
          l2_starved_seen[i] = 1'b1;
          m_l2_starved++;
        end
      end
      // link3: root arbiter of the funnel serving its halves in turn
      if (dut.u_link3.g_tree.u_funnel.g_lvl[L].g_node[0].s1 && !p_rs1) begin
        if (root_last == 2) m_l3_alternate++;
        root_last = 1;
      end
      if (dut.u_link3.g_tree.u_funnel.g_lvl[L].g_node[0].s2 && !p_rs2) begin
        if (root_last == 1) m_l3_alternate++;
        root_last = 2;
      end
      // link3: flits inside the pipelined wires
      if (dut.u_link3.f_ack && !p_f_ack) begin l3_fly++; l3_path++; end
      l3_path -= $countones(out_ack[2] & ~p_ack[2]);
      if (l3_path >= 2) m_l3_two_in_path++;
      if (dut.u_link3.h_ack && !p_h_ack) l3_fly--;
      if (l3_fly >= 2) m_l3_two_in_flight++;
      // link3: decoupled return to zero
      m_l3_decoupled += $countones(p_dec_aout & ~dec_aout & dec_ain);
      // link3: interleaving of channels on the shared wires
      rise3 = out_ack[2] & ~p_ack[2];
      for (int i = 0; i < N; i++) if (rise3[i]) begin
        if (l3_last_ch >= 0 && i != l3_last_ch) m_l3_interleave++;
        l3_last_ch = i;
      end
      // link3: a channel held at its input by its receiver while others deliver
      if (((in_req[2] & ~in_ack[2] & ~snk_en) != 0) && rise3 != 0) m_l3_sync_stall++;
      p_rs1 = dut.u_link3.g_tree.u_funnel.g_lvl[L].g_node[0].s1;
      p_rs2 = dut.u_link3.g_tree.u_funnel.g_lvl[L].g_node[0].s2;
      p_f_ack = dut.u_link3.f_ack;
      p_h_ack = dut.u_link3.h_ack;
      p_l2_sel = sel2now;
      p_dec_aout = dec_aout;
    end
    for (int k = 0; k < 3; k++) p_ack[k] = out_ack[k];
  end

  // ---- watchdog ----
  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned sum(input int unsigned v [N]);
    int unsigned s = 0;
    for (int i = 0; i < N; i++) s += v[i];
    return s;
  endfunction

  string lname [3] = '{"link1 (separate wires)", "link2 (multiplexed)", "link3 (pipelined)"};

  initial begin
    int unsigned r0 [3][N];
    repeat (4) @(posedge clk);
    rst = 1'b0;

    // phase 1: everything eager
    src_en = '1; snk_en = '1;
    repeat (4000) @(posedge clk);
    for (int k = 0; k < 3; k++)
      $display("phase 1 %s: %0d flits in 4000 cycles", lname[k], sum(rcvd[k]));
    for (int i = 0; i < N; i++) begin
      check(rcvd[0][i] > 0, "link1: every channel served while all are eager");
      check(rcvd[2][i] > 0, "link3: every channel served while all are eager");
    end
    begin
      int unsigned mn, mx;
      mn = '1; mx = 0;
      for (int i = 0; i < N; i++) begin
        if (rcvd[2][i] < mn) mn = rcvd[2][i];
        if (rcvd[2][i] > mx) mx = rcvd[2][i];
      end
      $display("link3 shares: %0d..%0d flits per channel", mn, mx);
      check(mx - mn <= 3, "link3: eager channels share the wires evenly");
    end
    check(sum(rcvd[1]) > 0, "link2 delivers while all are eager");

    // phase 2: receivers of channels 2 and 5 stop
    snk_en[2] = 1'b0; snk_en[5] = 1'b0;
    repeat (50) @(posedge clk);
    for (int k = 0; k < 3; k++) for (int i = 0; i < N; i++) r0[k][i] = rcvd[k][i] + 32'(out_req[k][i]);
    repeat (3000) @(posedge clk);
    for (int k = 0; k < 3; k++) begin
      int unsigned moved;
      moved = 0;
      for (int i = 0; i < N; i++) if (i != 2 && i != 5 && rcvd[k][i] > r0[k][i]) moved++;
      check(rcvd[k][2] <= r0[k][2] && rcvd[k][5] <= r0[k][5], "blocked receivers get nothing");
      check(k == 1 ? moved >= 1 : moved == N - 2, "other channels keep flowing past blocked receivers");
    end

    // phase 3: all receivers back, random gaps
    snk_en = '1; gaps = 1'b1;
    repeat (5000) @(posedge clk);

    // phase 4: drain
    src_en = '0;
    begin
      bit done;
      int t;
      t = 0;
      do begin
        @(posedge clk);
        t++;
        done = 1;
        for (int k = 0; k < 3; k++) for (int i = 0; i < N; i++)
          if (rcvd[k][i] != sent[k][i] || in_req[k][i]) done = 0;
      end while (!done && t < 20000);
      check(done, "every link drains");
    end
    for (int k = 0; k < 3; k++) begin
      int unsigned e, d;
      longint unsigned ls;
      e = 0; d = 0; ls = 0;
      for (int i = 0; i < N; i++) begin e += errors[k][i]; d += rcvd[k][i]; ls += lat_sum[k][i]; end
      check(e == 0, "no data, order or handshake errors");
      $display("%s: %0d flits, mean latency %0.1f cycles, %0d errors", lname[k], d,
               real'(ls) / real'(d), e);
    end

    $display("mechanisms: l1_parallel=%0d l2_contention=%0d l2_switch=%0d l2_starved=%0d",
             m_l1_parallel, m_l2_contention, m_l2_switch, m_l2_starved);
    $display("mechanisms: l3_alternate=%0d l3_two_in_flight=%0d l3_decoupled=%0d l3_interleave=%0d l3_sync_stall=%0d l3_two_in_path=%0d",
             m_l3_alternate, m_l3_two_in_flight, m_l3_decoupled, m_l3_interleave, m_l3_sync_stall, m_l3_two_in_path);
    check(m_l1_parallel > 0, "mechanism: link1 parallel channels");
    check(m_l2_contention > 0, "mechanism: link2 arbitration contention");
    check(m_l2_switch > 0, "mechanism: link2 hand-over between channels");
    check(m_l2_starved > 0, "mechanism: link2 unfair arbitration (a ready channel waits)");
    check(m_l3_alternate > 0, "mechanism: link3 funnel arbiter alternation");
    check(m_l3_two_in_path > 0, "mechanism: link3 pipelining (two flits between funnel root and outputs)");
    check(m_l3_decoupled > 0, "mechanism: link3 decoupled handshakes");
    check(m_l3_interleave > 0, "mechanism: link3 channel interleaving");
    check(m_l3_sync_stall > 0, "mechanism: link3 sync stall of a blocked channel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
