// tb_bandwidth_sharing - how the shared wires are divided between channels:
// a 16-channel imp. 2 link and a 16-channel imp. 3 link (16-bit flits, two
// stages), every source eager, every receiver eager except those of channels
// 1 and 4 (counting from 0), which accept nothing.
//
// Expected, from the structure of the two arbiters:
//  - imp. 3: the funnel is a tree of two-input arbiters that alternate, so
//    each half of the tree gets half of the wires. Both blocked channels sit
//    in the lower half (0..7), so their share goes to the six other channels
//    of that half, which get 8/6 of what a channel of the upper half gets;
//    within a half the shares are equal. (A channel has one flit on its way
//    at a time, and its loop of delivery, sync handshake and queueing in the
//    funnel is long compared with the funnel's cycle, so the sharing evens
//    out inside a half instead of following each smaller subtree.)
//  - imp. 2: the mutex tree keeps granting the pair of channels that holds
//    it, so nearly all flits go to two channels.
// A second pair of links with 8 channels (the size of the reference's sharing
// experiment, receivers 1 and 4 blocked again, i.e. the 2nd and 5th):
//  - imp. 3: the eight channels cannot fill the funnel, since each waits for
//    its own sync handshake, so every unblocked channel gets the same rate
//    (within 2 %) and the blocked channels' share is not taken over;
//  - imp. 2: again two channels take nearly all the flits.
// Blocked channels must deliver nothing; every delivered flit is checked.
module tb_bandwidth_sharing;
  localparam int unsigned N = 16, W = 16, STAGES = 2;
  localparam int unsigned B1 = 1, B2 = 4;       // blocked receivers

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;

  logic [N-1:0] src_en = '0, snk_en = '0;
  logic [W-1:0] in_data [2][N], out_data [2][N];
  logic [N-1:0] in_req [2], in_ack [2], out_req [2], out_ack [2];
  int unsigned  sent [2][N], rcvd [2][N], errors [2][N];
  longint unsigned lat_sum [2][N];

  link2 #(.N(N), .W(W), .STAGES(STAGES)) u_l2 (.clk, .rst,
    .in_data(in_data[0]), .in_req(in_req[0]), .in_ack(in_ack[0]),
    .out_data(out_data[0]), .out_req(out_req[0]), .out_ack(out_ack[0]));
  link3 #(.N(N), .W(W), .STAGES(STAGES)) u_l3 (.clk, .rst,
    .in_data(in_data[1]), .in_req(in_req[1]), .in_ack(in_ack[1]),
    .out_data(out_data[1]), .out_req(out_req[1]), .out_ack(out_ack[1]));

  // 8-channel pair
  localparam int unsigned N8 = 8;
  logic [N8-1:0] src_en8 = '0, snk_en8 = '0;
  logic [W-1:0] in_data8 [2][N8], out_data8 [2][N8];
  logic [N8-1:0] in_req8 [2], in_ack8 [2], out_req8 [2], out_ack8 [2];
  int unsigned  sent8 [2][N8], rcvd8 [2][N8], errors8 [2][N8];
  longint unsigned lat_sum8 [2][N8];

  link2 #(.N(N8), .W(W), .STAGES(STAGES)) u_l2_8 (.clk, .rst,
    .in_data(in_data8[0]), .in_req(in_req8[0]), .in_ack(in_ack8[0]),
    .out_data(out_data8[0]), .out_req(out_req8[0]), .out_ack(out_ack8[0]));
  link3 #(.N(N8), .W(W), .STAGES(STAGES)) u_l3_8 (.clk, .rst,
    .in_data(in_data8[1]), .in_req(in_req8[1]), .in_ack(in_ack8[1]),
    .out_data(out_data8[1]), .out_req(out_req8[1]), .out_ack(out_ack8[1]));

  for (genvar k = 0; k < 2; k++) begin : g_traffic8
    link_traffic #(.N(N8), .W(W)) u_t (.clk, .rst, .src_en(src_en8), .snk_en(snk_en8), .gaps(1'b0),
      .in_data(in_data8[k]), .in_req(in_req8[k]), .in_ack(in_ack8[k]),
      .out_data(out_data8[k]), .out_req(out_req8[k]), .out_ack(out_ack8[k]),
      .sent(sent8[k]), .rcvd(rcvd8[k]), .errors(errors8[k]), .lat_sum(lat_sum8[k]));
  end

  for (genvar k = 0; k < 2; k++) begin : g_traffic
    link_traffic #(.N(N), .W(W)) u_t (.clk, .rst, .src_en, .snk_en, .gaps(1'b0),
      .in_data(in_data[k]), .in_req(in_req[k]), .in_ack(in_ack[k]),
      .out_data(out_data[k]), .out_req(out_req[k]), .out_ack(out_ack[k]),
      .sent(sent[k]), .rcvd(rcvd[k]), .errors(errors[k]), .lat_sum(lat_sum[k]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int unsigned r0 [2][N], d [2][N], r08 [2][N8], d8 [2][N8];
    repeat (4) @(posedge clk);
    rst = 1'b0;
    src_en = '1;
    snk_en = '1; snk_en[B1] = 1'b0; snk_en[B2] = 1'b0;
    src_en8 = '1;
    snk_en8 = '1; snk_en8[B1] = 1'b0; snk_en8[B2] = 1'b0;
    repeat (500) @(posedge clk);
    for (int k = 0; k < 2; k++) for (int i = 0; i < N; i++) r0[k][i] = rcvd[k][i];
    for (int k = 0; k < 2; k++) for (int i = 0; i < N8; i++) r08[k][i] = rcvd8[k][i];
    repeat (16000) @(posedge clk);
    for (int k = 0; k < 2; k++) for (int i = 0; i < N; i++) d[k][i] = rcvd[k][i] - r0[k][i];
    for (int k = 0; k < 2; k++) for (int i = 0; i < N8; i++) d8[k][i] = rcvd8[k][i] - r08[k][i];
    for (int k = 0; k < 2; k++) begin
      $write("imp.%0d flits per channel:", k + 2);
      for (int i = 0; i < N; i++) $write(" %0d", d[k][i]);
      $write("\n");
    end
    // imp. 3
    begin
      int unsigned lo, hi, nlo, nhi;
      lo = 0; hi = 0; nlo = 0; nhi = 0;
      for (int i = 0; i < N; i++) begin
        if (i < N/2 && i != B1 && i != B2) begin lo += d[1][i]; nlo++; end
        if (i >= N/2) begin hi += d[1][i]; nhi++; end
      end
      $display("imp.3 halves: lower %0d flits over %0d channels, upper %0d over %0d", lo, nlo, hi, nhi);
      check(d[1][B1] == 0 && d[1][B2] == 0, "imp.3: blocked channels deliver nothing");
      check(lo * 100 >= hi * 97 && lo * 100 <= hi * 103, "imp.3: the two halves of the tree get equal shares");
      for (int i = 0; i < N; i++) begin
        if (i < N/2 && i != B1 && i != B2)
          check(d[1][i] * nlo + 2 * nlo >= lo && d[1][i] * nlo <= lo + 2 * nlo, "imp.3: equal shares in the lower half");
        if (i >= N/2)
          check(d[1][i] * nhi + 2 * nhi >= hi && d[1][i] * nhi <= hi + 2 * nhi, "imp.3: equal shares in the upper half");
      end
    end
    // imp. 2
    begin
      int unsigned tot, top1, top2;
      tot = 0; top1 = 0; top2 = 0;
      for (int i = 0; i < N; i++) begin
        tot += d[0][i];
        if (d[0][i] > top1) begin top2 = top1; top1 = d[0][i]; end
        else if (d[0][i] > top2) top2 = d[0][i];
      end
      check(d[0][B1] == 0 && d[0][B2] == 0, "imp.2: blocked channels deliver nothing");
      check(tot > 0 && (top1 + top2) * 10 >= tot * 9, "imp.2: two channels take nearly all the bandwidth");
    end
    for (int k = 0; k < 2; k++) for (int i = 0; i < N; i++)
      check(errors[k][i] == 0, "no data, order or handshake errors");
    // 8 channels
    for (int k = 0; k < 2; k++) begin
      $write("8 channels, imp.%0d flits per channel:", k + 2);
      for (int i = 0; i < N8; i++) $write(" %0d", d8[k][i]);
      $write("\n");
    end
    begin
      int unsigned tot, n, top1, top2;
      tot = 0; n = 0;
      for (int i = 0; i < N8; i++) if (i != B1 && i != B2) begin tot += d8[1][i]; n++; end
      check(d8[1][B1] == 0 && d8[1][B2] == 0, "8 ch imp.3: blocked channels deliver nothing");
      for (int i = 0; i < N8; i++) if (i != B1 && i != B2)
        check(tot > 0 && d8[1][i] * n * 100 >= tot * 98 && d8[1][i] * n * 100 <= tot * 102,
              "8 ch imp.3: every unblocked channel gets the same rate");
      tot = 0; top1 = 0; top2 = 0;
      for (int i = 0; i < N8; i++) begin
        tot += d8[0][i];
        if (d8[0][i] > top1) begin top2 = top1; top1 = d8[0][i]; end
        else if (d8[0][i] > top2) top2 = d8[0][i];
      end
      check(d8[0][B1] == 0 && d8[0][B2] == 0, "8 ch imp.2: blocked channels deliver nothing");
      check(tot > 0 && (top1 + top2) * 10 >= tot * 9, "8 ch imp.2: two channels take nearly all the bandwidth");
    end
    for (int k = 0; k < 2; k++) for (int i = 0; i < N8; i++)
      check(errors8[k][i] == 0, "8 ch: no data, order or handshake errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
