// tb_link1 - end-to-end self-checking testbench of link1 (N physical channels).
//
// Drives every channel with link_traffic (4-phase sources and sinks that
// check flit values, order and handshake rules) through four phases:
//  A  one channel alone (unloaded link): cycle time per flit is measured and
//     checked against the bound worked out below;
//  B  all channels eager: aggregate throughput is measured and must equal N times the single-channel rate within 20 %;
//  C  the sinks of channels 2 and 5 stop accepting: the other channels must
//     go on, channels 2 and 5 must deliver nothing more, then they resume;
//  D  random idle gaps on every source and sink.
// Finally every channel must have delivered every flit it sent, intact.
// The phases mirror the reference design's experiments (unloaded cycle time,
// eager channels, blocked receivers); bounds are worked out for this model.
module tb_link1;
  localparam int unsigned N = 16;
  localparam int unsigned W = 16;
  localparam int unsigned STAGES = 2;
  localparam int unsigned QA = 20, QB = 24, QC = 12, QD = 16;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;

  logic [N-1:0] src_en = '0, snk_en = '0;
  logic         gaps = 1'b0;
  logic [W-1:0] in_data [N], out_data [N];
  logic [N-1:0] in_req, in_ack, out_req, out_ack;
  int unsigned  sent [N], rcvd [N], errors [N];
  longint unsigned lat_sum [N];

  link1 #(.N(N), .W(W), .STAGES(STAGES)) dut (.clk, .rst,
    .in_data, .in_req, .in_ack, .out_data, .out_req, .out_ack);

  link_traffic #(.N(N), .W(W)) traffic (.clk, .rst, .src_en, .snk_en, .gaps,
    .in_data, .in_req, .in_ack, .out_data, .out_req, .out_ack,
    .sent, .rcvd, .errors, .lat_sum);

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int unsigned total_rcvd();
    int unsigned s = 0;
    for (int i = 0; i < N; i++) s += rcvd[i];
    return s;
  endfunction

  function automatic int unsigned served_channels(input int unsigned r0 [N]);
    int unsigned n = 0;
    for (int i = 0; i < N; i++) if (rcvd[i] != r0[i]) n++;
    return n;
  endfunction

  task automatic wait_all(input int unsigned target, input logic [N-1:0] mask,
                         input bit quota = 1'b1);
    bit done;
    do begin
      @(posedge clk);
      done = 1;
      for (int i = 0; i < N; i++) begin
        if (quota && sent[i] + 1 >= target && in_req[i]) src_en[i] = 1'b0;   // quota reached
        if (mask[i] && rcvd[i] < target) done = 0;
      end
    end while (!done);
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned t0, t1, tb0, tb1;
    int unsigned r0 [N];
    int unsigned mn, mx, base;
    real single_ct, agg_ct;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(posedge clk);

    // A: unloaded link, channel 0 only
    src_en[0] = 1'b1; snk_en[0] = 1'b1;
    wait_all(2, 1, 1'b0);
    t0 = cyc;
    wait_all(QA, 1);
    t1 = cyc;
    single_ct = real'(t1 - t0) / real'(QA - 2);
    $display("A: unloaded cycle time %0.2f cycles/flit, mean latency %0.2f cycles",
             single_ct, real'(lat_sum[0]) / real'(rcvd[0]));
    check(single_ct <= real'(4 * STAGES + 12), "unloaded cycle time within bound");
    check(rcvd[0] == QA && sent[0] + 1 >= QA && sent[0] <= QA, "phase A flit count");

    // B: all channels eager
    src_en = '1; snk_en = '1;
    repeat (200) @(posedge clk);
    for (int i = 0; i < N; i++) r0[i] = rcvd[i];
    tb0 = cyc; base = total_rcvd();
    repeat (1600) @(posedge clk);
    tb1 = cyc;
    agg_ct = real'(tb1 - tb0) / real'(total_rcvd() - base);
    mn = '1; mx = 0;
    for (int i = 0; i < N; i++) begin
      if (rcvd[i] - r0[i] < mn) mn = rcvd[i] - r0[i];
      if (rcvd[i] - r0[i] > mx) mx = rcvd[i] - r0[i];
    end
    $display("B: all eager: %0.2f cycles/flit aggregate, per-channel flits in window min %0d max %0d",
             agg_ct, mn, mx);
    check(agg_ct * real'(N) <= single_ct * 1.2, "aggregate rate is N times the single-channel rate");
    check(mn > 0, "every channel progresses");
    src_en = '1;
    wait_all(QA + QB, '1);

    // C: sinks of channels 2 and 5 blocked
    snk_en[2] = 1'b0; snk_en[5] = 1'b0;
    src_en = '1;
    begin
      int unsigned r2, r5;
      // a pull handshake already pending on channel 2 or 5 may still complete
      repeat (5) @(posedge clk);
      r2 = rcvd[2] + (out_req[2] ? 1 : 0);
      r5 = rcvd[5] + (out_req[5] ? 1 : 0);
      wait_all(QA + QB + QC, ~((N)'(1) << 2 | (N)'(1) << 5));
      repeat (400) @(posedge clk);
      check(rcvd[2] == r2 && rcvd[5] == r5, "blocked channels deliver nothing");
      check(in_req[2] && !in_ack[2], "blocked channel's sender is held back");
      $display("C: channels 2 and 5 blocked, others reached %0d flits", QA + QB + QC);
    end
    snk_en = '1;
    src_en = '0;
    repeat (10) @(posedge clk);
    // D: random gaps
    gaps = 1'b1;
    src_en = '1;
    wait_all(QA + QB + QC + QD, '1);
    src_en = '0;
    repeat (200) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      check(errors[i] == 0, $sformatf("channel %0d: no data or protocol errors", i));
      check(rcvd[i] == sent[i], $sformatf("channel %0d: all sent flits delivered", i));
      check(rcvd[i] >= QA + QB + QC + QD || i != 0, "channel 0 flit total");
    end
    $display("D: done at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
