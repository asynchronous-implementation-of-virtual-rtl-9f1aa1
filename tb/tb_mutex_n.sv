// tb_mutex_n - eight clients share an 8-input mutex tree. Each requests at
// random, holds its request until granted, keeps the grant for a while and
// releases. A pair that keeps requesting can keep its branch of the tree (the
// tree is not fair), so clients take part in rounds: once served, a client
// requests again only after every client has been served in this round.
// Checks: at most one grant, no client waits beyond a bound, and on a free
// tree a grant arrives log2(N) = 3 cycles after the request.
// The log2(N) grant latency follows the reference design's delay formula;
// fairness is not required, as the reference calls the tree unfair.
module tb_mutex_n;
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned N = 8;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic [N-1:0] req, gnt;
  int checks = 0, failures = 0, grants = 0;
  int wait_cnt [N], hold [N];
  logic [N-1:0] served;

  mutex_n #(.N(N)) dut (.clk, .rst, .in(req), .out(gnt));

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat;
    req = '0; served = '0;
    for (int i = 0; i < N; i++) begin wait_cnt[i] = 0; hold[i] = 0; end
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk) req[5] = 1'b1;
    lat = 0;
    do begin @(posedge clk); lat++; #0.1; end while (!gnt[5] && lat < 20);
    checks++;
    if (lat != $clog2(N)) begin failures++; $display("FAIL latency %0d", lat); end
    @(negedge clk) req[5] = 1'b0;
    repeat (6) @(posedge clk);
    for (int k = 0; k < 12000; k++) begin
      @(negedge clk);
      checks++;
      if (!$onehot0(gnt)) begin failures++; $display("FAIL two grants %b", gnt); end
      for (int i = 0; i < N; i++) begin
        if (gnt[i] && !req[i]) ;              // withdrawn, grant falls next cycle
        if (req[i] && !gnt[i]) begin
          wait_cnt[i]++;
          if (wait_cnt[i] > 200) begin failures++; $display("FAIL starvation %0d", i); wait_cnt[i] = 0; end
        end else if (req[i] && gnt[i]) begin
          if (wait_cnt[i] != 0) grants++;
          wait_cnt[i] = 0;
          if (hold[i] == 0) hold[i] = 1 + $urandom % 4;
          else begin hold[i]--; if (hold[i] == 0) begin req[i] = 1'b0; served[i] = 1'b1; end end
        end else if (!req[i] && !gnt[i] && !served[i] && $urandom % 4 == 0) req[i] = 1'b1;
      end
      if (&served) served = '0;
    end
    checks++;
    if (grants < 500) begin failures++; $display("FAIL only %0d grants", grants); end
    $display("grants: %0d", grants);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
