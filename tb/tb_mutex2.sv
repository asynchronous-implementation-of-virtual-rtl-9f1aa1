// tb_mutex2 - two clients request the mutex at random, keep the request until
// granted, use the grant for a random time and release. Checks: never two
// grants, a grant only to a requesting client, every request granted within a
// bound, a grant one cycle after a request on a free mutex, and on
// simultaneous requests the winner alternates.
// The alternating tie-break checked here is this design's stand-in for the
// reference design's behavioural mutex.
module tb_mutex2;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic [1:0] req, gnt;
  int checks = 0, failures = 0;
  int wait_cnt [2];
  int hold [2];
  int ties = 0, tie_alt_ok = 0;
  int last_tie_winner = -1;

  mutex2 dut (.clk, .rst, .in1(req[0]), .in2(req[1]), .out1(gnt[0]), .out2(gnt[1]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    req = '0; hold = '{0, 0}; wait_cnt = '{0, 0};
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // latency on a free mutex
    @(negedge clk) req[0] = 1'b1;
    @(posedge clk); #0.1;
    checks++; if (gnt !== 2'b01) begin failures++; $display("FAIL grant latency"); end
    @(negedge clk) req[0] = 1'b0;
    repeat (3) @(posedge clk);
    // simultaneous requests
    for (int t = 0; t < 6; t++) begin
      @(negedge clk) req = 2'b11;
      @(posedge clk); #0.1;
      checks++;
      if (!$onehot(gnt)) begin failures++; $display("FAIL tie grant %b", gnt); end
      else begin
        int w;
        w = gnt[0] ? 0 : 1;
        if (last_tie_winner >= 0) begin checks++; if (w == last_tie_winner) begin failures++; $display("FAIL tie winner repeated"); end end
        last_tie_winner = w;
      end
      @(negedge clk) req = 2'b00;
      repeat (3) @(posedge clk);
    end
    // random traffic
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      checks++;
      if (gnt == 2'b11) begin failures++; $display("FAIL two grants"); end
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (gnt[i] && !req[i] && hold[i] == 0) ; // releasing
        if (req[i] && !gnt[i]) begin
          wait_cnt[i]++;
          if (wait_cnt[i] > 40) begin failures++; $display("FAIL starvation %0d", i); wait_cnt[i] = 0; end
        end
        if (gnt[i] && req[i]) begin
          wait_cnt[i] = 0;
          if (hold[i] == 0) hold[i] = 1 + $urandom % 6;
          else begin hold[i]--; if (hold[i] == 0) req[i] = 1'b0; end
        end else if (!req[i] && !gnt[i] && $urandom % 3 == 0) req[i] = 1'b1;
        if (gnt[i] && !req[i] && !(hold[i] == 0)) begin failures++; $display("FAIL grant without request %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
