// tb_arbiter_pull - two passive sources feed the pull arbiter, an active
// client requests from its output. Sources answer their request with an
// acknowledge after a random delay and keep it until the request falls.
// Checks, sampled once per cycle: sel1 and sel2 never both high, ack_out is
// their OR, a select only rises for an input that acknowledged, each input is
// released (req_i falls) only after it was selected and exactly once per
// selection. A second phase with two eager sources checks that they are
// served strictly in turn.
// The expected behaviour (one selected input, alternation when both are
// eager) is the reference design's; stimulus and delays are this testbench's.
module tb_arbiter_pull;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic req1, ack1, req2, ack2, req_out, ack_out, sel1, sel2;
  logic [1:0] pr, ps;
  logic [1:0] served;
  logic eager;
  int checks = 0, failures = 0, n1 = 0, n2 = 0, last = -1, alternations = 0;

  arbiter_pull dut (.clk, .rst, .req1, .ack1, .req2, .ack2, .req_out, .ack_out, .sel1, .sel2);

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // stimulus on the falling edge
  always @(negedge clk) begin
    if (!rst) begin
      if (req1 && !ack1 && (eager || $urandom % 3 == 0)) ack1 <= 1'b1;
      else if (!req1 && ack1 && (eager || $urandom % 2)) ack1 <= 1'b0;
      if (req2 && !ack2 && (eager || $urandom % 3 == 0)) ack2 <= 1'b1;
      else if (!req2 && ack2 && (eager || $urandom % 2)) ack2 <= 1'b0;
      if (!req_out && !ack_out && (eager || $urandom % 2)) req_out <= 1'b1;
      else if (req_out && ack_out && (eager || $urandom % 3 == 0)) req_out <= 1'b0;
    end
  end

  // monitor on the rising edge (sees the values held during the last cycle)
  always @(posedge clk) begin
    if (!rst) begin
      checks += 2;
      if (sel1 && sel2) begin failures++; $display("FAIL both selects"); end
      if (ack_out !== (sel1 | sel2)) failures++;
      if (sel1 && !ps[0]) begin
        checks += 2;
        if (!ack1) begin failures++; $display("FAIL sel1 without ack1"); end
        if (served[0]) begin failures++; $display("FAIL input 1 selected twice"); end
        served[0] = 1'b1; n1++;
        if (eager) begin checks++; if (last == 1) failures++; else alternations++; end
        last = 1;
      end
      if (sel2 && !ps[1]) begin
        checks += 2;
        if (!ack2) begin failures++; $display("FAIL sel2 without ack2"); end
        if (served[1]) begin failures++; $display("FAIL input 2 selected twice"); end
        served[1] = 1'b1; n2++;
        if (eager) begin checks++; if (last == 2) failures++; else alternations++; end
        last = 2;
      end
      if (!req1 && pr[0]) begin
        checks++;
        if (!served[0]) begin failures++; $display("FAIL input 1 released unserved"); end
        served[0] = 1'b0;
      end
      if (!req2 && pr[1]) begin
        checks++;
        if (!served[1]) begin failures++; $display("FAIL input 2 released unserved"); end
        served[1] = 1'b0;
      end
    end
    pr = {req2, req1}; ps = {sel2, sel1};
  end

  initial begin
    ack1 = 0; ack2 = 0; req_out = 0; eager = 0; served = '0; pr = '0; ps = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (6000) @(posedge clk);
    $display("random phase: input 1 %0d, input 2 %0d", n1, n2);
    checks++;
    if (n1 < 100 || n2 < 100) failures++;
    eager = 1'b1;
    repeat (2000) @(posedge clk);
    checks++;
    if (alternations < 100) begin failures++; $display("FAIL only %0d alternations", alternations); end
    $display("eager phase alternations: %0d", alternations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
