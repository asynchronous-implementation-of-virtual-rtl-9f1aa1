// tb_repeater_chain - a random 12-bit stream must come out unchanged and
// exactly STAGES cycles later; STAGES = 3 and STAGES = 0 (plain wire).
// The reference design only counts repeaters; the one-cycle-per-stage delay
// checked here is this design's timing model.
module tb_repeater_chain;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic [11:0] din, d3, d0;
  logic [11:0] hist [$];
  int checks = 0, failures = 0;

  repeater_chain #(.WIDTH(12), .STAGES(3)) dut  (.clk, .rst, .in(din), .out(d3));
  repeater_chain #(.WIDTH(12), .STAGES(0)) dut0 (.clk, .rst, .in(din), .out(d0));

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    #0.1; checks++; if (d3 !== '0) failures++;
    rst = 1'b0;
    hist = '{12'h0, 12'h0, 12'h0};
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      din = 12'($urandom);
      #0.1; checks++; if (d0 !== din) failures++;
      hist.push_back(din);
      @(posedge clk); #0.1;
      void'(hist.pop_front());
      checks++;
      if (d3 !== hist[0]) begin failures++; $display("FAIL k=%0d got %h exp %h", k, d3, hist[0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
