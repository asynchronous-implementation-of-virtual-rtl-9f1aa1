// tb_decouple_latch - the latch between a passive source and an active sink,
// both with random delays. Checks: values arrive in order, rin is the inverse
// of the latch state, aout only rises after rout and ain were both high, and
// the two sides really are decoupled: the output handshake returns to zero
// (aout falls) while the input still holds ain high, which the simple latch
// cannot do. The source is made slow to release ain to provoke this.
// The decoupling checked is what the reference design requires of this
// latch; the slow source that provokes it is this testbench's choice.
module tb_decouple_latch;
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned W = 12;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic rin, ain, rout, aout;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0, decoupled = 0;
  logic [W-1:0] q [$];
  logic p_ain, p_rout, p_aout;

  decouple_latch #(.W(W)) dut (.clk, .rst, .rin, .ain, .in_data, .rout, .aout, .out_data);

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (aout && !p_aout) begin
        checks++;
        if (!(p_ain && p_rout)) begin failures++; $display("FAIL aout rose without ain and rout"); end
      end
      if (!aout && p_aout && ain) decoupled++;
    end
    p_ain = ain; p_rout = rout; p_aout = aout;
  end

  // passive source, slow to release
  initial begin
    ain = 0; in_data = '0;
    wait (!rst);
    forever begin
      do @(posedge clk); while (!rin);
      repeat ($urandom % 3) @(posedge clk);
      @(negedge clk) in_data = W'($urandom); ain = 1'b1; q.push_back(in_data);
      do @(posedge clk); while (rin);
      repeat (2 + $urandom % 8) @(posedge clk);
      @(negedge clk) ain = 1'b0; in_data = W'($urandom);
    end
  end

  // active sink
  initial begin
    rout = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      repeat ($urandom % 4) @(posedge clk);
      @(negedge clk) rout = 1'b1;
      do @(posedge clk); while (!aout);
      checks++;
      if (q.size() == 0 || out_data !== q[0]) begin failures++; $display("FAIL data k=%0d", k); end
      else void'(q.pop_front());
      @(negedge clk) rout = 1'b0;
      do @(posedge clk); while (aout);
    end
    checks++;
    if (decoupled == 0) begin failures++; $display("FAIL output never returned to zero ahead of the input"); end
    $display("decoupled returns to zero: %0d", decoupled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
