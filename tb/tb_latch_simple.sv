// tb_latch_simple - the latch between a passive source (answers rin with ain
// and a new value, drops ain after rin falls, after a random delay) and an
// active sink. Checks: values arrive in order, aout rises one cycle after ain
// and rout are both high and falls one cycle after both are low, rin is the
// inverse of aout, and the output data stays valid until after aout falls even
// though the source changes its data as soon as ain falls (extended early).
// The controller's C-element behaviour and the extended-early output are
// what the reference design states for this latch.
module tb_latch_simple;
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned W = 12;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic rin, ain, rout, aout;
  logic [W-1:0] in_data, out_data, held;
  int checks = 0, failures = 0, ext_early = 0;
  logic [W-1:0] q [$];
  logic p_ain, p_rout, p_aout;

  latch_simple #(.W(W)) dut (.clk, .rst, .rin, .ain, .in_data, .rout, .aout, .out_data);

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // C-element behaviour of the controller
  always @(posedge clk) begin
    if (!rst) begin
      checks += 2;
      if (rin !== !aout) failures++;
      if (p_ain == p_rout && aout !== p_ain) begin failures++; $display("FAIL aout"); end
      if (p_ain != p_rout && aout !== p_aout) failures++;
      if (p_aout && !aout) begin
        checks++;
        if (out_data !== held) begin failures++; $display("FAIL data changed before aout fell"); end
        else ext_early++;
      end
    end
    p_ain = ain; p_rout = rout; p_aout = aout;
  end

  // passive source
  initial begin
    ain = 0; in_data = '0;
    wait (!rst);
    forever begin
      do @(posedge clk); while (!rin);
      repeat ($urandom % 3) @(posedge clk);
      @(negedge clk) in_data = W'($urandom); ain = 1'b1; q.push_back(in_data);
      do @(posedge clk); while (rin);
      repeat ($urandom % 3) @(posedge clk);
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
      #0.1;
      held = out_data;
      checks++;
      if (q.size() == 0 || out_data !== q[0]) begin failures++; $display("FAIL data k=%0d", k); end
      else void'(q.pop_front());
      @(negedge clk) rout = 1'b0;
      do @(posedge clk); while (aout);
    end
    checks++;
    if (ext_early == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
