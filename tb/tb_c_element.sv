// tb_c_element - checks the C-element against a cycle model: the output takes
// the common input value one cycle after both inputs agree and otherwise
// holds. Random input streams; reset value checked for both INIT settings.
// The reference model is the C-element's textbook definition; the
// one-cycle delay checked is this design's timing model.
module tb_c_element;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic a, b, z0, z1;
  logic m0, m1;
  int checks = 0, failures = 0;

  c_element #(.INIT(1'b0)) dut0 (.clk, .rst, .a, .b, .z(z0));
  c_element #(.INIT(1'b1)) dut1 (.clk, .rst, .a, .b, .z(z1));

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    a = 0; b = 1;
    repeat (2) @(posedge clk);
    #0.1;
    checks += 2;
    if (z0 !== 1'b0) failures++;
    if (z1 !== 1'b1) failures++;
    m0 = 1'b0; m1 = 1'b1;
    rst = 1'b0;
    for (int k = 0; k < 500; k++) begin
      a = 1'($urandom); b = ($urandom % 4 == 0) ? !a : a;
      if (k % 7 == 3) b = !a;
      @(posedge clk);
      if (a == b) begin m0 = a; m1 = a; end
      #0.1;
      checks += 2;
      if (z0 !== m0) begin failures++; $display("FAIL k=%0d a=%b b=%b z=%b exp %b", k, a, b, z0, m0); end
      if (z1 !== m1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
