// tb_branch_pull - exhaustive check of the combinational pull branch over all
// 32 combinations of its five inputs against the gate equations worked out by hand:
// the acknowledge goes to the output named by the select pair, and the input
// is requested while an output requests and the other is not acknowledged.
// The expected outputs follow the branch's described function (ack to the
// selected output only); the exhaustive stimulus is this testbench's choice.
module tb_branch_pull;
  logic req, ack, sel1, sel2, req1, ack1, req2, ack2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #1 clk = !clk;

  branch_pull dut (.req, .ack, .sel1, .sel2, .req1, .ack1, .req2, .ack2);

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic e1, e2, er;
      {ack, sel1, sel2, req1} = 4'(v);
      for (int r2 = 0; r2 < 2; r2++) begin
        req2 = 1'(r2);
        @(negedge clk);
        e1 = ack && sel1;
        e2 = ack && sel2;
        er = (req1 && !e2) || (req2 && !e1);
        checks += 3;
        if (ack1 !== e1) begin failures++; $display("FAIL ack1 v=%0d", v); end
        if (ack2 !== e2) begin failures++; $display("FAIL ack2 v=%0d", v); end
        if (req !== er)  begin failures++; $display("FAIL req v=%0d r2=%0d", v, r2); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
