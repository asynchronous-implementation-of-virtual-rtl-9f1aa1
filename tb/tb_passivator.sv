// tb_passivator - a push client on side A and a pull client on side B run
// 4-phase handshakes with random delays. Checks: both acknowledges are equal,
// rise only when both requests are high (one cycle later), fall only when both
// are low, and every transfer completes.
// The passivator's single C-element is the reference design's circuit;
// the random handshakes are this testbench's.
module tb_passivator;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic a_req, a_ack, b_req, b_ack;
  logic pa_req, pb_req, p_ack;
  int checks = 0, failures = 0, xfers = 0;

  passivator dut (.clk, .rst, .a_req, .a_ack, .b_req, .b_ack);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    a_req = 0; b_req = 0; p_ack = 0; pa_req = 0; pb_req = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      checks += 3;
      if (a_ack !== b_ack) failures++;
      if (a_ack && !p_ack && !(pa_req && pb_req)) failures++;
      if (!a_ack && p_ack && (pa_req || pb_req)) failures++;
      if (a_ack && !p_ack) xfers++;
      p_ack = a_ack;
      if (!a_ack && !a_req && $urandom % 3 == 0) a_req = 1'b1;
      else if (a_ack && a_req && $urandom % 2 == 0) a_req = 1'b0;
      if (!b_ack && !b_req && $urandom % 3 == 0) b_req = 1'b1;
      else if (b_ack && b_req && $urandom % 2 == 0) b_req = 1'b0;
      pa_req = a_req; pb_req = b_req;
    end
    checks++;
    if (xfers < 500) begin failures++; $display("FAIL only %0d transfers", xfers); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
