// tb_fork_pull - two pull clients request through the fork from a passive
// source. Checks: the input is requested one cycle after both outputs
// request, released one cycle after both withdraw, and both outputs see the
// input acknowledge.
// The fork's behaviour is not given in detail by the reference design; the
// checks follow the usual definition of a pull fork.
module tb_fork_pull;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic in_req, in_ack, r1, a1, r2, a2;
  logic p1, p2, pq;
  int checks = 0, failures = 0, xfers = 0;

  fork_pull dut (.clk, .rst, .in_req, .in_ack, .out1_req(r1), .out1_ack(a1),
                 .out2_req(r2), .out2_ack(a2));

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    r1 = 0; r2 = 0; in_ack = 0; p1 = 0; p2 = 0; pq = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      checks += 3;
      if (p1 == p2 && in_req !== p1) failures++;
      if (p1 != p2 && in_req !== pq) failures++;
      if (a1 !== in_ack || a2 !== in_ack) failures++;
      if (in_req && !pq) xfers++;
      // source: ack follows request
      if (in_req && !in_ack && $urandom % 2) in_ack = 1'b1;
      else if (!in_req && in_ack && $urandom % 2) in_ack = 1'b0;
      // clients: 4-phase pull
      if (!r1 && !a1 && $urandom % 3 == 0) r1 = 1'b1; else if (r1 && a1 && $urandom % 2) r1 = 1'b0;
      if (!r2 && !a2 && $urandom % 3 == 0) r2 = 1'b1; else if (r2 && a2 && $urandom % 2) r2 = 1'b0;
      p1 = r1; p2 = r2; pq = in_req;
    end
    checks++;
    if (xfers < 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
