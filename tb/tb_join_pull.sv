// tb_join_pull - an active client requests through the join from two passive
// sources with random delays. Checks: both inputs see the output request at
// once, and the output acknowledge rises one cycle after both inputs have
// acknowledged and falls one cycle after both have withdrawn.
// The join's behaviour is not given in detail by the reference design; the
// checks follow the usual definition of a pull join.
module tb_join_pull;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic r1, a1, r2, a2, out_req, out_ack;
  logic p1, p2, pq;
  int checks = 0, failures = 0, xfers = 0;

  join_pull dut (.clk, .rst, .in1_req(r1), .in1_ack(a1), .in2_req(r2), .in2_ack(a2),
                 .out_req, .out_ack);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    out_req = 0; a1 = 0; a2 = 0; p1 = 0; p2 = 0; pq = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      checks += 3;
      if (r1 !== out_req || r2 !== out_req) failures++;
      if (p1 == p2 && out_ack !== p1) failures++;
      if (p1 != p2 && out_ack !== pq) failures++;
      if (out_ack && !pq) xfers++;
      if (r1 && !a1 && $urandom % 2) a1 = 1'b1; else if (!r1 && a1 && $urandom % 2) a1 = 1'b0;
      if (r2 && !a2 && $urandom % 3 == 0) a2 = 1'b1; else if (!r2 && a2 && $urandom % 2) a2 = 1'b0;
      if (!out_req && !out_ack && $urandom % 2) out_req = 1'b1;
      else if (out_req && out_ack && $urandom % 2) out_req = 1'b0;
      p1 = a1; p2 = a2; pq = out_ack;
    end
    checks++;
    if (xfers < 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
