// tb_phys_channel - the channel (W = 16, STAGES = 3) between a passive data
// source (answers in_req with in_ack and the next value, holds it until
// in_req falls) and an active sink. Checks: every value arrives intact and in
// order, out_ack follows in_ack after STAGES + 1 cycles, in_req follows out_req
// after STAGES cycles, and out_ack never rises without out_req.
// Latency bounds follow this design's timing model (STAGES repeaters each
// way, one cycle for the completion detector), not the reference's ns figures.
module tb_phys_channel;
  localparam int unsigned W = 16, STAGES = 3;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic in_req, in_ack, out_req, out_ack;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  longint cyc = 0, t_in_ack, t_out_req;
  // cyc is read in the same time step as its update, so it shows the count
  // of edges before the current one; latencies below count flop stages.
  always @(posedge clk) cyc <= cyc + 1;

  phys_channel #(.W(W), .STAGES(STAGES)) dut (.clk, .rst, .in_req, .in_ack, .in_data,
                                              .out_req, .out_ack, .out_data);

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // passive source
  initial begin
    in_ack = 0; in_data = '0;
    wait (!rst);
    forever begin
      do @(posedge clk); while (!in_req);
      checks++;
      if (cyc - t_out_req != STAGES) begin failures++; $display("FAIL in_req latency %0d", cyc - t_out_req); end
      repeat ($urandom % 3) @(posedge clk);
      @(negedge clk) in_data = W'($urandom); in_ack = 1'b1; q.push_back(in_data);
      t_in_ack = cyc;
      do @(posedge clk); while (in_req);
      @(negedge clk) in_ack = 1'b0; in_data = ~in_data;
    end
  end

  // active sink
  initial begin
    out_req = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      repeat ($urandom % 3) @(posedge clk);
      @(negedge clk) out_req = 1'b1; t_out_req = cyc;
      do @(posedge clk); while (!out_ack);
      checks += 2;
      if (q.size() == 0 || out_data !== q[0]) begin failures++; $display("FAIL data k=%0d", k); end
      else void'(q.pop_front());
      if (cyc - t_in_ack != STAGES + 1) begin failures++; $display("FAIL out_ack latency %0d", cyc - t_in_ack); end
      @(negedge clk) out_req = 1'b0;
      do @(posedge clk); while (out_ack);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
