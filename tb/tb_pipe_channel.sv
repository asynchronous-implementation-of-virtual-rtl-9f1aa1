// tb_pipe_channel - the pipelined delay-insensitive channel (W = 16, two
// select pairs, three stages) between a passive source and an active sink.
// Checks: every flit, data and select pairs, arrives intact and in order; on
// an empty pipeline with the sink waiting, out_ack rises STAGES + 1 cycles
// after in_ack (one per stage and one for the completion detector); with the sink stalled the pipeline holds more than one flit
// (one per stage), and all of them drain when the sink resumes.
// The pipeline capacity checked (about one flit every other stage) follows from
// the 4-phase pipeline the reference design uses; the latency is this model's.
module tb_pipe_channel;
  localparam int unsigned W = 16, S = 2, STAGES = 3, WF = W + 2*S;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic in_req, in_ack, out_req, out_ack, pin_ack, pout_ack;
  logic [WF-1:0] in_data, out_data;
  logic src_on, snk_on, snk_eager;
  int checks = 0, failures = 0, sent = 0, rcvd = 0, max_fly = 0;
  longint cyc = 0, t_ack = 0, t_out = 0;
  logic [WF-1:0] q [$];

  pipe_channel #(.W(W), .S(S), .STAGES(STAGES)) dut (.clk, .rst, .in_req, .in_ack, .in_data,
                                                      .out_req, .out_ack, .out_data);

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [WF-1:0] flit();
    logic [WF-1:0] f;
    f[W-1:0] = W'($urandom);
    for (int p = 0; p < S; p++) f[W + 2*p +: 2] = ($urandom % 2) ? 2'b10 : 2'b01;
    return f;
  endfunction

  always @(negedge clk) begin
    if (!rst) begin
      if (in_req && !in_ack && src_on && $urandom % 2) begin
        in_data = flit(); in_ack = 1'b1; q.push_back(in_data); sent++;
      end else if (!in_req && in_ack && $urandom % 2) begin
        in_ack = 1'b0; in_data = ~in_data;
      end
      if (!out_req && !out_ack && snk_on && (snk_eager || $urandom % 2)) out_req = 1'b1;
      else if (out_req && out_ack && (snk_eager || $urandom % 2)) out_req = 1'b0;
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (in_ack && !pin_ack) t_ack = cyc;
      if (out_ack && !pout_ack) begin
        t_out = cyc;
        checks++;
        if (q.size() == 0 || q[0] !== out_data) begin failures++; $display("FAIL flit %0d", rcvd); end
        else void'(q.pop_front());
        rcvd++;
      end
      if (sent - rcvd > max_fly) max_fly = sent - rcvd;
    end
    pin_ack = in_ack; pout_ack = out_ack;
  end

  initial begin
    in_ack = 0; in_data = '0; out_req = 0; pin_ack = 0; pout_ack = 0;
    src_on = 0; snk_on = 1; snk_eager = 1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // latency: one flit into an empty pipeline, sink already requesting
    for (int k = 0; k < 5; k++) begin
      int r;
      longint t0;
      repeat (10) @(posedge clk);
      r = rcvd;
      src_on = 1;
      wait (sent == r + 1);
      src_on = 0;
      wait (rcvd == r + 1);
      checks++;
      $display("latency %0d cycles", t_out - t_ack);
      if (t_out - t_ack != STAGES + 1) begin failures++; $display("FAIL latency"); end
    end
    // stall the sink: the pipeline fills
    snk_on = 0; src_on = 1;
    repeat (100) @(posedge clk);
    checks++;
    $display("flits held while stalled: %0d", sent - rcvd);
    if (sent - rcvd < 2) begin failures++; $display("FAIL pipeline holds only %0d", sent - rcvd); end
    src_on = 0; snk_on = 1;
    repeat (100) @(posedge clk);
    checks++;
    if (sent != rcvd) begin failures++; $display("FAIL %0d flits lost", sent - rcvd); end
    // random traffic
    snk_eager = 0; src_on = 1;
    repeat (6000) @(posedge clk);
    src_on = 0; snk_eager = 1;
    repeat (100) @(posedge clk);
    checks++;
    if (sent != rcvd || rcvd < 300) begin failures++; $display("FAIL sent %0d rcvd %0d", sent, rcvd); end
    $display("flits %0d, most in flight %0d", rcvd, max_fly);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
