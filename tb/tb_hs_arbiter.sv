// tb_hs_arbiter - four push clients run 4-phase handshakes into a 4-channel
// handshake arbiter; the shared output side acknowledges every select after a
// random delay and withdraws it after another random delay. Checks: req_out is 1-of-N (or zero), req_out[i] only while
// req_in[i], no new select while the output acknowledge is still up, ack_in
// only to the selected client, every handshake completes,
// forward latency on an idle arbiter is log2(N) cycles, the reverse path
// (ack_out to ack_in) is one cycle, and contention (several clients waiting
// while one is served) really occurs.
// The forward latency of log2(N) mutex levels and the one-C-element reverse
// path follow the reference design's delay formulas.
module tb_hs_arbiter;
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned N = 4;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic [N-1:0] req_in, ack_in, req_out;
  logic         ack_out;
  int checks = 0, failures = 0, done_hs = 0, contention = 0;
  int st [N];
  int out_delay;
  logic [N-1:0] p_req_out = '0;

  hs_arbiter #(.N(N)) dut (.clk, .rst, .req_in, .ack_in, .req_out, .ack_out);

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat;
    req_in = '0; ack_out = 1'b0; out_delay = 0;
    for (int i = 0; i < N; i++) st[i] = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // idle-arbiter latency
    @(negedge clk) req_in[2] = 1'b1;
    lat = 0;
    do begin @(posedge clk); lat++; #0.1; end while (!req_out[2] && lat < 20);
    checks++; if (lat != $clog2(N)) begin failures++; $display("FAIL fwd latency %0d", lat); end
    @(negedge clk) ack_out = 1'b1;
    @(posedge clk); #0.1;
    checks++; if (!ack_in[2]) begin failures++; $display("FAIL reverse latency"); end
    @(negedge clk) req_in[2] = 1'b0;
    do @(posedge clk); while (req_out != 0);
    @(negedge clk) ack_out = 1'b0;
    do @(posedge clk); while (ack_in != 0);
    repeat (3) @(posedge clk);
    // random traffic
    for (int k = 0; k < 8000; k++) begin
      @(negedge clk);
      checks += 3;
      if (!$onehot0(req_out)) failures++;
      if ((req_out & ~req_in) != 0) failures++;
      if ((ack_in & ~(req_out | ack_in)) != 0) failures++;
      if ($countones(req_in & ~ack_in) >= 2 && req_out != 0) contention++;
      // the shared output is a 4-phase channel: no new select while its
      // acknowledge of the last one is still up
      if (req_out != 0 && p_req_out == 0 && ack_out) begin
        failures++; $display("FAIL select raised before the output returned to zero");
      end
      p_req_out = req_out;
      // clients
      for (int i = 0; i < N; i++) begin
        case (st[i])
          0: if ($urandom % 3 == 0) begin req_in[i] = 1'b1; st[i] = 1; end
          1: if (ack_in[i]) begin req_in[i] = 1'b0; st[i] = 2; end
          2: if (!ack_in[i]) begin st[i] = 0; done_hs++; end
          default: ;
        endcase
      end
      // shared output
      if (req_out != 0 && !ack_out) begin
        if (out_delay == 0) out_delay = 1 + $urandom % 4;
        else begin out_delay--; if (out_delay == 0) ack_out = 1'b1; end
      end else if (req_out == 0 && ack_out) begin
        if (out_delay == 0) out_delay = 1 + $urandom % 4;
        else begin out_delay--; if (out_delay == 0) ack_out = 1'b0; end
      end
    end
    checks += 2;
    if (done_hs < 300) begin failures++; $display("FAIL only %0d handshakes", done_hs); end
    if (contention == 0) begin failures++; $display("FAIL no contention seen"); end
    $display("handshakes %0d, cycles with contention %0d", done_hs, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
