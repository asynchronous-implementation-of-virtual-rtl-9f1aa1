// tb_horn - a 4-output horn (W = 8) between a passive source and four active
// sinks. Sinks request at random. The horn may only be offered a flit for an
// output that is waiting for one (in the link this is what the sync channels
// guarantee), so each output request gives the source one credit for that
// output. The source answers each request, after a random delay, with a flit
// for a random output holding a credit: the data and the two select pairs
// that name the output (root pair on top, sel1 = lower-numbered half). Checks: every flit leaves at the output it names, in the order it
// was sent to that output, and nothing is lost; all outputs are reached.
// A second phase has eager sinks and measures the root-to-output throughput.
// Routing by the select pairs follows the reference design; the credit
// scheme that keeps the source from offering unwanted flits is this testbench's.
module tb_horn;
  localparam int unsigned N = 4, W = 8, L = 2, WI = W + 2*L;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic in_req, in_ack;
  logic [WI-1:0] in_data;
  logic [N-1:0] out_req, out_ack, pout_ack;
  logic [W-1:0] out_data [N];
  logic eager;
  int checks = 0, failures = 0, sent = 0, rcvd = 0;
  int got [N], credit [N];
  logic [W-1:0] q [N][$];

  horn #(.N(N), .W(W)) dut (.clk, .rst, .in_req, .in_ack, .in_data, .out_req, .out_ack, .out_data);

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    if (!rst) begin
      int d, nc;
      nc = 0;
      for (int i = 0; i < N; i++) if (credit[i] > 0) nc++;
      if (in_req && !in_ack && nc > 0 && (eager || $urandom % 3 == 0)) begin
        logic [W-1:0] v;
        d = $urandom % N;
        while (credit[d] == 0) d = (d + 1) % N;
        credit[d]--;
        v = W'($urandom);
        in_data = {(d[1] ? 2'b10 : 2'b01), (d[0] ? 2'b10 : 2'b01), v};
        in_ack = 1'b1;
        q[d].push_back(v);
        sent++;
      end else if (!in_req && in_ack && (eager || $urandom % 2)) begin
        in_ack = 1'b0;
        in_data = WI'($urandom);
      end
      for (int i = 0; i < N; i++) begin
        if (!out_req[i] && !out_ack[i] && (eager || $urandom % 3 == 0)) begin
          out_req[i] = 1'b1; credit[i]++;
        end
        else if (out_req[i] && out_ack[i] && (eager || $urandom % 2)) out_req[i] = 1'b0;
      end
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      for (int i = 0; i < N; i++) begin
        if (out_ack[i] && !pout_ack[i]) begin
          checks++;
          if (q[i].size() == 0 || q[i][0] !== out_data[i]) begin
            failures++; $display("FAIL output %0d got %h", i, out_data[i]);
          end else begin
            void'(q[i].pop_front());
            got[i]++; rcvd++;
          end
        end
      end
    end
    pout_ack = out_ack;
  end

  initial begin
    int r0;
    in_ack = 0; in_data = '0; out_req = '0; eager = 0; pout_ack = '0;
    for (int i = 0; i < N; i++) begin got[i] = 0; credit[i] = 0; end
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (5000) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] < 40) begin failures++; $display("FAIL output %0d only %0d flits", i, got[i]); end
    end
    checks++;
    if (sent - rcvd > 1 + 2 * L + N) begin failures++; $display("FAIL %0d flits missing", sent - rcvd); end
    eager = 1'b1;
    repeat (100) @(posedge clk);
    r0 = rcvd;
    repeat (2000) @(posedge clk);
    $display("eager: %0d flits in 2000 cycles", rcvd - r0);
    checks++;
    if (rcvd - r0 < 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
