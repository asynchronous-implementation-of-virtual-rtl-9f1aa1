// tb_funnel_chain - a 4-input unbalanced funnel (W = 8) between four passive
// sources and an active client. Each source answers its request, after a
// random delay, with the next value of its own sequence and holds it until
// the request falls. The client decodes the select pairs of every flit: the
// source is the position of the first sel1 pair from the top (N-1 if all are
// sel2), and the pairs below it must be the sel1 padding. Checks: every pair
// is one-hot, every flit carries the oldest value its source handed over and
// not yet seen (nothing lost, duplicated or mislabelled), a source that never
// answers does not hold up the others, and with all sources eager the shares
// are 1/2, 1/4, 1/8, 1/8 of the output, the bandwidth split the unbalanced
// tree is meant to give.
// The 1/2, 1/4, 1/8, 1/8 shares are the reference design's figures for four
// channels; the chain coding decoded here is this design's own.
module tb_funnel_chain;
  localparam int unsigned N = 4, W = 8, WO = W + 2*(N-1);
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic [N-1:0] in_req, in_ack;
  logic [W-1:0] in_data [N];
  logic out_req, out_ack, pout_ack;
  logic [WO-1:0] out_data;
  logic [N-1:0] mute;
  logic eager;
  int checks = 0, failures = 0;
  int seqn [N], got [N];
  logic [W-1:0] q [N][$];

  funnel_chain #(.N(N), .W(W)) dut (.clk, .rst, .in_req, .in_ack, .in_data, .out_req, .out_ack, .out_data);

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    if (!rst) begin
      for (int i = 0; i < N; i++) begin
        if (in_req[i] && !in_ack[i] && !mute[i] && (eager || $urandom % 3 == 0)) begin
          in_ack[i] = 1'b1;
          in_data[i] = W'({i[1:0], 6'(seqn[i])}) ^ W'(8'h5a);
          q[i].push_back(in_data[i]);
          seqn[i]++;
        end else if (!in_req[i] && in_ack[i] && (eager || $urandom % 2)) begin
          in_ack[i] = 1'b0;
          in_data[i] = W'($urandom);
        end
      end
      if (!out_req && !out_ack && (eager || $urandom % 2)) out_req = 1'b1;
      else if (out_req && out_ack && (eager || $urandom % 3 == 0)) out_req = 1'b0;
    end
  end

  always @(posedge clk) begin
    if (!rst && out_ack && !pout_ack) begin
      int src;
      logic ok, found;
      src = N - 1; ok = 1'b1; found = 1'b0;
      for (int k = 0; k < N - 1; k++) begin
        logic [1:0] pr;
        pr = out_data[WO - 1 - 2*k -: 2];
        if (found) begin
          if (pr != 2'b01) ok = 1'b0;
        end else if (pr == 2'b01) begin
          src = k; found = 1'b1;
        end else if (pr != 2'b10) ok = 1'b0;
      end
      checks += 2;
      if (!ok) begin failures++; $display("FAIL select pairs %b", out_data[WO-1:W]); end
      else if (q[src].size() == 0 || q[src][0] !== out_data[W-1:0]) begin
        failures++; $display("FAIL flit %h labelled source %0d", out_data[W-1:0], src);
      end else begin
        void'(q[src].pop_front());
        got[src]++;
      end
    end
    pout_ack = out_ack;
  end

  initial begin
    int base [N];
    in_ack = '0; out_req = 0; mute = '0; eager = 0; pout_ack = 0;
    for (int i = 0; i < N; i++) begin seqn[i] = 0; got[i] = 0; in_data[i] = '0; end
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // random traffic
    repeat (4000) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] < 50) begin failures++; $display("FAIL source %0d only %0d flits", i, got[i]); end
    end
    // source 1 goes silent: the others keep flowing
    mute[1] = 1'b1;
    repeat (200) @(posedge clk);
    for (int i = 0; i < N; i++) base[i] = got[i];
    repeat (2000) @(posedge clk);
    for (int i = 0; i < N; i++) if (i != 1) begin
      checks++;
      if (got[i] - base[i] < 40) begin failures++; $display("FAIL source %0d held up", i); end
    end
    mute[1] = 1'b0;
    // eager: equal shares
    eager = 1'b1;
    repeat (200) @(posedge clk);
    for (int i = 0; i < N; i++) base[i] = got[i];
    repeat (2000) @(posedge clk);
    begin
      int tot, ex;
      tot = 0;
      for (int i = 0; i < N; i++) tot += got[i] - base[i];
      for (int i = 0; i < N; i++) begin
        ex = (i < N - 1) ? tot >> (i + 1) : tot >> (N - 1);
        $display("eager share of source %0d: %0d of %0d (expected %0d)", i, got[i] - base[i], tot, ex);
        checks++;
        if (got[i] - base[i] > ex + 3 || got[i] - base[i] + 3 < ex || tot < 100) begin
          failures++; $display("FAIL share of source %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
