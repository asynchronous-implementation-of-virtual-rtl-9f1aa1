// tb_funnel - a 4-input funnel (W = 8) between four passive sources and an
// active client. Each source answers its request, after a random delay, with
// the next value of its own sequence and holds it until the request falls.
// The client decodes the select pairs of every flit at the output back into a
// source number. Checks: every select pair is one-hot, every flit carries the
// oldest value its source has handed over and not yet seen at the output (so
// nothing is lost, duplicated or mislabelled), and a source that never
// answers does not hold up the others. A last phase with all sources eager
// checks that they share the output equally (tree arbiters alternate).
// Equal sharing of eager inputs is the reference design's claim; the select
// bit order decoded here is this design's own.
module tb_funnel;
  localparam int unsigned N = 4, W = 8, L = 2, WO = W + 2*L;
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

  funnel #(.N(N), .W(W)) dut (.clk, .rst, .in_req, .in_ack, .in_data, .out_req, .out_ack, .out_data);

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
      logic ok;
      src = 0; ok = 1'b1;
      for (int l = 1; l <= L; l++) begin
        logic [1:0] pr;
        pr = out_data[W + 2*l - 1 -: 2];
        if (pr == 2'b10) src += 1 << (l - 1);
        else if (pr != 2'b01) ok = 1'b0;
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
      int mn, mx;
      mn = 1 << 30; mx = 0;
      for (int i = 0; i < N; i++) begin
        if (got[i] - base[i] < mn) mn = got[i] - base[i];
        if (got[i] - base[i] > mx) mx = got[i] - base[i];
      end
      $display("eager shares: min %0d max %0d", mn, mx);
      checks++;
      if (mx - mn > 2 || mn < 20) begin failures++; $display("FAIL unequal shares"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
