// tb_latch_1of4 - three 1-of-4 latch stages (G = 4 groups, S = 1 pair) in a
// row between a 4-phase delay-insensitive producer and consumer with random
// delays. The producer sends a codeword group by group in random order, waits
// for the first acknowledge, sends the spacer and waits for the acknowledge to
// fall; the consumer takes complete codewords, raises its acknowledge, waits
// for the spacer and lowers it. Checks: values arrive in order and intact,
// the first stage acknowledges only a complete codeword, and with a fast
// consumer the pipeline holds more than one codeword at once.
// The latch and its completion detection follow the reference design's
// 1-of-4 pipeline stage; the sizes and the skewed arrival are this testbench's.
module tb_latch_1of4;
  localparam int unsigned G = 4, S = 1, NW = 4*G + 2*S;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic [NW-1:0] w0, w1, w2, w3;
  logic a1, a2, a3, ack_end;
  int checks = 0, failures = 0, rx = 0, multi = 0;
  logic [NW-1:0] sent_q [$];

  latch_1of4 #(.G(G), .S(S)) s1 (.clk, .rst, .in(w0), .ack_prev(a1), .out(w1), .ack_next(a2));
  latch_1of4 #(.G(G), .S(S)) s2 (.clk, .rst, .in(w1), .ack_prev(a2), .out(w2), .ack_next(a3));
  latch_1of4 #(.G(G), .S(S)) s3 (.clk, .rst, .in(w2), .ack_prev(a3), .out(w3), .ack_next(ack_end));

  function automatic logic [NW-1:0] make_word(input logic [2*G+S-1:0] v);
    logic [NW-1:0] c = '0;
    for (int g = 0; g < G; g++) c[4*g + v[2*g +: 2]] = 1'b1;
    for (int p = 0; p < S; p++) c[4*G + 2*p + (v[2*G+p] ? 0 : 1)] = 1'b1;
    return c;
  endfunction

  function automatic bit complete(input logic [NW-1:0] c);
    for (int g = 0; g < G; g++) if ($countones(c[4*g +: 4]) != 1) return 0;
    for (int p = 0; p < S; p++) if ($countones(c[4*G + 2*p +: 2]) != 1) return 0;
    return 1;
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // producer
  initial begin
    logic [NW-1:0] c;
    w0 = '0;
    wait (!rst);
    for (int k = 0; k < 400; k++) begin
      if (k >= 200) repeat ($urandom % 4) @(posedge clk);
      c = make_word((2*G+S)'($urandom));
      // delay-insensitive wires: the groups arrive one by one in random order
      sent_q.push_back(c);
      begin
        int ord [G+S];
        for (int g = 0; g < G + S; g++) ord[g] = g;
        ord.shuffle();
        for (int g = 0; g < G + S; g++) begin
          @(negedge clk);
          if (ord[g] < G) w0[4*ord[g] +: 4] = c[4*ord[g] +: 4];
          else w0[4*G + 2*(ord[g]-G) +: 2] = c[4*G + 2*(ord[g]-G) +: 2];
        end
      end
      do @(posedge clk); while (!a1);
      @(negedge clk) w0 = '0;
      do @(posedge clk); while (a1);
    end
  end

  // consumer
  initial begin
    ack_end = 1'b0;
    wait (!rst);
    while (rx < 400) begin
      do @(posedge clk); while (!complete(w3));
      if (rx >= 200) repeat ($urandom % 4) @(posedge clk);
      checks++;
      if (sent_q.size() == 0 || w3 !== sent_q[0]) begin failures++; $display("FAIL word %0d", rx); end
      if (sent_q.size() != 0) void'(sent_q.pop_front());
      rx++;
      @(negedge clk) ack_end = 1'b1;
      do @(posedge clk); while (w3 != '0);
      @(negedge clk) ack_end = 1'b0;
    end
    checks++;
    if (multi == 0) begin failures++; $display("FAIL pipeline never held two codewords"); end
    $display("cycles with several codewords in flight: %0d", multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && (complete(w1) + complete(w2) + complete(w3)) >= 2) multi++;

  // completion detection: the first stage acknowledges only a whole codeword
  logic pa1 = 1'b0;
  always @(posedge clk) begin
    if (!rst && a1 && !pa1) begin
      checks++;
      if (!complete(w1)) begin failures++; $display("FAIL acknowledge before the codeword was complete"); end
    end
    pa1 = a1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
  end
endmodule
