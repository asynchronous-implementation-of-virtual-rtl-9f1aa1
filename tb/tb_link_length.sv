// tb_link_length - long links: imp. 2 (multiplexed) against imp. 3 (pipelined)
// with 16 channels of 16 bits and 32 repeater or pipeline stages on the wires.
//
// Two measurements per link, both with link_traffic sources and sinks that
// check every flit:
//  - one channel alone: cycles per flit. A lone channel cannot use the
//    pipeline, since it waits for its own sync handshake to cross the link,
//    so both links slow down with length;
//  - all 16 channels eager: aggregate cycles per flit. Imp. 2 still sends one
//    flit per round trip of the long wires, imp. 3 keeps several flits in
//    its pipeline at once and must be several times faster.
//  - imp. 3 with 4 and 8 of its 16 channels eager: the throughput must grow
//    with the number of eager channels, since the long link is data-limited.
// The cycle times at 32 stages are checked against bounds worked out from the
// stage counts (each stage is one clock of delay in this model).
// The 32-stage, 16-channel case and the 'over 5 times' claim are the reference
// design's; the cycle counts are those of this design's clocked model.
module tb_link_length;
  localparam int unsigned N = 16, W = 16, STAGES = 32;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;

  logic [N-1:0] src_en [2], snk_en [2];
  logic [W-1:0] in_data [2][N], out_data [2][N];
  logic [N-1:0] in_req [2], in_ack [2], out_req [2], out_ack [2];
  int unsigned  sent [2][N], rcvd [2][N], errors [2][N];
  longint unsigned lat_sum [2][N];

  link2 #(.N(N), .W(W), .STAGES(STAGES)) u_l2 (.clk, .rst,
    .in_data(in_data[0]), .in_req(in_req[0]), .in_ack(in_ack[0]),
    .out_data(out_data[0]), .out_req(out_req[0]), .out_ack(out_ack[0]));
  link3 #(.N(N), .W(W), .STAGES(STAGES)) u_l3 (.clk, .rst,
    .in_data(in_data[1]), .in_req(in_req[1]), .in_ack(in_ack[1]),
    .out_data(out_data[1]), .out_req(out_req[1]), .out_ack(out_ack[1]));

  for (genvar k = 0; k < 2; k++) begin : g_traffic
    link_traffic #(.N(N), .W(W)) u_t (.clk, .rst, .src_en(src_en[k]), .snk_en(snk_en[k]),
      .gaps(1'b0), .in_data(in_data[k]), .in_req(in_req[k]), .in_ack(in_ack[k]),
      .out_data(out_data[k]), .out_req(out_req[k]), .out_ack(out_ack[k]),
      .sent(sent[k]), .rcvd(rcvd[k]), .errors(errors[k]), .lat_sum(lat_sum[k]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // flits inside the pipelined wires of imp. 3
  int fly = 0, max_fly = 0;
  logic p_f = 1'b0, p_h = 1'b0;
  always @(posedge clk) begin
    if (!rst) begin
      if (u_l3.f_ack && !p_f) fly++;
      if (u_l3.h_ack && !p_h) fly--;
      if (fly > max_fly) max_fly = fly;
    end
    p_f = u_l3.f_ack; p_h = u_l3.h_ack;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int unsigned total(input int k);
    int unsigned s = 0;
    for (int i = 0; i < N; i++) s += rcvd[k][i];
    return s;
  endfunction

  // cycles per flit over `flits` flits, with the given channels enabled
  task automatic measure(input int k, input logic [N-1:0] en, input int unsigned flits,
                         output real cpf);
    int unsigned r0;
    longint unsigned t;
    src_en[k] = en; snk_en[k] = '1;
    // settle
    r0 = total(k);
    while (total(k) < r0 + 4) @(posedge clk);
    r0 = total(k);
    t = 0;
    while (total(k) < r0 + flits) begin @(posedge clk); t++; end
    cpf = real'(t) / real'(flits);
    src_en[k] = '0;
    // drain
    forever begin
      bit idle;
      @(posedge clk);
      idle = 1;
      for (int i = 0; i < N; i++) if (rcvd[k][i] != sent[k][i] || in_req[k][i]) idle = 0;
      if (idle) break;
    end
  endtask

  initial begin
    real single [2], aggr [2], c4, c8;
    for (int k = 0; k < 2; k++) begin src_en[k] = '0; snk_en[k] = '0; end
    repeat (4) @(posedge clk);
    rst = 1'b0;
    fork
      begin measure(0, 16'h0001, 20, single[0]); measure(0, '1, 200, aggr[0]); end
      begin
        measure(1, 16'h0001, 20, single[1]); measure(1, 16'h000F, 100, c4);
        measure(1, 16'h00FF, 200, c8);      measure(1, '1, 400, aggr[1]);
      end
    join
    $display("32 stages, one channel: imp.2 %0.1f, imp.3 %0.1f cycles per flit", single[0], single[1]);
    $display("32 stages, 16 channels: imp.2 %0.2f, imp.3 %0.2f cycles per flit (ratio %0.1f)",
             aggr[0], aggr[1], aggr[0] / aggr[1]);
    $display("most flits in the imp.3 wires at once: %0d", max_fly);
    $display("imp.3, 32 stages, eager channels 1 / 4 / 8 / 16: %0.2f / %0.2f / %0.2f / %0.2f cycles per flit",
             single[1], c4, c8, aggr[1]);
    // with few channels the pipeline is data-limited: each added channel adds a flit per round trip
    check(c4 * 3.0 <= single[1] && c8 * 1.6 <= c4 && aggr[1] < c8,
          "imp.3 throughput grows with the number of eager channels on a long link");
    // a lone channel pays the round trip over the wires: at least 2 x STAGES
    check(single[0] >= real'(2 * STAGES) && single[1] >= real'(2 * STAGES),
          "lone channel cycle time includes the wire round trip");
    // imp. 2 sends at most one flit per round trip
    check(aggr[0] >= real'(2 * STAGES), "imp.2 aggregate limited by the round trip");
    check(aggr[1] * 4.0 <= aggr[0], "imp.3 aggregate at least 4x imp.2 on a long link");
    check(max_fly >= 4, "imp.3 pipeline holds several flits");
    for (int k = 0; k < 2; k++) for (int i = 0; i < N; i++)
      check(errors[k][i] == 0 && sent[k][i] == rcvd[k][i], "all flits delivered intact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
