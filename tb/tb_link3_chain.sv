// tb_link3_chain - end-to-end self-checking testbench of the pipelined
// virtual-channel link built with the unbalanced funnel and horn (link3 with
// CHAIN = 1, N = 4 channels, W = 16, STAGES = 2).
//
// Every channel is driven by link_traffic (4-phase sources and sinks that
// check flit values, order and handshake rules). Phases:
//  A  all channels eager for 3000 cycles: every channel must progress, and
//     the shares are printed (channel 0 sits at the root of the chain);
//  B  the sink of channel 1 stops accepting: the others must go on and
//     channel 1 must deliver nothing more; then it resumes;
//  C  random idle gaps on every source and sink for 3000 cycles;
//  D  sources stop, the link drains.
// Finally every channel must have delivered every flit it sent, intact, and
// no flit may be lost in the chain's variable-depth select coding.
// In this link each channel has one flit in flight (its sync handshake must
// return before the next), so at this size the channels' round trips, not
// the funnel, limit throughput and the 1/2, 1/4, 1/8, 1/8 split of the
// funnel alone (tb_funnel_chain) shows only as channel 0 never getting less
// than the deepest channels.
// The unbalanced tree is the reference design's concept for differentiated
// service; the chain shape and this 4-channel setup are this design's own.
module tb_link3_chain;
  localparam int unsigned N = 4;
  localparam int unsigned W = 16;
  localparam int unsigned STAGES = 2;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;

  logic [N-1:0] src_en = '0, snk_en = '0;
  logic         gaps = 1'b0;
  logic [W-1:0] in_data [N], out_data [N];
  logic [N-1:0] in_req, in_ack, out_req, out_ack;
  int unsigned  sent [N], rcvd [N], errors [N];
  longint unsigned lat_sum [N];

  link3 #(.N(N), .W(W), .STAGES(STAGES), .CHAIN(1'b1)) dut (.clk, .rst,
    .in_data, .in_req, .in_ack, .out_data, .out_req, .out_ack);

  link_traffic #(.N(N), .W(W)) traffic (.clk, .rst, .src_en, .snk_en, .gaps,
    .in_data, .in_req, .in_ack, .out_data, .out_req, .out_ack,
    .sent, .rcvd, .errors, .lat_sum);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned r0 [N], d [N];
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (2) @(posedge clk);

    // A: all eager
    src_en = '1; snk_en = '1;
    repeat (500) @(posedge clk);
    r0 = rcvd;
    repeat (3000) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      d[i] = rcvd[i] - r0[i];
      $display("A: channel %0d delivered %0d flits in 3000 cycles", i, d[i]);
      check(d[i] > 20, $sformatf("channel %0d starved with all eager", i));
    end
    check(d[0] + 2 >= d[N-1] && d[0] + 2 >= d[N-2], "root channel got less than the deepest channels");

    // B: channel 1's receiver blocked
    snk_en[1] = 1'b0;
    repeat (200) @(posedge clk);
    r0 = rcvd;
    repeat (2000) @(posedge clk);
    check(rcvd[1] == r0[1], "blocked channel 1 still delivered");
    for (int i = 0; i < N; i++) if (i != 1)
      check(rcvd[i] - r0[i] > 20, $sformatf("channel %0d held up by blocked channel 1", i));
    snk_en[1] = 1'b1;

    // C: random gaps
    gaps = 1'b1;
    r0 = rcvd;
    repeat (3000) @(posedge clk);
    for (int i = 0; i < N; i++)
      check(rcvd[i] - r0[i] > 10, $sformatf("channel %0d stalled with gaps", i));

    // D: drain
    src_en = '0;
    repeat (600) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      check(errors[i] == 0, $sformatf("channel %0d: %0d bad flits", i, errors[i]));
      check(rcvd[i] == sent[i], $sformatf("channel %0d: sent %0d, received %0d", i, sent[i], rcvd[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
