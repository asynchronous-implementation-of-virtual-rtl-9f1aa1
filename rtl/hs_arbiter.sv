// hs_arbiter - N-channel 4-phase handshake arbiter with 1-of-N select output.
//
// Used for link-level flow control in the multiplexed-datapath link. Each of
// the N passive input ports (req_in[i] / ack_in[i]) competes for the single
// shared output; the winner is announced as a 1-of-N encoded request
// req_out[i], which both requests the shared channel and selects the data
// multiplexer. The shared output is acknowledged by ack_out.
// How it works (an N-channel extension of the classic mutex + hold + merge
// handshake arbiter): the mutex input of channel i is req_in[i] | ack_in[i],
// so the grant is held until the channel's whole 4-phase handshake, return to
// zero included, is over; req_out[i] = grant[i] & req_in[i]; and
// ack_in[i] = C(ack_out, req_out[i]), so the reverse path is one C-element.
// The reference gives this block's function and its latency formulas but its
// gate diagram is not reproduced; the gating above is this design's own choice.
// Arbitration is not fair: two channels that keep requesting can exclude the
// others, as noted for the reference arbiter.
// Timing: forward latency log2(N) mutex levels + 1 gate; reverse one C-element.
module hs_arbiter #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req_in,
  output logic [N-1:0] ack_in,
  output logic [N-1:0] req_out,
  input  logic         ack_out
);
  logic [N-1:0] hold, grant;

  assign hold    = req_in | ack_in;
  assign req_out = grant & req_in;

  mutex_n #(.N(N)) u_mutex (.clk, .rst, .in(hold), .out(grant));

  for (genvar i = 0; i < N; i++) begin : g_ack
    c_element u_c (.clk, .rst, .a(ack_out), .b(req_out[i]), .z(ack_in[i]));
  end

  a_one_selected: assert property (@(posedge clk) disable iff (rst) $onehot0(req_out));
endmodule
