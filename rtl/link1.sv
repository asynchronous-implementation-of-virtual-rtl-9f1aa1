// link1 - N-channel link built from N separate physical channels (imp. 1).
//
// The simplest multi-channel link: every link channel owns a passivator and a
// whole delay-insensitive physical channel, so channels never interact and no
// flow control is needed. Wire count is N x (2W + 1), which is why this
// organisation only suits a few channels; the virtual-channel links share one
// physical channel instead.
// Interface per channel i: push input (in_req, in_ack, in_data) where the
// link is passive; pull output (out_req, out_ack, out_data) where the link is
// passive too. 4-phase handshakes. Input data must be valid from in_req
// rising until in_ack falls; output data is valid from out_ack rising until
// out_req falls.
// The structure (passivator, 1-of-4 encoder, long wires, decoder per
// channel) follows the reference design; modelling the wires as clocked
// repeaters is this design's own choice.
module link1 #(
  parameter int unsigned N      = 16,
  parameter int unsigned W      = 16,
  parameter int unsigned STAGES = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in_data  [N],
  input  logic [N-1:0] in_req,
  output logic [N-1:0] in_ack,
  output logic [W-1:0] out_data [N],
  input  logic [N-1:0] out_req,
  output logic [N-1:0] out_ack
);
  for (genvar i = 0; i < N; i++) begin : g_ch
    logic ch_req, ch_ack;
    passivator u_pas (.clk, .rst, .a_req(in_req[i]), .a_ack(in_ack[i]),
                      .b_req(ch_req), .b_ack(ch_ack));
    phys_channel #(.W(W), .STAGES(STAGES)) u_chan (
      .clk, .rst,
      .in_req(ch_req), .in_ack(ch_ack), .in_data(in_data[i]),
      .out_req(out_req[i]), .out_ack(out_ack[i]), .out_data(out_data[i]));
  end
endmodule
