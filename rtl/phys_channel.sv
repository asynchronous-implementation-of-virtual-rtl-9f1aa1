// phys_channel - one delay-insensitive physical channel (non-pipelined links).
//
// Carries bundled data from the sending end to the receiving end of a link
// over 2W wires in 1-of-4 code, plus one backward wire. Sending end: the
// encoder is enabled by in_ack (the data-valid of the pull channel feeding
// it). Receiving end: the decoder's completion C-element gives out_ack. The
// receiver's request out_req travels back on the extra wire and becomes
// in_req, which releases the sender's data ("data release"). All wires pass
// STAGES repeaters. Used as the whole channel of the physical-channel link
// and as the shared channel of the multiplexed link.
// Interface: pull channel on both sides, the channel active toward the sender
// (in_req out, in_ack + in_data in) and passive toward the receiver (out_req
// in, out_ack + out_data out). out_data is valid from out_ack rising until
// out_req falls (early scheme).
// Timing (cycles): out_req -> in_req STAGES; in_ack -> out_ack STAGES + 1.
// Encoder, decoder and the single backward request wire follow the reference
// design; the active-high code (the reference encoder cell has inverted
// outputs) and wires modelled as clocked repeaters are this design's choices.
module phys_channel #(
  parameter int unsigned W      = 16,
  parameter int unsigned STAGES = 2
) (
  input  logic         clk,
  input  logic         rst,
  output logic         in_req,
  input  logic         in_ack,
  input  logic [W-1:0] in_data,
  input  logic         out_req,
  output logic         out_ack,
  output logic [W-1:0] out_data
);
  logic [2*W-1:0] tx_code, rx_code;
  logic [0:0]     sel_unused;

  enc_1of4 #(.W(W), .S(0)) u_enc (.data(in_data), .sel_dr(1'b0), .en(in_ack), .code(tx_code));
  repeater_chain #(.WIDTH(2*W), .STAGES(STAGES)) u_fwd (.clk, .rst, .in(tx_code), .out(rx_code));
  dec_1of4 #(.W(W), .S(0)) u_dec (.clk, .rst, .code(rx_code), .data(out_data),
                                   .sel_t(sel_unused), .valid(out_ack));
  repeater_chain #(.WIDTH(1), .STAGES(STAGES)) u_bwd (.clk, .rst, .in(out_req), .out(in_req));
endmodule
