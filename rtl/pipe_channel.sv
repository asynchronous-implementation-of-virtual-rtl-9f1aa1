// pipe_channel - pipelined delay-insensitive physical channel (imp. 3 link).
//
// Carries a flit of W data bits plus S select bit pairs between the funnel and
// the horn. Sending end: the W data bits are encoded 1-of-4 and the S select
// pairs, already one-hot {sel2, sel1}, are sent dual-rail; the encoder is
// enabled by in_ack. The wires then pass STAGES 1-of-4 pipeline latches with
// completion detection. in_req (the request to the funnel) is the inverted
// acknowledge of the first latch: the funnel is asked for a new flit whenever
// the first stage is empty. Receiving end: the last latch only passes a
// codeword on while the horn requests (out_req) and empties once the horn has
// withdrawn it (the data-release signal of the decoder); the decoder's
// completion C-element gives out_ack. Link wires: 2W + 2S forward plus the
// acknowledge wires between stages.
// Interface: pull input, channel active (in_req out, in_ack + in_data in);
// pull output, channel passive (out_req in, out_ack + out_data out). The input
// data must stay valid while in_ack is high; out_data is valid from out_ack
// rising until out_req falls. STAGES >= 1.
// Timing: a flit needs STAGES + 1 cycles from in_ack to out_ack when the
// pipeline is empty (one per stage, one for the completion detector). With
// the output stalled, the stages hold one codeword in every other stage (a
// codeword and the spacer behind it take one stage each), about
// (STAGES + 1) / 2 flits; a stage can accept a new codeword every 4 cycles.
// The 1-of-4 pipeline latches and the dual-rail select wires follow the
// reference design; how the horn's request releases the last stage is this
// design's own choice, as the reference gives no circuit for it.
module pipe_channel #(
  parameter int unsigned W      = 16,
  parameter int unsigned S      = 4,
  parameter int unsigned STAGES = 2,
  localparam int unsigned WF = W + 2*S,      // flit width at the ports
  localparam int unsigned NW = 2*W + 2*S     // wires per stage
) (
  input  logic          clk,
  input  logic          rst,
  output logic          in_req,
  input  logic          in_ack,
  input  logic [WF-1:0] in_data,
  input  logic          out_req,
  output logic          out_ack,
  output logic [WF-1:0] out_data
);
  logic [NW-1:0] wires [STAGES+1];
  logic          ack   [STAGES+1];   // ack[s]: acknowledge from stage s to stage s-1
  logic [2*S:0]  sel_in, sel_out;   // bit 2S spare (keeps S = 0 legal), unused

  assign sel_in = {1'b0, in_data[WF-1:W]};
  enc_1of4 #(.W(W), .S(S)) u_enc (.data(in_data[W-1:0]), .sel_dr(sel_in), .en(in_ack),
                                  .code(wires[0]));

  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    logic ack_next;
    if (s == STAGES) begin : g_last
      assign ack_next = !out_req;
    end else begin : g_mid
      assign ack_next = ack[s+1];
    end
    latch_1of4 #(.G(W/2), .S(S)) u_lat (.clk, .rst, .in(wires[s-1]), .ack_prev(ack[s]),
                                        .out(wires[s]), .ack_next(ack_next));
  end
  assign ack[0] = 1'b0;
  assign in_req = !ack[1];

  dec_1of4 #(.W(W), .S(S)) u_dec (.clk, .rst, .code(wires[STAGES]), .data(out_data[W-1:0]),
                                  .sel_t(sel_out), .valid(out_ack));
  assign out_data[WF-1:W] = sel_out[2*S-1:0];
endmodule
