// link3 - N virtual channels on a pipelined, multiplexed physical channel (imp. 3).
//
// The pipelined virtual-channel link. Each channel i has, at the sending end,
// a passivator joining the sender's push handshake with a pull fork; the
// fork splits the channel into a synchronisation channel (two plain wires to
// and from the receiving end) and a data channel. The data channel passes a
// decoupling latch into the funnel, which merges all channels through a tree
// of pull arbiters and latches and tags each flit with its channel number as
// dual-rail select pairs. The flit crosses the pipelined delay-insensitive
// channel and the horn steers it back to channel i, where a pull join waits
// for both the flit and the synchronisation handshake before acknowledging
// the receiver. A channel can therefore only send when its receiver has
// requested, at most one flit per channel is in flight, and the pipeline is
// filled by flits of different channels. Eager channels share the link
// bandwidth equally through the funnel's alternating arbiters.
// Link wires: 2W data, 2 log2(N) select, 2N synchronisation, plus pipeline
// acknowledges.
// CHAIN = 1 replaces the balanced funnel and horn by the unbalanced
// funnel_chain and horn_chain (N-1 select pairs instead of log2(N)), which
// give channel k a guaranteed 1/2^(k+1) of the funnel; the reference offers
// the unbalanced tree as an option for differentiated service, the default
// here is the balanced tree its measurements use.
// Interface and data-validity rules are those of link1 (push input, pull
// output, both passive; input data valid from in_req rising to in_ack falling).
module link3 #(
  parameter int unsigned N      = 16,
  parameter int unsigned W      = 16,
  parameter int unsigned STAGES = 2,
  parameter bit          CHAIN  = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in_data  [N],
  input  logic [N-1:0] in_req,
  input  logic [N-1:0] out_req,
  output logic [N-1:0] in_ack,
  output logic [W-1:0] out_data [N],
  output logic [N-1:0] out_ack
);
  localparam int unsigned L  = CHAIN ? N - 1 : $clog2(N);   // select pairs
  localparam int unsigned WF = W + 2*L;

  logic [N-1:0] s_sync_req, s_sync_ack, r_sync_req, r_sync_ack;
  logic [N-1:0] sd_req, sd_ack, r_data_req, r_data_ack;
  logic [W-1:0] sd_data [N];

  for (genvar i = 0; i < N; i++) begin : g_send
    logic joined_req, joined_ack, s_data_req, s_data_ack;
    passivator u_pas (.clk, .rst, .a_req(in_req[i]), .a_ack(in_ack[i]),
                      .b_req(joined_req), .b_ack(joined_ack));
    fork_pull u_fork (.clk, .rst, .in_req(joined_req), .in_ack(joined_ack),
                      .out1_req(s_sync_req[i]), .out1_ack(s_sync_ack[i]),
                      .out2_req(s_data_req),   .out2_ack(s_data_ack));
    decouple_latch #(.W(W)) u_dec (.clk, .rst,
                      .rin(s_data_req), .ain(s_data_ack), .in_data(in_data[i]),
                      .rout(sd_req[i]), .aout(sd_ack[i]), .out_data(sd_data[i]));
  end

  // Synchronisation wires (not pipelined, only repeated).
  repeater_chain #(.WIDTH(N), .STAGES(STAGES)) u_sync_req (.clk, .rst, .in(r_sync_req), .out(s_sync_req));
  repeater_chain #(.WIDTH(N), .STAGES(STAGES)) u_sync_ack (.clk, .rst, .in(s_sync_ack), .out(r_sync_ack));

  logic          f_req, f_ack, h_req, h_ack;
  logic [WF-1:0] f_data, h_data;

  if (CHAIN) begin : g_chain
    funnel_chain #(.N(N), .W(W)) u_funnel (.clk, .rst, .in_req(sd_req), .in_ack(sd_ack), .in_data(sd_data),
                                           .out_req(f_req), .out_ack(f_ack), .out_data(f_data));
    horn_chain #(.N(N), .W(W)) u_horn (.clk, .rst, .in_req(h_req), .in_ack(h_ack), .in_data(h_data),
                                       .out_req(r_data_req), .out_ack(r_data_ack), .out_data(out_data));
  end else begin : g_tree
    funnel #(.N(N), .W(W)) u_funnel (.clk, .rst, .in_req(sd_req), .in_ack(sd_ack), .in_data(sd_data),
                                     .out_req(f_req), .out_ack(f_ack), .out_data(f_data));
    horn #(.N(N), .W(W)) u_horn (.clk, .rst, .in_req(h_req), .in_ack(h_ack), .in_data(h_data),
                                 .out_req(r_data_req), .out_ack(r_data_ack), .out_data(out_data));
  end
  pipe_channel #(.W(W), .S(L), .STAGES(STAGES)) u_chan (.clk, .rst,
                                   .in_req(f_req), .in_ack(f_ack), .in_data(f_data),
                                   .out_req(h_req), .out_ack(h_ack), .out_data(h_data));

  for (genvar i = 0; i < N; i++) begin : g_recv
    join_pull u_join (.clk, .rst,
                      .in1_req(r_sync_req[i]), .in1_ack(r_sync_ack[i]),
                      .in2_req(r_data_req[i]), .in2_ack(r_data_ack[i]),
                      .out_req(out_req[i]),    .out_ack(out_ack[i]));
  end
endmodule
