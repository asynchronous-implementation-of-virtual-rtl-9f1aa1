// link2 - N virtual channels on one multiplexed physical channel (imp. 2).
//
// All N link channels share one delay-insensitive physical channel. A channel
// may only compete for it when both its sender (in_req) and its receiver
// (out_req, carried to the sending end on a ready wire) are ready: a
// C-element joins the two. An N-channel handshake arbiter picks one joined
// channel; its 1-of-N select drives the data multiplexer, its OR is the
// data-valid of the shared channel, and the select also crosses the link on
// N select wires. At the receiving end a C-element per channel combines the
// select wire with the decoded data-valid into that channel's out_ack, and
// the OR of those acknowledges is the shared channel's data release, which
// travels back to the arbiter. Link wires: 2W data, N ready, N select and one
// acknowledge, as in the reference design. The arbiter is replaceable (the
// reference calls it the encapsulated flow-control module).
// Interface and data-validity rules are those of link1.
module link2 #(
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
  logic [N-1:0] s_rdy, rdy_req, s_sel, r_sel, r_ack;
  logic         s_req, s_ack, r_req;
  logic [W-1:0] s_data, r_data;

  // Receiver-ready wires, receiving end -> sending end.
  repeater_chain #(.WIDTH(N), .STAGES(STAGES)) u_rdy (.clk, .rst, .in(out_req), .out(s_rdy));

  for (genvar i = 0; i < N; i++) begin : g_join
    c_element u_c (.clk, .rst, .a(in_req[i]), .b(s_rdy[i]), .z(rdy_req[i]));
  end

  hs_arbiter #(.N(N)) u_arb (.clk, .rst, .req_in(rdy_req), .ack_in(in_ack),
                             .req_out(s_sel), .ack_out(s_ack));

  assign s_req = |s_sel;

  // AND-OR multiplexer steered by the 1-of-N select.
  always_comb begin
    s_data = '0;
    for (int i = 0; i < N; i++) if (s_sel[i]) s_data |= in_data[i];
  end

  phys_channel #(.W(W), .STAGES(STAGES)) u_chan (
    .clk, .rst,
    .in_req(s_ack), .in_ack(s_req), .in_data(s_data),
    .out_req(|r_ack), .out_ack(r_req), .out_data(r_data));

  // Select wires, sending end -> receiving end.
  repeater_chain #(.WIDTH(N), .STAGES(STAGES)) u_sel (.clk, .rst, .in(s_sel), .out(r_sel));

  for (genvar i = 0; i < N; i++) begin : g_out
    c_element u_c (.clk, .rst, .a(r_sel[i]), .b(r_req), .z(r_ack[i]));
    assign out_data[i] = r_data;
  end
  assign out_ack = r_ack;
endmodule
