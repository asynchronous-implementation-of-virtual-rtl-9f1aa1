// noc_vc_links - the three N-channel asynchronous NoC link organisations side by side.
//
// A unidirectional network-on-chip link carries N independent link channels
// from one node to the next. This top holds one instance of each of the
// three organisations, every one with its own ports (prefix l1_, l2_, l3_):
//   link1  - N separate physical channels (reference organisation);
//   link2  - N virtual channels time-shared on one delay-insensitive channel,
//            allocated by a handshake arbiter;
//   link3  - N virtual channels on a pipelined shared channel with a
//            funnel/horn tree and per-channel synchronisation wires.
// All three have the same channel interface, so a node can use any of them:
// per channel a 4-phase push input (in_req, in_ack, in_data; data valid from
// in_req rising until in_ack falls) and a 4-phase pull output (out_req,
// out_ack, out_data; data valid from out_ack rising until out_req falls).
// Defaults N = 16 channels, W = 16 bit flits, STAGES = 2 repeater or pipeline
// stages are the sample configuration of the reference design. CHAIN = 1
// builds link3 with the unbalanced (chain) funnel and horn instead of the
// balanced trees; default 0, the configuration of all the measurements.
// clk is the emulation clock of the self-timed circuits (see vc_link_pkg);
// rst is active high, with all inputs held low during reset.
module noc_vc_links #(
  parameter int unsigned N      = 16,
  parameter int unsigned W      = 16,
  parameter int unsigned STAGES = 2,
  parameter bit          CHAIN  = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  // imp. 1: physical channels
  input  logic [W-1:0] l1_in_data  [N],
  input  logic [N-1:0] l1_in_req,
  output logic [N-1:0] l1_in_ack,
  output logic [W-1:0] l1_out_data [N],
  input  logic [N-1:0] l1_out_req,
  output logic [N-1:0] l1_out_ack,
  // imp. 2: virtual channels, multiplexed data path
  input  logic [W-1:0] l2_in_data  [N],
  input  logic [N-1:0] l2_in_req,
  output logic [N-1:0] l2_in_ack,
  output logic [W-1:0] l2_out_data [N],
  input  logic [N-1:0] l2_out_req,
  output logic [N-1:0] l2_out_ack,
  // imp. 3: virtual channels, pipelined data path
  input  logic [W-1:0] l3_in_data  [N],
  input  logic [N-1:0] l3_in_req,
  output logic [N-1:0] l3_in_ack,
  output logic [W-1:0] l3_out_data [N],
  input  logic [N-1:0] l3_out_req,
  output logic [N-1:0] l3_out_ack
);
  link1 #(.N(N), .W(W), .STAGES(STAGES)) u_link1 (.clk, .rst,
    .in_data(l1_in_data), .in_req(l1_in_req), .in_ack(l1_in_ack),
    .out_data(l1_out_data), .out_req(l1_out_req), .out_ack(l1_out_ack));

  link2 #(.N(N), .W(W), .STAGES(STAGES)) u_link2 (.clk, .rst,
    .in_data(l2_in_data), .in_req(l2_in_req), .in_ack(l2_in_ack),
    .out_data(l2_out_data), .out_req(l2_out_req), .out_ack(l2_out_ack));

  link3 #(.N(N), .W(W), .STAGES(STAGES), .CHAIN(CHAIN)) u_link3 (.clk, .rst,
    .in_data(l3_in_data), .in_req(l3_in_req), .in_ack(l3_in_ack),
    .out_data(l3_out_data), .out_req(l3_out_req), .out_ack(l3_out_ack));
endmodule
