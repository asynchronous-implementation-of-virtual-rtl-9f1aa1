// link_traffic - per-channel sources and sinks for the N-channel link testbenches.
//
// For every channel a source performs 4-phase push handshakes on the link
// input (data held from in_req rising until in_ack falls) and a sink performs
// 4-phase pull handshakes on the link output, sampling out_data when out_ack
// rises. Flit k of channel c carries flit_value(c, k), a hash worked out here
// independently of the link, so the sink checks value and order. Sources and
// sinks run only while their enable bit is set; with `gaps` set they wait a
// random 0..7 cycles before each request. Protocol checks: in_ack/out_ack may
// only rise while the matching request is high and only fall while it is low.
// Latency (cycles from in_req rising to out_ack rising) is summed per channel.
// Flit values, random gaps and protocol checks are this testbench's own; the
// push-input and pull-output rules checked are those of the link interface.
module link_traffic #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] src_en,
  input  logic [N-1:0] snk_en,
  input  logic         gaps,
  output logic [W-1:0] in_data  [N],
  output logic [N-1:0] in_req,
  input  logic [N-1:0] in_ack,
  input  logic [W-1:0] out_data [N],
  output logic [N-1:0] out_req,
  input  logic [N-1:0] out_ack,
  output int unsigned  sent     [N],
  output int unsigned  rcvd     [N],
  output int unsigned  errors   [N],
  output longint unsigned lat_sum [N]
);
  function automatic logic [W-1:0] flit_value(input int unsigned c, input int unsigned k);
    logic [31:0] x;
    x = (c + 1) * 32'h9E37_79B9 ^ (k + 7) * 32'h85EB_CA6B;
    x = x ^ (x >> 13);
    x = x * 32'hC2B2_AE35;
    x = x ^ (x >> 16);
    return W'({x, x});
  endfunction

  longint unsigned cycle;
  always_ff @(posedge clk) cycle <= rst ? 0 : cycle + 1;

  for (genvar c = 0; c < N; c++) begin : g_ch
    typedef enum logic [1:0] {S_IDLE, S_WAIT_ACK, S_WAIT_NACK} src_state_e;
    src_state_e      ss, ks;
    logic [2:0]      sgap, kgap;
    longint unsigned t_sent [$];
    logic            prev_in_ack, prev_out_ack;

    always_ff @(posedge clk) begin
      if (rst) begin
        ss <= S_IDLE; ks <= S_IDLE;
        in_req[c] <= 1'b0; out_req[c] <= 1'b0;
        in_data[c] <= '0;
        sent[c] <= 0; rcvd[c] <= 0; errors[c] <= 0; lat_sum[c] <= 0;
        sgap <= 0; kgap <= 0;
        prev_in_ack <= 1'b0; prev_out_ack <= 1'b0;
        t_sent.delete();
      end else begin
        prev_in_ack  <= in_ack[c];
        prev_out_ack <= out_ack[c];
        // protocol checks
        if (in_ack[c] && !prev_in_ack && !in_req[c])   errors[c] <= errors[c] + 1;
        if (!in_ack[c] && prev_in_ack && in_req[c])    errors[c] <= errors[c] + 1;
        if (out_ack[c] && !prev_out_ack && !out_req[c]) errors[c] <= errors[c] + 1;
        if (!out_ack[c] && prev_out_ack && out_req[c])  errors[c] <= errors[c] + 1;
        // source
        case (ss)
          S_IDLE: if (sgap != 0) sgap <= sgap - 1;
                  else if (src_en[c]) begin
                    in_data[c] <= flit_value(c, sent[c]);
                    in_req[c]  <= 1'b1;
                    t_sent.push_back(cycle);
                    ss <= S_WAIT_ACK;
                  end
          S_WAIT_ACK: if (in_ack[c]) begin in_req[c] <= 1'b0; ss <= S_WAIT_NACK; end
          default: if (!in_ack[c]) begin
                    sent[c] <= sent[c] + 1;
                    in_data[c] <= ~in_data[c];   // data may change now
                    sgap <= gaps ? 3'($urandom) : 3'd0;
                    ss <= S_IDLE;
                  end
        endcase
        // sink
        case (ks)
          S_IDLE: if (kgap != 0) kgap <= kgap - 1;
                  else if (snk_en[c]) begin out_req[c] <= 1'b1; ks <= S_WAIT_ACK; end
          S_WAIT_ACK: if (out_ack[c]) begin
                    if (out_data[c] !== flit_value(c, rcvd[c])) errors[c] <= errors[c] + 1;
                    if (t_sent.size() != 0) lat_sum[c] <= lat_sum[c] + (cycle - t_sent.pop_front());
                    else errors[c] <= errors[c] + 1;
                    out_req[c] <= 1'b0;
                    ks <= S_WAIT_NACK;
                  end
          default: if (!out_ack[c]) begin
                    rcvd[c] <= rcvd[c] + 1;
                    kgap <= gaps ? 3'($urandom) : 3'd0;
                    ks <= S_IDLE;
                  end
        endcase
      end
    end
  end
endmodule
