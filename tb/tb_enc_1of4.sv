// tb_enc_1of4 - random data and select pairs through the encoder (W = 10,
// S = 2). With en high each group must carry exactly one high wire, at the
// position of its two-bit value, and the dual-rail wires must copy the select
// inputs; with en low every wire must be low.
// The expected code is worked out here from the 1-of-4 rule (value v on
// wire v, active high, the latter this design's own choice).
module tb_enc_1of4;
  localparam int unsigned W = 10, S = 2;
  logic [W-1:0] data;
  logic [2*S:0] sel_dr;
  logic         en;
  logic [2*W+2*S-1:0] code;
  int checks = 0, failures = 0;

  enc_1of4 #(.W(W), .S(S)) dut (.data, .sel_dr, .en, .code);

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      data = W'($urandom); sel_dr = {1'b0, 4'($urandom)}; en = ($urandom % 4 != 0);
      #1;
      for (int g = 0; g < W/2; g++) begin
        logic [3:0] grp;
        int v;
        grp = code[4*g +: 4];
        v = data[2*g] + 2 * data[2*g+1];
        checks++;
        if (en) begin
          if (grp != (4'b1 << v)) begin failures++; $display("FAIL g=%0d %b v=%0d", g, grp, v); end
        end else if (grp != 0) failures++;
      end
      checks++;
      if (code[2*W +: 2*S] != (en ? sel_dr[2*S-1:0] : '0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
