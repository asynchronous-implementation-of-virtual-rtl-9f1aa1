// tb_dec_1of4 - the testbench builds 1-of-4 codewords (W = 8, S = 2) and lets
// the groups arrive one by one in random order, then leave one by one. Checks:
// decoded data and select rails equal the sent values, valid rises exactly one
// cycle after the last group arrives, stays high while groups leave, and
// falls one cycle after the last group has left.
// The code and completion rules follow the reference design; the active-high
// code and the random arrival order of the groups are this testbench's.
module tb_dec_1of4;
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned W = 8, S = 2, NG = W/2 + S;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = !clk;
  logic [2*W+2*S-1:0] code;
  logic [W-1:0] data;
  logic [2*S:0] sel_t;
  logic valid;
  int checks = 0, failures = 0;

  dec_1of4 #(.W(W), .S(S)) dut (.clk, .rst, .code, .data, .sel_t, .valid);

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] d;
    logic [S-1:0] s;
    logic [2*W+2*S-1:0] full;
    int order [NG];
    code = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      d = W'($urandom); s = S'($urandom);
      full = '0;
      for (int g = 0; g < W/2; g++) full[4*g + d[2*g +: 2]] = 1'b1;
      for (int p = 0; p < S; p++) full[2*W + 2*p + (s[p] ? 0 : 1)] = 1'b1;
      for (int g = 0; g < NG; g++) order[g] = g;
      order.shuffle();
      // groups arrive
      for (int g = 0; g < NG; g++) begin
        @(negedge clk);
        if (order[g] < W/2) code[4*order[g] +: 4] = full[4*order[g] +: 4];
        else code[2*W + 2*(order[g]-W/2) +: 2] = full[2*W + 2*(order[g]-W/2) +: 2];
        @(posedge clk); #0.1;
        checks++;
        if (valid !== (g == NG-1)) begin failures++; $display("FAIL valid early/late k=%0d g=%0d", k, g); end
      end
      checks += 2;
      if (data !== d) begin failures++; $display("FAIL data %h exp %h", data, d); end
      for (int p = 0; p < S; p++) if (sel_t[2*p] !== s[p]) failures++;
      // groups leave
      order.shuffle();
      for (int g = 0; g < NG; g++) begin
        @(negedge clk);
        if (order[g] < W/2) code[4*order[g] +: 4] = '0;
        else code[2*W + 2*(order[g]-W/2) +: 2] = '0;
        @(posedge clk); #0.1;
        checks++;
        if (valid !== (g != NG-1)) begin failures++; $display("FAIL valid fall k=%0d g=%0d", k, g); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
