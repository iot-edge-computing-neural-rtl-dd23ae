// tb_mcm: drives random 2x3x3 windows into the constant multipliers of kernel
// 1 of layer 2 and checks every registered product against value times
// weight one clock later, and that the products hold while in_dv is low.
`include "tb/tb_macros.svh"
module tb_mcm;
  import cnn_pkg::*;
  localparam int C = 2, KK = 3, N = C * KK * KK, PW = 2 * BITWIDTH;
  logic clk = 0, rst_n = 0, enable = 1, in_dv = 0;
  data_t window [C][KK][KK];
  logic signed [PW-1:0] prod [N];
  logic prod_dv;
  int checks = 0, failures = 0;
  int exp_p [N];
  always #5 clk = ~clk;
  mcm #(.C(C), .KW(KK), .KH(KK), .LAYER(2), .KIDX(1)) dut (.clk, .rst_n, .enable, .in_dv, .window, .prod, .prod_dv);
  initial begin
    for (int c = 0; c < C; c++) for (int y = 0; y < KK; y++) for (int x = 0; x < KK; x++)
      window[c][y][x] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      for (int c = 0; c < C; c++) for (int y = 0; y < KK; y++) for (int x = 0; x < KK; x++) begin
        window[c][y][x] = data_t'($urandom);
        exp_p[(c*KK + y)*KK + x] = int'(window[c][y][x]) * weight(2, 1, c, y, x);
      end
      in_dv = 1;
      @(negedge clk);
      `TB_CHECK(prod_dv, "prod_dv not set after one clock")
      for (int i = 0; i < N; i++)
        `TB_CHECK(int'(prod[i]) == exp_p[i], $sformatf("prod %0d = %0d, expected %0d", i, prod[i], exp_p[i]))
      in_dv = 0;
      for (int c = 0; c < C; c++) for (int y = 0; y < KK; y++) for (int x = 0; x < KK; x++)
        window[c][y][x] = data_t'(7);
      @(negedge clk);
      `TB_CHECK(!prod_dv, "prod_dv stuck")
      for (int i = 0; i < N; i++) `TB_CHECK(int'(prod[i]) == exp_p[i], "product changed without in_dv")
    end
    `TB_FINISH
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end
endmodule
