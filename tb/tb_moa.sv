// tb_moa: sums 25 random 16-bit products (including the extremes) plus a bias
// of -77 in the adder tree and compares with a plain software sum one clock
// later.
`include "tb/tb_macros.svh"
module tb_moa;
  import cnn_pkg::*;
  localparam int N = 25, PW = 2 * BITWIDTH, SUM_W = PW + $clog2(N + 1) + 2, B = -77;
  logic clk = 0, rst_n = 0, enable = 1, in_dv = 0;
  logic signed [PW-1:0] prod [N];
  logic signed [SUM_W-1:0] sum;
  logic sum_dv;
  int checks = 0, failures = 0;
  longint expv;
  always #5 clk = ~clk;
  moa #(.N(N), .BIAS(B)) dut (.clk, .rst_n, .enable, .in_dv, .prod, .sum, .sum_dv);
  initial begin
    for (int i = 0; i < N; i++) prod[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      expv = longint'(B) * (1 << (BITWIDTH - 1));
      for (int i = 0; i < N; i++) begin
        case (n)
          0: prod[i] = 16'sh7fff;
          1: prod[i] = 16'sh8000;
          default: prod[i] = PW'($urandom);
        endcase
        expv += longint'(prod[i]);
      end
      in_dv = 1;
      @(negedge clk);
      `TB_CHECK(sum_dv, "sum_dv missing")
      `TB_CHECK(longint'(sum) == expv, $sformatf("sum %0d, expected %0d", sum, expv))
    end
    `TB_FINISH
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end
endmodule
