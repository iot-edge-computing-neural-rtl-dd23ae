// tb_dot_product: feeds a new random 5x5x5 window every clock into kernel 3 of
// layer 2 and checks each sum against the reference dot product (weights and
// clamped bias) exactly two clocks later.
`include "tb/tb_macros.svh"
module tb_dot_product;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  localparam int C = 5, KK = 5, N = C * KK * KK, SUM_W = 2 * BITWIDTH + $clog2(N + 1) + 2;
  logic clk = 0, rst_n = 0, enable = 1, in_dv = 0;
  data_t window [C][KK][KK];
  logic signed [SUM_W-1:0] sum;
  logic sum_dv;
  int checks = 0, failures = 0;
  longint hist [$];
  fmap_t fm;
  always #5 clk = ~clk;
  dot_product #(.C(C), .KW(KK), .KH(KK), .LAYER(2), .KIDX(3)) dut (.clk, .rst_n, .enable, .in_dv, .window, .sum, .sum_dv);
  initial begin
    window = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      if (n < 50) begin
        for (int c = 0; c < C; c++) for (int y = 0; y < KK; y++) for (int x = 0; x < KK; x++) begin
          window[c][y][x] = data_t'($urandom);
          fm[c][y][x] = int'(window[c][y][x]);
        end
        hist.push_back(dot_ref(2, 3, C, KK, 0, 0, fm));
        in_dv = 1;
      end else in_dv = 0;
      @(negedge clk);
      if (n >= 1 && n <= 50) begin
        `TB_CHECK(sum_dv, $sformatf("sum_dv low at step %0d", n))
        begin
          longint e;
          e = hist.pop_front();
          `TB_CHECK(longint'(sum) == e, $sformatf("sum %0d, expected %0d", sum, e))
        end
      end
    end
    `TB_CHECK(hist.size() == 0, "missing results")
    `TB_FINISH
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end
endmodule
