// dot_product: one convolution kernel applied to one window.
//
// MCM multiplies the window by the kernel's constant weights in the first
// cycle; MOA sums the products and the bias with an adder tree in the second.
// Timing: two clock cycles from in_dv to sum_dv, one result per clock.
// The MCM/MOA split and its two clocks follow the source design.
module dot_product
  import cnn_pkg::*;
#(
  parameter int C     = 1,
  parameter int KW    = 5,
  parameter int KH    = 5,
  parameter int LAYER = 1,
  parameter int KIDX  = 0,
  parameter int N     = C * KH * KW,
  parameter int PW    = 2 * BITWIDTH,
  parameter int SUM_W = PW + $clog2(N + 1) + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    in_dv,
  input  data_t                   window [C][KH][KW],
  output logic signed [SUM_W-1:0] sum,
  output logic                    sum_dv
);

  logic signed [PW-1:0] prod [N];
  logic                 prod_dv;

  mcm #(.C(C), .KW(KW), .KH(KH), .LAYER(LAYER), .KIDX(KIDX), .N(N), .PW(PW)) u_mcm (
    .clk, .rst_n, .enable, .in_dv, .window, .prod, .prod_dv
  );

  moa #(.N(N), .PW(PW), .SUM_W(SUM_W), .BIAS(bias(LAYER, KIDX))) u_moa (
    .clk, .rst_n, .enable, .in_dv(prod_dv), .prod, .sum, .sum_dv
  );

endmodule
