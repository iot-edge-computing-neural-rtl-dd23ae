// mcm: multiple constant multiplication of one convolution kernel.
//
// Multiplies every element of a C x KH x KW window by the matching constant
// weight of kernel KIDX of conv layer LAYER (taken from cnn_pkg::weight) and
// registers all products. Because the weights are constants, synthesis drops
// multiplications by zero, turns multiplications by one into wires and by
// powers of two into shifts. Product n belongs to window element
// (c, ky, kx) with n = (c*KH + ky)*KW + kx.
// Timing: one clock cycle; prod_dv follows in_dv. Enable low freezes it.
// One clock for all multiplications and constant weights follow the source
// design; the weight values are placeholders from cnn_pkg.
module mcm
  import cnn_pkg::*;
#(
  parameter int C     = 1,
  parameter int KW    = 5,
  parameter int KH    = 5,
  parameter int LAYER = 1,
  parameter int KIDX  = 0,
  parameter int N     = C * KH * KW,
  parameter int PW    = 2 * BITWIDTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 in_dv,
  input  data_t                window [C][KH][KW],
  output logic signed [PW-1:0] prod   [N],
  output logic                 prod_dv
);

  for (genvar c = 0; c < C; c++) begin : g_c
    for (genvar ky = 0; ky < KH; ky++) begin : g_y
      for (genvar kx = 0; kx < KW; kx++) begin : g_x
        localparam int W = weight(LAYER, KIDX, c, ky, kx);
        localparam int IDX = (c * KH + ky) * KW + kx;
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n)                prod[IDX] <= '0;
          else if (enable && in_dv)  prod[IDX] <= PW'(window[c][ky][kx] * W);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      prod_dv <= 1'b0;
    else if (enable) prod_dv <= in_dv;
  end

endmodule
