// moa: multi-operand adder of one convolution kernel.
//
// Adds N signed products and the kernel bias with a binary adder tree and
// registers the sum. The operands are padded with zeros to the next power of
// two and summed pairwise level by level (log2 levels of adders). The bias is
// brought to the scale of the products by shifting it left by BITWIDTH-1,
// because a product of two scaled values carries the scale factor twice.
// Timing: one clock cycle; sum_dv follows in_dv. Enable low freezes it.
// A binary adder tree taking one clock follows the source design; adding the
// bias at product scale is this design's choice.
module moa
  import cnn_pkg::*;
#(
  parameter int N     = 25,
  parameter int PW    = 2 * BITWIDTH,
  parameter int SUM_W = PW + $clog2(N + 1) + 2,
  parameter int BIAS  = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    in_dv,
  input  logic signed [PW-1:0]    prod [N],
  output logic signed [SUM_W-1:0] sum,
  output logic                    sum_dv
);

  localparam int LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int NP     = 1 << LEVELS;

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic signed [SUM_W-1:0] v [NP >> l];
  end

  for (genvar i = 0; i < NP; i++) begin : g_leaf
    if (i < N) begin : g_op
      assign g_lvl[0].v[i] = SUM_W'(prod[i]);
    end else begin : g_pad
      assign g_lvl[0].v[i] = '0;
    end
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_add
    for (genvar i = 0; i < (NP >> l); i++) begin : g_node
      assign g_lvl[l].v[i] = g_lvl[l-1].v[2*i] + g_lvl[l-1].v[2*i+1];
    end
  end

  localparam logic signed [SUM_W-1:0] BIAS_S = SUM_W'(BIAS) <<< (BITWIDTH - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum    <= '0;
      sum_dv <= 1'b0;
    end else if (enable) begin
      sum_dv <= in_dv;
      if (in_dv) sum <= g_lvl[LEVELS].v[0] + BIAS_S;
    end
  end

endmodule
