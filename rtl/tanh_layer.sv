// tanh_layer: combinational activation function of one kernel.
//
// Brings the dot-product sum back to the network scale (arithmetic shift
// right by BITWIDTH-1) and applies a three-segment piecewise-linear
// approximation of tanh, with S = 2**(BITWIDTH-1)-1 standing for 1.0:
//   |x| <= S/2            : y = x
//   S/2 < |x| < S/2 + 2S  : y = S/2 + (|x| - S/2)/4   (slope 1/4)
//   otherwise             : y = S
// with the sign of x restored. The segments meet at |x| = S/2 and at
// |x| = S/2 + 2S (about 0.5 and 2.5 in real terms). No register: it adds no
// latency, as in the design's timing budget.
// A combinational tanh follows the source design; the shape of the
// approximation and the shift used for rescaling are this design's choices.
module tanh_layer
  import cnn_pkg::*;
#(
  parameter int SUM_W = 24
) (
  input  logic signed [SUM_W-1:0] in_sum,
  output data_t                   out_data
);

  localparam int HALF = SCALE / 2;
  localparam int KNEE = HALF + 2 * SCALE;

  logic signed [SUM_W-1:0] x;
  logic        [SUM_W-1:0] ax;
  logic        [SUM_W-1:0] ay;

  always_comb begin
    x  = in_sum >>> (BITWIDTH - 1);
    ax = x[SUM_W-1] ? SUM_W'(-x) : SUM_W'(x);
    if (ax <= SUM_W'(HALF))      ay = ax;
    else if (ax < SUM_W'(KNEE))  ay = SUM_W'(HALF) + ((ax - SUM_W'(HALF)) >> 2);
    else                         ay = SUM_W'(SCALE);
    out_data = x[SUM_W-1] ? data_t'(-ay) : data_t'(ay);
  end

endmodule
