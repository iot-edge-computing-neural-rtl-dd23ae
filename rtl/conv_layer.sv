// conv_layer: one convolution layer of the streaming network.
//
// The tensor extractor turns the incoming stream (C_IN channels, one pixel
// per accepted clock) into complete KxK windows; C_OUT dot products, one per
// kernel and all working in parallel, multiply each window by their kernel
// and sum it with the bias; a tanh activation per kernel follows. Only
// windows that lie entirely inside the image are computed, so the output
// image is (IW-KS+1) x (IH-KS+1) and leaves as a stream with gaps.
// Timing: four clock cycles from the input value that completes a window to
// the matching out_dv (tensor extractor 2, dot product 2, tanh 0). Accepts
// one value per clock; enable low stalls the whole layer.
// The structure and the four-clock latency follow the source design; only
// valid windows (no padding, stride 1) as in its layer sizes.
module conv_layer
  import cnn_pkg::*;
#(
  parameter int LAYER = 1,     // selects the weights in cnn_pkg
  parameter int C_IN  = 1,
  parameter int C_OUT = 5,
  parameter int IW    = 28,
  parameter int IH    = 28,
  parameter int KS    = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  logic  in_dv,
  input  data_t in_data  [C_IN],
  output data_t out_data [C_OUT],
  output logic  out_dv
);

  localparam int N     = C_IN * KS * KS;
  localparam int PW    = 2 * BITWIDTH;
  localparam int SUM_W = PW + $clog2(N + 1) + 2;

  data_t window [C_IN][KS][KS];
  logic  win_dv;
  logic  dv [C_OUT];

  tensor_extractor #(.C(C_IN), .IW(IW), .IH(IH), .KW(KS), .KH(KS)) u_te (
    .clk, .rst_n, .enable, .in_dv, .in_data,
    .out_data(window),
    .out_dv  (win_dv)
  );

  for (genvar j = 0; j < C_OUT; j++) begin : g_kernel
    logic signed [SUM_W-1:0] sum;

    dot_product #(.C(C_IN), .KW(KS), .KH(KS), .LAYER(LAYER), .KIDX(j), .N(N), .PW(PW),
                  .SUM_W(SUM_W)) u_dot (
      .clk, .rst_n, .enable,
      .in_dv (win_dv),
      .window(window),
      .sum   (sum),
      .sum_dv(dv[j])
    );

    tanh_layer #(.SUM_W(SUM_W)) u_tanh (
      .in_sum  (sum),
      .out_data(out_data[j])
    );
  end

  // all kernels run in lock step
  assign out_dv = dv[0];

endmodule
