// cnn_process: the complete streaming convolutional network.
//
// Input layer -> conv layer 1 (C1 kernels KxK) -> 2x2 max pool ->
// conv layer 2 (C2 kernels KxKxC1) -> 2x2 max pool. Every layer exists as its
// own hardware, each kernel as its own multipliers and adder tree, so all
// layers work at once on the same image as it streams through, one pixel per
// clock. With the default sizes the 28x28 image gives 4x4 output positions of
// C2 features, delivered as out_data (one value per feature) with out_dv.
// Interface: clk, active-low rst_n (also the only way to start a new frame
// from its first pixel), enable (all registers hold while low), in_data and
// in_dv (one pixel, row by row, left to right, when in_dv is high).
// Timing: once the last pixel is accepted, the last output appears after
// INPUT_LAT + 2*CONV_LAT + 2*POOL_LAT = 1 + 8 + 4 = 13 clock cycles.
// Layer sizes, layer order and latencies follow the source design; the
// input-layer latency and the absence of frame-valid signals are this
// design's choices.
module cnn_process
  import cnn_pkg::*;
#(
  parameter int IW   = IMG_W,
  parameter int IH   = IMG_H,
  parameter int KS   = K,
  parameter int NC1  = C1,
  parameter int NC2  = C2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   enable,
  input  pixel_t in_data,
  input  logic   in_dv,
  output data_t  out_data [NC2],
  output logic   out_dv
);

  localparam int W1 = IW - KS + 1;   // conv 1 output
  localparam int H1 = IH - KS + 1;
  localparam int W2 = W1 / 2;        // pool 1 output
  localparam int H2 = H1 / 2;
  localparam int W3 = W2 - KS + 1;   // conv 2 output
  localparam int H3 = H2 - KS + 1;

  data_t l0_data [1];
  data_t l1_data [NC1];
  data_t p1_data [NC1];
  data_t l2_data [NC2];
  logic  l0_dv, l1_dv, p1_dv, l2_dv;

  input_layer u_input (
    .clk, .rst_n, .enable, .in_dv, .in_data,
    .out_data(l0_data), .out_dv(l0_dv)
  );

  conv_layer #(.LAYER(1), .C_IN(1), .C_OUT(NC1), .IW(IW), .IH(IH), .KS(KS)) u_conv1 (
    .clk, .rst_n, .enable,
    .in_dv(l0_dv), .in_data(l0_data), .out_data(l1_data), .out_dv(l1_dv)
  );

  pool_layer #(.C(NC1), .IW(W1), .IH(H1)) u_pool1 (
    .clk, .rst_n, .enable,
    .in_dv(l1_dv), .in_data(l1_data), .out_data(p1_data), .out_dv(p1_dv)
  );

  conv_layer #(.LAYER(2), .C_IN(NC1), .C_OUT(NC2), .IW(W2), .IH(H2), .KS(KS)) u_conv2 (
    .clk, .rst_n, .enable,
    .in_dv(p1_dv), .in_data(p1_data), .out_data(l2_data), .out_dv(l2_dv)
  );

  pool_layer #(.C(NC2), .IW(W3), .IH(H3)) u_pool2 (
    .clk, .rst_n, .enable,
    .in_dv(l2_dv), .in_data(l2_data), .out_data, .out_dv
  );

endmodule
