// cnn_pkg: network-wide constants, types and constant tables of the streaming CNN.
//
// This package plays the role of the three generated files of the network
// generator (bitwidth, params, cnn_types). It fixes the number format, the
// network shape and the kernel weights and biases:
//   * Every value inside the network is a signed two's-complement number of
//     BITWIDTH bits. Real numbers in [-1, 1] are scaled by
//     SCALE = 2**(BITWIDTH-1) - 1 before they are rounded to integers.
//   * The network is a small LeNet: 28x28x1 image, convolution with five 5x5
//     kernels (24x24x5), 2x2 max pooling (12x12x5), convolution with ten
//     5x5x5 kernels (8x8x10) and 2x2 max pooling (4x4x10).
//   * The trained weights of the original network are not available, so the
//     weights and biases come from a fixed integer formula (weight(), bias()).
//     Replace those two functions to load a real model. Biases are clamped to
//     [-SCALE, SCALE] so that every parameter fits in BITWIDTH bits.
// BITWIDTH = 8 is this design's choice; the network sizes follow the LeNet
// described for the design.
package cnn_pkg;

  localparam int BITWIDTH = 8;                        // network data width
  localparam int SCALE    = 2 ** (BITWIDTH - 1) - 1;  // scale factor
  localparam int PIXEL_W  = 8;                        // input pixel width

  localparam int IMG_W = 28;   // input image width
  localparam int IMG_H = 28;   // input image height
  localparam int K     = 5;    // kernel width and height of both conv layers
  localparam int C1    = 5;    // kernels of conv layer 1
  localparam int C2    = 10;   // kernels of conv layer 2
  localparam int POOL  = 2;    // pooling window (only 2x2 is supported)

  // Output of the network: 4x4 pixels of C2 channels.
  localparam int OUT_W = ((IMG_W - K + 1) / POOL - K + 1) / POOL;
  localparam int OUT_H = ((IMG_H - K + 1) / POOL - K + 1) / POOL;

  // Latencies in clock cycles (per layer, from input valid to output valid).
  localparam int INPUT_LAT = 1;
  localparam int CONV_LAT  = 4;   // tensor extractor 2 + dot product 2 + tanh 0
  localparam int POOL_LAT  = 2;   // poolV 1 + poolH 1

  typedef logic signed [BITWIDTH-1:0] data_t;
  typedef logic        [PIXEL_W-1:0]  pixel_t;

  // Kernel weight of conv layer `layer` (1 or 2), kernel `o`, input channel
  // `i`, row `ky`, column `kx`. Integers in [-15, 15] (about +/-0.12 after
  // scaling), so that sums land both inside and outside the linear range of
  // the activation.
  function automatic int weight(int layer, int o, int i, int ky, int kx);
    int h;
    h = layer * 97 + o * 53 + i * 29 + ky * 13 + kx * 7 + 11;
    return ((h * h + 3 * h) % 31) - 15;
  endfunction

  // Raw bias before clamping: may exceed the BITWIDTH range on purpose.
  function automatic int bias_raw(int layer, int o);
    int h;
    h = layer * 41 + o * 23 + 5;
    return ((h * h) % (4 * SCALE + 1)) - 2 * SCALE;
  endfunction

  // Bias of a kernel, clamped to [-SCALE, SCALE].
  function automatic int bias(int layer, int o);
    int b;
    b = bias_raw(layer, o);
    if (b > SCALE) b = SCALE;
    if (b < -SCALE) b = -SCALE;
    return b;
  endfunction

endpackage
