// pool_layer: 2x2 max pooling with stride 2 of a C-channel stream.
//
// poolV takes the maximum of vertically adjacent pixels using one image line
// of storage; poolH then takes the maximum of each pair of poolV results.
// The output image is IW/2 x IH/2. Only the 2x2 window is supported.
// Timing: two clock cycles (poolV 1, poolH 1) from the input value that
// completes a 2x2 block to its out_dv. One input per clock; enable low stalls.
// The poolV/poolH split, 2x2 window and two-clock latency follow the source
// design.
module pool_layer
  import cnn_pkg::*;
#(
  parameter int C  = 5,
  parameter int IW = 24,
  parameter int IH = 24
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  logic  in_dv,
  input  data_t in_data  [C],
  output data_t out_data [C],
  output logic  out_dv
);

  data_t v_data [C];
  logic  v_dv;

  pool_v #(.C(C), .IW(IW), .IH(IH)) u_pool_v (
    .clk, .rst_n, .enable, .in_dv, .in_data,
    .out_data(v_data),
    .out_dv  (v_dv)
  );

  pool_h #(.C(C)) u_pool_h (
    .clk, .rst_n, .enable,
    .in_dv  (v_dv),
    .in_data(v_data),
    .out_data,
    .out_dv
  );

  initial begin
    assert (IW % 2 == 0 && IH % 2 == 0)
      else $error("pool_layer: image width and height must be even");
  end

endmodule
