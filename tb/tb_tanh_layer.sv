// tb_tanh_layer: sweeps the whole range of the sum input around the
// activation's breakpoints and at random, comparing with the reference
// piecewise-linear tanh; also checks symmetry points and saturation values.
`include "tb/tb_macros.svh"
module tb_tanh_layer;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  localparam int SUM_W = 24;
  logic signed [SUM_W-1:0] in_sum;
  data_t out_data;
  int checks = 0, failures = 0;
  tanh_layer #(.SUM_W(SUM_W)) dut (.in_sum, .out_data);
  task automatic t(longint v);
    in_sum = SUM_W'(v);
    #1;
    `TB_CHECK(int'(out_data) == tanh_ref(v), $sformatf("tanh(%0d) = %0d, expected %0d", v, out_data, tanh_ref(v)))
  endtask
  initial begin
    for (longint v = -50000; v <= 50000; v += 37) t(v);
    for (int n = 0; n < 2000; n++) t(longint'($signed(SUM_W'($urandom))));
    t(-(longint'(1) << (SUM_W - 1)));
    t((longint'(1) << (SUM_W - 1)) - 1);
    in_sum = 0; #1 `TB_CHECK(out_data == 0, "tanh(0) != 0")
    in_sum = 63 * 128; #1 `TB_CHECK(out_data == 63, "tanh(63/128*128) != 63")
    in_sum = 100000; #1 `TB_CHECK(out_data == 127, "no positive saturation")
    in_sum = -100000; #1 `TB_CHECK(out_data == -127, "no negative saturation")
    `TB_FINISH
  end
endmodule
