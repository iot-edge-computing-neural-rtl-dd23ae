// tb_conv_layer: streams three random 9x7 two-channel frames (the first and last with input gaps
// and enable stalls) through a layer of three 3x3x2 kernels of layer 2 and
// compares every output with the reference convolution plus activation; checks
// the output count and the 4-clock latency of a continuous frame.
`include "tb/tb_macros.svh"
module tb_conv_layer;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  localparam int CI = 2, CO = 3, IW = 9, IH = 7, NOUT = 35, LAT = 4;
  logic clk = 0, rst_n = 0, enable = 0, in_dv = 0;
  data_t in_data [CI];
  data_t out_data [CO];
  logic  out_dv;
  int checks = 0, failures = 0, cyc = 0, nout = 0, last_in = 0, last_out = 0;
  fmap_t img, expv;
  always #5 clk = ~clk;
  conv_layer #(.LAYER(2), .C_IN(CI), .C_OUT(CO), .IW(IW), .IH(IH), .KS(3)) dut (.clk, .rst_n, .enable, .in_dv, .in_data, .out_data, .out_dv);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (enable && in_dv) last_in <= cyc;
    if (enable && out_dv) begin
      int oy, ox;
      oy = nout / 7;
      ox = nout % 7;
      if (nout < NOUT)
        for (int c = 0; c < CO; c++)
          `TB_CHECK(int'(out_data[c]) == expv[c][oy][ox],
                    $sformatf("out %0d ch%0d = %0d, expected %0d", nout, c, out_data[c], expv[c][oy][ox]))
      nout <= nout + 1;
      last_out <= cyc;
    end
  end

  task automatic frame(input bit gaps);
    for (int c = 0; c < CI; c++)
      for (int y = 0; y < IH; y++)
        for (int x = 0; x < IW; x++) img[c][y][x] = int'(data_t'($urandom));
    conv_ref(2, CI, CO, IW, IH, 3, img, expv);
    nout = 0;
    for (int p = 0; p < IW * IH; ) begin
      @(negedge clk);
      enable = !(gaps && $urandom % 4 == 0);
      in_dv  = !(gaps && $urandom % 3 == 0);
      for (int c = 0; c < CI; c++) in_data[c] = data_t'(img[c][p / IW][p % IW]);
      if (enable && in_dv) p++;
    end
    @(negedge clk) begin in_dv = 0; enable = 1; end
    repeat (8) @(negedge clk);
    `TB_CHECK(nout == NOUT, $sformatf("%0d outputs, expected %0d", nout, NOUT))
    if (!gaps) `TB_CHECK(last_out - last_in == LAT, $sformatf("latency %0d, expected %0d", last_out - last_in, LAT))
  endtask

  initial begin
    for (int c = 0; c < CI; c++) in_data[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(1);
    frame(0);
    frame(1);
    `TB_FINISH
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end
endmodule
