// tb_cnn_process: end-to-end check of the streaming network at its default
// size (28x28 image, 5 and 10 kernels of 5x5). Three frames are streamed:
// one with random gaps in in_dv and random enable stalls, one continuous, and
// one continuous white image. Every output is compared with the reference
// model, the output count must be 4x4 per frame, and the latency from the last
// accepted pixel to the last output must be 13 clocks.
`include "tb/tb_macros.svh"
module tb_cnn_process;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;

  localparam int NOUT = OUT_W * OUT_H;

  logic   clk = 0, rst_n = 0, enable = 0, in_dv = 0;
  pixel_t in_data = '0;
  data_t  out_data [C2];
  logic   out_dv;
  int     checks = 0, failures = 0;
  int     cyc = 0, last_in = 0, last_out = 0, nout = 0, stalls = 0, gaps = 0;
  fmap_t  img, ref_out;

  always #5 clk = ~clk;

  cnn_process dut (.clk, .rst_n, .enable, .in_data, .in_dv, .out_data, .out_dv);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (enable && in_dv) last_in <= cyc;
    if (enable && out_dv) begin
      int oy, ox;
      oy = nout / OUT_W;
      ox = nout % OUT_W;
      if (nout < NOUT)
        for (int c = 0; c < C2; c++)
          `TB_CHECK(int'(out_data[c]) == ref_out[c][oy][ox],
                    $sformatf("out (%0d,%0d) ch%0d = %0d, expected %0d", oy, ox, c,
                              out_data[c], ref_out[c][oy][ox]))
      nout <= nout + 1;
      last_out <= cyc;
    end
  end

  task automatic run_frame(input int mode);   // 0: gaps and stalls, 1: continuous, 2: white
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++)
        img[0][y][x] = (mode == 2) ? 255 : (($urandom % 3 == 0) ? 0 : int'($urandom % 256));
    cnn_ref(IMG_W, IMG_H, K, C1, C2, img, ref_out);
    // a new frame starts from reset
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    nout = 0;
    enable = 1;
    for (int p = 0; p < IMG_W * IMG_H; ) begin
      @(negedge clk);
      enable = 1;
      if (mode == 0 && $urandom % 5 == 0) begin enable = 0; stalls++; end
      if (mode == 0 && $urandom % 4 == 0) begin
        in_dv = 0; gaps++;
        in_data = pixel_t'($urandom);
      end else begin
        in_dv = 1;
        in_data = pixel_t'(img[0][p / IMG_W][p % IMG_W]);
        if (enable) p++;
      end
    end
    @(negedge clk) begin in_dv = 0; enable = 1; end
    repeat (40) @(negedge clk);
    `TB_CHECK(nout == NOUT, $sformatf("frame %0d gave %0d outputs, expected %0d", mode, nout, NOUT))
    if (mode != 0)
      `TB_CHECK(last_out - last_in == INPUT_LAT + 2 * CONV_LAT + 2 * POOL_LAT,
                $sformatf("latency %0d, expected 13", last_out - last_in))
  endtask

  initial begin
    repeat (3) @(negedge clk);
    run_frame(0);
    run_frame(1);
    run_frame(2);
    `TB_CHECK(stalls > 0 && gaps > 0, "no enable stall or input gap was exercised")
    $display("stalls=%0d gaps=%0d", stalls, gaps);
    `TB_FINISH
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    `TB_FINISH
  end
endmodule
