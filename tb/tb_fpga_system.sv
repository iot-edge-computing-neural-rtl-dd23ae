// tb_fpga_system: the whole fabric system at its default size. For each of
// three frames the testbench plays the DMA engines and the processor: it
// writes a 28x28 image into on-chip memory 1, raises start, waits for
// finish_irq, reads the 4x4 result words from on-chip memory 2 and compares
// every feature with the reference model. The start-to-interrupt time must
// be 802 clocks (3 to clear and start the reader, 784 pixels, 13 network
// latency, 2 to write and signal). It also counts, per frame, the network
// reset, the valid convolution windows and pooling results of both layers and
// the interrupt, and fails if any of them never happened or came out wrong.
// Further mechanisms are counted and must each occur: convolution outputs in
// each of the three activation segments (linear, flattened, saturated),
// biases cut by the clamp, and a start level held high across a whole frame,
// which must not begin a second frame. The frames are random pixels, a solid
// bar (with start held) and a stripe pattern that follows the sign pattern of
// the weight formula; only the stripes drive layer 2 into saturation.
`include "tb/tb_macros.svh"
module tb_fpga_system;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;

  localparam int NPIX = IMG_W * IMG_H, NOUT = OUT_W * OUT_H;
  localparam int EXPECT_CYC = 3 + NPIX + (INPUT_LAT + 2 * CONV_LAT + 2 * POOL_LAT) + 2;

  logic clk = 0, rst_n = 0, start = 0, finish_irq;
  logic ocm1_en = 0, ocm1_we = 0; logic [9:0] ocm1_addr = '0; logic [7:0] ocm1_wdata = '0, ocm1_rdata;
  logic ocm2_en = 0, ocm2_we = 0; logic [3:0] ocm2_addr = '0;
  logic [C2*BITWIDTH-1:0] ocm2_wdata = '0, ocm2_rdata;
  int checks = 0, failures = 0, cyc = 0;
  int n_reset = 0, n_conv1 = 0, n_pool1 = 0, n_conv2 = 0, n_pool2 = 0, n_irq = 0;
  int n_lin = 0, n_mid = 0, n_sat = 0, n_clamped = 0, n_held = 0;
  fmap_t img, ref_out;

  always #5 clk = ~clk;

  fpga_system dut (.*);

  // activation segment of one feature value
  function automatic int seg(input data_t v);
    int a = (int'(v) < 0) ? -int'(v) : int'(v);
    return (a <= 63) ? 0 : (a < SCALE) ? 1 : 2;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.enable && dut.u_cnn.l1_dv)
      for (int c = 0; c < C1; c++)
        case (seg(dut.u_cnn.l1_data[c])) 0: n_lin++; 1: n_mid++; default: n_sat++; endcase
    if (dut.enable && dut.u_cnn.l2_dv)
      for (int c = 0; c < C2; c++)
        case (seg(dut.u_cnn.l2_data[c])) 0: n_lin++; 1: n_mid++; default: n_sat++; endcase
    if (dut.wr_clear && !dut.cnn_rst_n) n_reset <= n_reset + 1;
    if (dut.enable) begin
      if (dut.u_cnn.l1_dv)         n_conv1 <= n_conv1 + 1;
      if (dut.u_cnn.p1_dv)         n_pool1 <= n_pool1 + 1;
      if (dut.u_cnn.l2_dv)         n_conv2 <= n_conv2 + 1;
      if (dut.u_cnn.out_dv)        n_pool2 <= n_pool2 + 1;
    end
  end

  task automatic frame(input int kind, input bit hold_start);
    int t0, c0, p0, c2, p2;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++)
        case (kind)
          0: img[0][y][x] = ($urandom % 3 == 0) ? 0 : int'($urandom % 256);
          1: img[0][y][x] = (x > 8 && x < 20 && y > 4 && y < 24) ? 255 : 0;   // bar-like digit
          // stripes that follow the sign pattern of the weight formula, so
          // that windows line up with kernels and layer 2 saturates
          default: img[0][y][x] = (((((13 * y + 7 * x) % 31) ** 2 + 3 * ((13 * y + 7 * x) % 31)) % 31) >= 15)
                                  ? 255 : 0;
        endcase
    cnn_ref(IMG_W, IMG_H, K, C1, C2, img, ref_out);
    // DMA 1: image into on-chip memory 1
    for (int p = 0; p < NPIX; p++) begin
      @(negedge clk);
      ocm1_en = 1; ocm1_we = 1; ocm1_addr = 10'(p); ocm1_wdata = 8'(img[0][p / IMG_W][p % IMG_W]);
    end
    @(negedge clk) begin ocm1_en = 0; ocm1_we = 0; end
    c0 = n_conv1; p0 = n_pool1; c2 = n_conv2; p2 = n_pool2;
    // start CNN
    start = 1;
    @(posedge clk) t0 = cyc;
    @(negedge clk) if (!hold_start) start = 0;
    `TB_CHECK(!finish_irq, "interrupt not cleared by start")
    while (!finish_irq && cyc - t0 < 3 * NPIX) @(posedge clk);
    `TB_CHECK(finish_irq, "no interrupt")
    `TB_CHECK(cyc - t0 == EXPECT_CYC, $sformatf("start to interrupt %0d clocks, expected %0d", cyc - t0, EXPECT_CYC))
    n_irq++;
    if (hold_start) begin
      // start is still high: the controller must stay done, not begin again
      t0 = n_reset;
      repeat (50) @(posedge clk);
      `TB_CHECK(finish_irq && n_reset == t0, "held start began another frame")
      if (finish_irq && n_reset == t0) n_held++;
      @(negedge clk) start = 0;
    end
    `TB_CHECK(n_conv1 - c0 == 24 * 24 && n_pool1 - p0 == 12 * 12 && n_conv2 - c2 == 8 * 8 && n_pool2 - p2 == NOUT,
              $sformatf("layer output counts %0d %0d %0d %0d", n_conv1 - c0, n_pool1 - p0, n_conv2 - c2, n_pool2 - p2))
    // DMA 2: results out of on-chip memory 2
    for (int a = 0; a < NOUT; a++) begin
      @(negedge clk) begin ocm2_en = 1; ocm2_addr = 4'(a); end
      @(negedge clk);
      for (int c = 0; c < C2; c++)
        `TB_CHECK(int'($signed(ocm2_rdata[c*BITWIDTH +: BITWIDTH])) == ref_out[c][a / OUT_W][a % OUT_W],
                  $sformatf("frame %0d word %0d ch%0d = %0d, expected %0d", kind, a, c,
                            $signed(ocm2_rdata[c*BITWIDTH +: BITWIDTH]), ref_out[c][a / OUT_W][a % OUT_W]))
    end
    ocm2_en = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 1; l <= 2; l++)
      for (int o = 0; o < ((l == 1) ? C1 : C2); o++)
        if (bias_raw(l, o) != bias(l, o)) n_clamped++;
    frame(0, 0);
    frame(1, 1);
    frame(2, 0);
    `TB_CHECK(n_reset == 3, $sformatf("network reset %0d times, expected 3", n_reset))
    `TB_CHECK(n_irq == 3, "interrupts missing")
    `TB_CHECK(n_lin > 0 && n_mid > 0 && n_sat > 0,
              $sformatf("activation segments linear=%0d flat=%0d saturated=%0d", n_lin, n_mid, n_sat))
    `TB_CHECK(n_clamped > 0, "no bias was clamped")
    `TB_CHECK(n_held == 1, "held start not exercised")
    $display("count: resets=%0d conv1=%0d pool1=%0d conv2=%0d pool2=%0d irq=%0d",
             n_reset, n_conv1, n_pool1, n_conv2, n_pool2, n_irq);
    $display("count: tanh linear=%0d flat=%0d saturated=%0d clamped_biases=%0d held_start=%0d",
             n_lin, n_mid, n_sat, n_clamped, n_held);
    `TB_FINISH
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    `TB_FINISH
  end
endmodule
