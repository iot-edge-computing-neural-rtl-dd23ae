// tb_workload_digits: the evaluation workload of the design, six 28x28 digit
// images (1, 3, 4, 5, 7, 9), run one after another through the full system
// at its default size. Each digit is drawn as thick seven-segment strokes
// (white on black, with light noise in the background) instead of a dataset
// image. For every digit the 4x4x10 feature words read back from on-chip
// memory 2 are compared with the reference model, and the frame time must be
// 802 clocks (about 62,000 frames per second at 50 MHz). The network runs
// with placeholder weights, so the features are not a classification.
`include "tb/tb_macros.svh"
module tb_workload_digits;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;

  localparam int NPIX = IMG_W * IMG_H, NOUT = OUT_W * OUT_H;
  localparam int EXPECT_CYC = 3 + NPIX + (INPUT_LAT + 2 * CONV_LAT + 2 * POOL_LAT) + 2;

  logic clk = 0, rst_n = 0, start = 0, finish_irq;
  logic ocm1_en = 0, ocm1_we = 0; logic [9:0] ocm1_addr = '0; logic [7:0] ocm1_wdata = '0, ocm1_rdata;
  logic ocm2_en = 0, ocm2_we = 0; logic [3:0] ocm2_addr = '0;
  logic [C2*BITWIDTH-1:0] ocm2_wdata = '0, ocm2_rdata;
  int checks = 0, failures = 0, cyc = 0, frames = 0;
  fmap_t img, ref_out;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fpga_system dut (.*);

  // segments a b c d e f g of a seven-segment digit
  function automatic logic [6:0] segs(int d);
    case (d)
      1: return 7'b0110000;
      3: return 7'b1111001;
      4: return 7'b0110011;
      5: return 7'b1011011;
      7: return 7'b1110000;
      9: return 7'b1111011;
      default: return 7'b0000000;
    endcase
  endfunction

  function automatic bit on_seg(logic [6:0] s, int y, int x);
    // box x 8..19, y 4..23, strokes 3 pixels wide
    bit top = y >= 4 && y <= 6, mid = y >= 13 && y <= 15, bot = y >= 21 && y <= 23;
    bit left = x >= 8 && x <= 10, right = x >= 17 && x <= 19;
    bit inx = x >= 8 && x <= 19, upper = y >= 4 && y <= 15, lower = y >= 13 && y <= 23;
    return (s[6] && top && inx) || (s[5] && right && upper) || (s[4] && right && lower) ||
           (s[3] && bot && inx) || (s[2] && left && lower) || (s[1] && left && upper) ||
           (s[0] && mid && inx);
  endfunction

  task automatic digit(input int d);
    int t0;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++)
        img[0][y][x] = on_seg(segs(d), y, x) ? 255 - int'($urandom % 16) : int'($urandom % 24);
    cnn_ref(IMG_W, IMG_H, K, C1, C2, img, ref_out);
    for (int p = 0; p < NPIX; p++) begin
      @(negedge clk);
      ocm1_en = 1; ocm1_we = 1; ocm1_addr = 10'(p); ocm1_wdata = 8'(img[0][p / IMG_W][p % IMG_W]);
    end
    @(negedge clk) begin ocm1_en = 0; ocm1_we = 0; start = 1; end
    @(posedge clk) t0 = cyc;
    @(negedge clk) start = 0;
    while (!finish_irq && cyc - t0 < 3 * NPIX) @(posedge clk);
    `TB_CHECK(finish_irq && cyc - t0 == EXPECT_CYC,
              $sformatf("digit %0d: %0d clocks to interrupt, expected %0d", d, cyc - t0, EXPECT_CYC))
    for (int a = 0; a < NOUT; a++) begin
      @(negedge clk) begin ocm2_en = 1; ocm2_addr = 4'(a); end
      @(negedge clk);
      for (int c = 0; c < C2; c++)
        `TB_CHECK(int'($signed(ocm2_rdata[c*BITWIDTH +: BITWIDTH])) == ref_out[c][a / OUT_W][a % OUT_W],
                  $sformatf("digit %0d word %0d ch%0d", d, a, c))
    end
    ocm2_en = 0;
    frames++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    digit(1); digit(3); digit(4); digit(5); digit(7); digit(9);
    `TB_CHECK(frames == 6, "not all digits processed")
    $display("count: digits=%0d, %0d clocks per frame", frames, EXPECT_CYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
