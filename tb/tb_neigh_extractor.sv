// tb_neigh_extractor: streams two 7x6 two-channel frames (with gaps in in_dv and
// enable stalls in the first) through a 3x2 window extractor. Every window
// flagged valid is compared, element by element, with the image stored in the
// testbench; the number of windows per frame must be (7-3+1)*(6-2+1) and,
// with a continuous stream, the flag must follow the completing pixel by 1
// clock(s).
`include "tb/tb_macros.svh"
module tb_neigh_extractor;
  import cnn_pkg::*;
  localparam int C = 2, IW = 7, IH = 6, KW = 3, KH = 2;
  logic clk = 0, rst_n = 0, enable = 0, in_dv = 0;
  data_t in_data [C];
  data_t window [C][KH][KW];
  logic  win_dv;
  int checks = 0, failures = 0, cyc = 0, nwin = 0, last_in = 0, last_out = 0;
  int img [C][IH][IW];
  always #5 clk = ~clk;
  neigh_extractor #(.C(C), .IW(IW), .IH(IH), .KW(KW), .KH(KH)) dut (
    .clk, .rst_n, .enable, .in_dv, .in_data, .window, .win_dv);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (enable && in_dv) last_in <= cyc;
    if (enable && win_dv) begin
      int wy, wx;
      wy = nwin / (IW - KW + 1);
      wx = nwin % (IW - KW + 1);
      for (int c = 0; c < C; c++)
        for (int ky = 0; ky < KH; ky++)
          for (int kx = 0; kx < KW; kx++)
            `TB_CHECK(int'(window[c][ky][kx]) == img[c][wy+ky][wx+kx],
                      $sformatf("window %0d elem (%0d,%0d,%0d) = %0d, expected %0d", nwin, c, ky, kx,
                                window[c][ky][kx], img[c][wy+ky][wx+kx]))
      nwin <= nwin + 1;
      last_out <= cyc;
    end
  end

  task automatic frame(input bit gaps);
    for (int c = 0; c < C; c++)
      for (int y = 0; y < IH; y++)
        for (int x = 0; x < IW; x++) img[c][y][x] = int'(data_t'($urandom));
    nwin = 0;
    for (int p = 0; p < IW * IH; ) begin
      @(negedge clk);
      enable = !(gaps && $urandom % 4 == 0);
      in_dv  = !(gaps && $urandom % 3 == 0);
      for (int c = 0; c < C; c++) in_data[c] = data_t'(img[c][p / IW][p % IW]);
      if (enable && in_dv) p++;
    end
    @(negedge clk) begin in_dv = 0; enable = 1; end
    repeat (5) @(negedge clk);
    `TB_CHECK(nwin == (IW - KW + 1) * (IH - KH + 1), $sformatf("%0d windows", nwin))
    if (!gaps) `TB_CHECK(last_out - last_in == 1, $sformatf("latency %0d", last_out - last_in))
  endtask

  initial begin
    for (int c = 0; c < C; c++) in_data[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(1);
    frame(0);   // counters wrapped: second frame follows without reset
    `TB_FINISH
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end
endmodule
