// tb_write_output: sends two frames of 6 random 3-channel outputs (with
// enable stalls while out_dv is high) to the output writer and checks the
// packed word and address of every write, that held outputs are written only
// once, and the single frame_done pulse after the last word.
`include "tb/tb_macros.svh"
module tb_write_output;
  import cnn_pkg::*;
  localparam int N = 6, C = 3, AW = $clog2(N);
  logic clk = 0, rst_n = 0, clear = 0, enable = 0, out_dv = 0;
  data_t out_data [C];
  logic mem_we, frame_done; logic [AW-1:0] mem_addr; logic [C*BITWIDTH-1:0] mem_wdata;
  logic [C*BITWIDTH-1:0] expw [N];
  int checks = 0, failures = 0, writes = 0, dones = 0;
  always #5 clk = ~clk;
  write_output #(.N_OUT(N), .C(C)) dut (.*);
  always @(posedge clk) begin
    if (mem_we) begin
      if (writes % N < N) begin
        `TB_CHECK(int'(mem_addr) == writes % N, $sformatf("address %0d, expected %0d", mem_addr, writes % N))
        `TB_CHECK(mem_wdata == expw[writes % N], $sformatf("word %h, expected %h", mem_wdata, expw[writes % N]))
      end
      writes <= writes + 1;
    end
    if (frame_done) begin
      `TB_CHECK(writes == N * (dones + 1), $sformatf("frame_done after %0d writes", writes))
      dones <= dones + 1;
    end
  end
  initial begin
    for (int c = 0; c < C; c++) out_data[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < N; i++) begin
        for (int c = 0; c < C; c++) begin
          out_data[c] = data_t'($urandom);
          expw[i][c*BITWIDTH +: BITWIDTH] = out_data[c];
        end
        out_dv = 1;
        enable = 0;
        repeat ($urandom % 3) @(negedge clk);   // held output while stalled
        enable = 1;
        @(negedge clk);
        out_dv = 0;
        repeat ($urandom % 3) @(negedge clk);
      end
      repeat (3) @(negedge clk);
      `TB_CHECK(dones == f + 1, $sformatf("frame_done count %0d", dones))
    end
    // clear in the middle of a frame restarts at address 0
    for (int c = 0; c < C; c++) begin out_data[c] = data_t'(c); expw[0][c*BITWIDTH +: BITWIDTH] = data_t'(c); end
    out_dv = 1; @(negedge clk); out_dv = 0;
    clear = 1; @(negedge clk); clear = 0;
    writes = 2 * N;
    out_dv = 1; @(negedge clk); out_dv = 0;
    @(negedge clk);
    `TB_CHECK(writes == 2 * N + 1, "write after clear missing")
    `TB_FINISH
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end
endmodule
