// tb_fpga_ctrl: walks the controller through two frames: start edge, one
// clock of network reset and writer clear, rd_start pulse with enable, enable
// held until frame_done, then finish_irq until the next start edge. A start
// level held high must not retrigger, and a start during a run is ignored.
`include "tb/tb_macros.svh"
module tb_fpga_ctrl;
  logic clk = 0, rst_n = 0, start = 0, frame_done = 0;
  logic cnn_rst_n, wr_clear, rd_start, enable, finish_irq;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  fpga_ctrl dut (.*);
  task automatic frame(input int run_len);
    start = 1;
    @(negedge clk);
    `TB_CHECK(!cnn_rst_n && wr_clear && !finish_irq, "CLEAR: network not held in reset")
    @(negedge clk);
    `TB_CHECK(cnn_rst_n && rd_start && enable, "RUN: no rd_start / enable")
    start = 0;
    repeat (run_len) begin
      @(negedge clk);
      `TB_CHECK(enable && !rd_start && !finish_irq && cnn_rst_n, "RUN: outputs wrong")
    end
    start = 1;   // ignored during a run
    @(negedge clk) start = 0;
    `TB_CHECK(enable && cnn_rst_n, "start during run was not ignored")
    frame_done = 1;
    @(negedge clk) frame_done = 0;
    `TB_CHECK(finish_irq && !enable, "DONE: no interrupt")
    repeat (5) @(negedge clk);
    `TB_CHECK(finish_irq && !enable && cnn_rst_n, "interrupt not held")
  endtask
  initial begin
    repeat (2) @(negedge clk);
    `TB_CHECK(!finish_irq && !enable, "reset state")
    start = 1;   // level already high when reset ends: one frame only
    rst_n = 1;
    frame(10);
    frame(3);
    `TB_FINISH
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end
endmodule
