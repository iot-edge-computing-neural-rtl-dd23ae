// tb_read_image: the image reader streams a 40-pixel image from an on-chip
// memory with random enable stalls. Every accepted pixel must be the next
// memory word, in order, none lost or repeated; busy must drop after the last
// one; with enable held high the stream must run at one pixel per clock
// starting two clocks after start.
`include "tb/tb_macros.svh"
module tb_read_image;
  localparam int N = 40, AW = $clog2(N);
  logic clk = 0, rst_n = 0, start = 0, enable = 0;
  logic a_en = 0, a_we = 0; logic [AW-1:0] a_addr = '0; logic [7:0] a_wdata = '0, a_rdata;
  logic mem_en; logic [AW-1:0] mem_addr; logic [7:0] mem_rdata, pix_data; logic pix_dv, busy;
  logic [7:0] img [N];
  int checks = 0, failures = 0, got = 0, cyc = 0, first = 0, lastc = 0;
  bit stalls_on;
  always #5 clk = ~clk;
  on_chip_memory #(.DATA_W(8), .DEPTH(N)) mem (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en(mem_en), .b_we(1'b0), .b_addr(mem_addr), .b_wdata(8'h00), .b_rdata(mem_rdata));
  read_image #(.N_PIX(N)) dut (.clk, .rst_n, .start, .enable, .mem_en, .mem_addr, .mem_rdata,
    .pix_data, .pix_dv, .busy);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (enable && pix_dv) begin
      if (got < N) `TB_CHECK(pix_data == img[got], $sformatf("pixel %0d = %0d, expected %0d", got, pix_data, img[got]))
      if (got == 0) first <= cyc;
      lastc <= cyc;
      got <= got + 1;
    end
  end
  task automatic run(input bit stall);
    int t0;
    got = 0;
    @(negedge clk) begin start = 1; enable = 1; t0 = cyc; end
    @(negedge clk) start = 0;
    repeat (4 * N) begin
      enable = !(stall && $urandom % 3 == 0);
      @(negedge clk);
    end
    enable = 1;
    repeat (3) @(negedge clk);
    `TB_CHECK(got == N, $sformatf("%0d pixels, expected %0d", got, N))
    `TB_CHECK(!busy, "busy after the image")
    if (!stall) begin
      `TB_CHECK(first - t0 == 2, $sformatf("first pixel %0d clocks after start", first - t0))
      `TB_CHECK(lastc - first == N - 1, "not one pixel per clock")
    end
  endtask
  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = 8'($urandom); img[i] = a_wdata;
    end
    @(negedge clk) begin a_we = 0; a_en = 0; rst_n = 1; end
    `TB_CHECK(!busy && !pix_dv, "idle after reset")
    run(1);
    run(0);
    `TB_FINISH
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end
endmodule
