// tb_on_chip_memory: random reads and writes on both ports of a 64x12 RAM
// against a software copy: one-clock registered read, read-before-write on
// the same port, port B winning a same-address collision, outputs holding
// while a port is disabled.
`include "tb/tb_macros.svh"
module tb_on_chip_memory;
  localparam int W = 12, D = 64, AW = 6;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [W-1:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [W-1:0] model [D];
  logic [W-1:0] ea, eb;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  on_chip_memory #(.DATA_W(W), .DEPTH(D)) dut (.*);
  initial begin
    // fill through port A
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = W'($urandom); model[i] = a_wdata;
    end
    @(negedge clk) a_we = 0;
    ea = a_rdata; eb = b_rdata;
    for (int n = 0; n < 500; n++) begin
      a_en = $urandom % 4 != 0; b_en = $urandom % 4 != 0;
      a_we = $urandom % 2;      b_we = $urandom % 2;
      a_addr = AW'($urandom % 8); b_addr = AW'($urandom % 8);   // frequent collisions
      a_wdata = W'($urandom);   b_wdata = W'($urandom);
      if (a_en) ea = model[a_addr];
      if (b_en) eb = model[b_addr];
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
      @(negedge clk);
      `TB_CHECK(a_rdata == ea, $sformatf("port A read %h, expected %h", a_rdata, ea))
      `TB_CHECK(b_rdata == eb, $sformatf("port B read %h, expected %h", b_rdata, eb))
    end
    `TB_FINISH
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end
endmodule
