// tb_input_layer: presents all 256 pixel values with random in_dv and enable
// and checks the registered signed output (pixel / 2) and its valid flag.
`include "tb/tb_macros.svh"
module tb_input_layer;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, in_dv = 0;
  logic [7:0] in_data = '0;
  data_t out_data [1];
  logic out_dv;
  int checks = 0, failures = 0, last = 0;
  always #5 clk = ~clk;
  input_layer dut (.clk, .rst_n, .enable, .in_dv, .in_data, .out_data, .out_dv);
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    `TB_CHECK(!out_dv && out_data[0] == 0, "reset state")
    for (int p = 0; p < 256; ) begin
      logic pdv, pen;
      pdv = out_dv;
      enable = $urandom % 4 != 0;
      in_dv = $urandom % 3 != 0;
      in_data = 8'(p);
      pen = enable;
      @(negedge clk);
      if (pen) begin
        `TB_CHECK(out_dv == in_dv, "out_dv does not follow in_dv")
        if (in_dv) begin
          `TB_CHECK(int'(out_data[0]) == p / 2, $sformatf("pixel %0d -> %0d", p, out_data[0]))
          last = p / 2;
          p++;
        end
      end else begin
        `TB_CHECK(out_dv == pdv && int'(out_data[0]) == last, "changed while disabled")
      end
    end
    `TB_FINISH
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end
endmodule
