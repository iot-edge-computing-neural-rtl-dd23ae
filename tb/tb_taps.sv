// tb_taps: pushes random values with random in_dv and enable into a 7-deep
// taps line and compares the parallel content with a software queue after
// every clock; also checks that reset clears the line.
`include "tb/tb_macros.svh"
module tb_taps;
  localparam int W = 8, D = 7;
  logic clk = 0, rst_n = 0, enable = 0, in_dv = 0;
  logic [W-1:0] in_data = '0;
  logic [W-1:0] taps_data [D];
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  taps #(.DATA_W(W), .DEPTH(D)) dut (.clk, .rst_n, .enable, .in_dv, .in_data, .taps_data);
  initial begin
    for (int i = 0; i < D; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < D; i++) `TB_CHECK(taps_data[i] == 0, "not cleared by reset")
    for (int n = 0; n < 300; n++) begin
      enable = ($urandom % 4) != 0;
      in_dv  = ($urandom % 3) != 0;
      in_data = W'($urandom);
      @(posedge clk);
      if (enable && in_dv) begin
        for (int i = D - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = in_data;
      end
      @(negedge clk);
      for (int i = 0; i < D; i++)
        `TB_CHECK(taps_data[i] == model[i], $sformatf("tap %0d = %0d, expected %0d", i, taps_data[i], model[i]))
    end
    `TB_FINISH
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end
endmodule
