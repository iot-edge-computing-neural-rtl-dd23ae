// input_layer: entry stage of the network.
//
// Converts an unsigned PIXEL_W-bit pixel into the network's signed
// fixed-point format, where SCALE = 2**(BITWIDTH-1)-1 stands for 1.0: the
// pixel keeps its top BITWIDTH-1 bits and gets a zero sign bit, so black (0)
// maps to 0 and white (255) to about 1.0. The result is registered.
// Timing: one clock cycle from in_dv to out_dv; enable low freezes it.
// The pixel conversion and the one-clock latency are this design's choices;
// the source design only names this stage.
module input_layer
  import cnn_pkg::*;
#(
  parameter int PW = PIXEL_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic          in_dv,
  input  logic [PW-1:0] in_data,
  output data_t         out_data [1],
  output logic          out_dv
);

  data_t conv;

  if (PW >= BITWIDTH - 1) begin : g_trunc
    assign conv = data_t'({1'b0, in_data[PW-1 -: BITWIDTH-1]});
  end else begin : g_ext
    assign conv = data_t'({1'b0, in_data, {(BITWIDTH-1-PW){1'b0}}});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_dv      <= 1'b0;
      out_data[0] <= '0;
    end else if (enable) begin
      out_dv <= in_dv;
      if (in_dv) out_data[0] <= conv;
    end
  end

endmodule
