// taps: the single storage line of a convolution input.
//
// A shift register of DEPTH entries. Each accepted input value (enable and
// in_dv both high) enters at position 0 and pushes every older value one place
// further; the oldest value drops out of position DEPTH-1. The whole content is
// visible in parallel on taps_data, one register stage after the value is
// accepted. Its length, DEPTH = image width * (kernel height - 1) + kernel
// width, is exactly what a kernel window needs, so one structure replaces a
// chain of per-line buffers and adds no delay between image lines.
// Reset clears the content to zero.
// One storage line of exactly this length follows the source design; clearing
// it on reset is this design's choice.
module taps #(
  parameter int DATA_W = 8,
  parameter int DEPTH  = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              in_dv,
  input  logic [DATA_W-1:0] in_data,
  output logic [DATA_W-1:0] taps_data [DEPTH]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) taps_data[i] <= '0;
    end else if (enable && in_dv) begin
      taps_data[0] <= in_data;
      for (int i = 1; i < DEPTH; i++) taps_data[i] <= taps_data[i-1];
    end
  end

endmodule
