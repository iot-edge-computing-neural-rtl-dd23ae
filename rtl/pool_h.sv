// pool_h: horizontal half of 2x2 max pooling, for C channels in lock step.
//
// Keeps the first of every two accepted values (Pool1) and, when the second
// arrives (Pool2), outputs the larger of the two. The input row width must be
// even so that pairs never straddle two rows.
// Timing: one clock cycle from the second value's in_dv to out_dv. Enable low
// freezes it.
// Pairwise maximum in one clock follows the source design.
module pool_h
  import cnn_pkg::*;
#(
  parameter int C = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  logic  in_dv,
  input  data_t in_data  [C],
  output data_t out_data [C],
  output logic  out_dv
);

  logic  second;      // next accepted value is the second of a pair
  data_t first [C];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second   <= 1'b0;
      out_dv   <= 1'b0;
      first    <= '{default: '0};
      out_data <= '{default: '0};
    end else if (enable) begin
      out_dv <= in_dv && second;
      if (in_dv) begin
        second <= !second;
        for (int c = 0; c < C; c++) begin
          if (second) out_data[c] <= (in_data[c] > first[c]) ? in_data[c] : first[c];
          else        first[c]    <= in_data[c];
        end
      end
    end
  end

endmodule
