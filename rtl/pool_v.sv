// pool_v: vertical half of 2x2 max pooling, for C channels in lock step.
//
// Per channel, a line buffer of (KH-1)*IW = IW values holds the previous image
// row as a shift register (Pool1 is the newest value, Pool2 the value one
// image width older). A column/row controller counts accepted values. On
// every value of an odd row (1, 3, ...) the block outputs the larger of the
// value and the one directly above it; values of even rows are only stored.
// The output is therefore a stream of IW values for every second input row.
// Timing: one clock cycle from in_dv to out_dv. Enable low freezes it. The
// row counter wraps at IH so frames may follow back to back.
// The one-line buffer and one-clock stage follow the source design; the
// row/column controller is this design's.
module pool_v
  import cnn_pkg::*;
#(
  parameter int C  = 5,
  parameter int IW = 24,
  parameter int IH = 24
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  logic  in_dv,
  input  data_t in_data  [C],
  output data_t out_data [C],
  output logic  out_dv
);

  localparam int CW = $clog2(IW + 1);
  localparam int RW = $clog2(IH + 1);

  logic [CW-1:0] col;
  logic [RW-1:0] row;
  data_t         line [C][IW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col      <= '0;
      row      <= '0;
      out_dv   <= 1'b0;
      out_data <= '{default: '0};
      line     <= '{default: '0};
    end else if (enable) begin
      out_dv <= in_dv && row[0];
      if (in_dv) begin
        for (int c = 0; c < C; c++) begin
          line[c][0] <= in_data[c];
          for (int i = 1; i < IW; i++) line[c][i] <= line[c][i-1];
          if (row[0]) begin
            out_data[c] <= (in_data[c] > line[c][IW-1]) ? in_data[c] : line[c][IW-1];
          end
        end
        if (int'(col) == IW - 1) begin
          col <= '0;
          row <= (int'(row) == IH - 1) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

endmodule
