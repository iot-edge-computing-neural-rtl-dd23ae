// neigh_extractor: neighbourhood extraction for a multi-channel pixel stream.
//
// One taps line per input channel stores the last IW*(KH-1)+KW values of the
// stream. A controller counts the column and row of every accepted value; a
// value completes a KHxKW window when its column is at least KW-1 and its row
// at least KH-1 (windows that would wrap around the image edge are not
// produced: the convolution is "valid", without padding). The window is read
// straight out of the taps: element (ky,kx) sits IW*(KH-1-ky) + (KW-1-kx)
// places behind the newest value.
// Timing: window and win_dv appear one clock after the value that completes
// the window was accepted. Nothing moves while enable is low. The counters
// wrap at the end of the image, so frames may follow back to back; reset
// restarts the frame.
// Counting the received values to gate the window follows the source design;
// the column/row form of the counter and the wrap for back-to-back frames are
// this design's choices.
module neigh_extractor
  import cnn_pkg::*;
#(
  parameter int C  = 1,    // channels
  parameter int IW = 28,   // image width
  parameter int IH = 28,   // image height
  parameter int KW = 5,    // kernel width
  parameter int KH = 5     // kernel height
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  logic  in_dv,
  input  data_t in_data [C],
  output data_t window  [C][KH][KW],
  output logic  win_dv
);

  localparam int DEPTH = IW * (KH - 1) + KW;
  localparam int CW = $clog2(IW + 1);
  localparam int RW = $clog2(IH + 1);

  logic [CW-1:0] col;
  logic [RW-1:0] row;

  // controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col    <= '0;
      row    <= '0;
      win_dv <= 1'b0;
    end else if (enable) begin
      win_dv <= in_dv && (int'(col) >= KW - 1) && (int'(row) >= KH - 1);
      if (in_dv) begin
        if (int'(col) == IW - 1) begin
          col <= '0;
          row <= (int'(row) == IH - 1) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  for (genvar c = 0; c < C; c++) begin : g_ch
    logic [BITWIDTH-1:0] line [DEPTH];

    taps #(.DATA_W(BITWIDTH), .DEPTH(DEPTH)) u_taps (
      .clk      (clk),
      .rst_n    (rst_n),
      .enable   (enable),
      .in_dv    (in_dv),
      .in_data  (in_data[c]),
      .taps_data(line)
    );

    for (genvar ky = 0; ky < KH; ky++) begin : g_row
      for (genvar kx = 0; kx < KW; kx++) begin : g_col
        assign window[c][ky][kx] = data_t'(line[IW * (KH - 1 - ky) + (KW - 1 - kx)]);
      end
    end
  end

endmodule
