// tensor_extractor: presents one complete convolution window per clock.
//
// Wraps the neighbourhood extractor (taps line plus window controller) and
// registers its window, so that the dot products see a stable window for a
// full cycle. Timing: two clock cycles from an accepted input value to the
// window it completes (one to store the value in the taps, one to register
// the window), which is the tensor extractor's share of the convolution
// layer latency. The output register only loads a new window when a window is
// complete; out_dv marks those cycles. Enable low freezes the block.
// The two-clock latency follows the source design's timing budget; how the
// two clocks are split is this design's choice.
module tensor_extractor
  import cnn_pkg::*;
#(
  parameter int C  = 1,
  parameter int IW = 28,
  parameter int IH = 28,
  parameter int KW = 5,
  parameter int KH = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  logic  in_dv,
  input  data_t in_data  [C],
  output data_t out_data [C][KH][KW],
  output logic  out_dv
);

  data_t window [C][KH][KW];
  logic  win_dv;

  neigh_extractor #(.C(C), .IW(IW), .IH(IH), .KW(KW), .KH(KH)) u_neigh (
    .clk    (clk),
    .rst_n  (rst_n),
    .enable (enable),
    .in_dv  (in_dv),
    .in_data(in_data),
    .window (window),
    .win_dv (win_dv)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_dv   <= 1'b0;
      out_data <= '{default: '0};
    end else if (enable) begin
      out_dv <= win_dv;
      if (win_dv) out_data <= window;
    end
  end

endmodule
