// fpga_ctrl: start / finish control of the network on the fabric.
//
// The processor raises start (a level written through the lightweight bridge)
// after the image is in on-chip memory 1; a rising edge is a request. The
// controller then
//   CLEAR : holds the network in reset for one clock (a new frame always
//           starts from reset) and clears the output writer,
//   RUN   : pulses rd_start and keeps the network enabled until the output
//           writer reports the last word (frame_done),
//   DONE  : raises finish_irq, the end-of-processing interrupt, until the
//           next start request, which begins a new frame.
// cnn_rst_n and the other outputs are registers.
// Start and finish signals between processor and fabric follow the source
// design; edge detection, the one-clock reset and the held interrupt are this
// design's choices.
module fpga_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic frame_done,
  output logic cnn_rst_n,
  output logic wr_clear,
  output logic rd_start,
  output logic enable,
  output logic finish_irq
);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_RUN, S_DONE} state_t;
  state_t state;
  logic   start_q;
  logic   start_req;

  assign start_req = start && !start_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      start_q    <= 1'b0;
      cnn_rst_n  <= 1'b0;
      wr_clear   <= 1'b0;
      rd_start   <= 1'b0;
      enable     <= 1'b0;
      finish_irq <= 1'b0;
    end else begin
      start_q   <= start;
      cnn_rst_n <= 1'b1;
      wr_clear  <= 1'b0;
      rd_start  <= 1'b0;
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start_req) begin
            state      <= S_CLEAR;
            cnn_rst_n  <= 1'b0;
            wr_clear   <= 1'b1;
            finish_irq <= 1'b0;
          end
        end
        S_CLEAR: begin
          state    <= S_RUN;
          rd_start <= 1'b1;
          enable   <= 1'b1;
        end
        S_RUN: begin
          if (frame_done) begin
            state      <= S_DONE;
            enable     <= 1'b0;
            finish_irq <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
