// write_output: stores the network's output stream in on-chip memory.
//
// Every accepted output (out_dv and enable high) holds one value per feature
// channel; they are packed into one memory word, channel 0 in the least
// significant bits, and written to consecutive addresses starting at 0.
// After N_OUT words the block pulses frame_done for one clock and returns to
// address 0. clear also returns it to address 0.
// Timing: the word is written on the clock edge that accepts it; frame_done
// is high in the clock after the last write.
// The source design gives only the function; word packing and frame_done are
// this design's choices.
module write_output
  import cnn_pkg::*;
#(
  parameter int N_OUT = 16,
  parameter int C     = 10,
  parameter int AW    = $clog2(N_OUT)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  enable,
  input  data_t                 out_data [C],
  input  logic                  out_dv,
  // memory fabric port (write only)
  output logic                  mem_we,
  output logic [AW-1:0]         mem_addr,
  output logic [C*BITWIDTH-1:0] mem_wdata,
  output logic                  frame_done
);

  always_comb begin
    for (int c = 0; c < C; c++) mem_wdata[c*BITWIDTH +: BITWIDTH] = out_data[c];
  end

  assign mem_we = out_dv && enable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_addr   <= '0;
      frame_done <= 1'b0;
    end else if (clear) begin
      mem_addr   <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (mem_we) begin
        if (int'(mem_addr) == N_OUT - 1) begin
          mem_addr   <= '0;
          frame_done <= 1'b1;
        end else begin
          mem_addr <= mem_addr + 1'b1;
        end
      end
    end
  end

endmodule
