// read_image: streams an image out of on-chip memory into the network.
//
// A pulse on start sets the address counter to 0. While enable is high the
// block presents one address per clock to the memory's fabric port (mem_en
// follows enable, so the memory output holds during a stall) and raises
// pix_dv one clock later, when the memory returns the pixel on mem_rdata.
// After N_PIX addresses it stops; busy stays high until the last pixel has
// been handed over. With enable low nothing advances and pix_dv and the pixel
// hold their values, so no pixel is lost or repeated.
// Timing: first pixel valid two clocks after start (one to load the counter,
// one memory read), then one pixel per enabled clock.
// The source design gives only the function; addressing and stall behaviour
// are this design's choices.
module read_image #(
  parameter int N_PIX   = 784,
  parameter int PIXEL_W = 8,
  parameter int AW      = $clog2(N_PIX)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               enable,
  // memory fabric port (read only)
  output logic               mem_en,
  output logic [AW-1:0]      mem_addr,
  input  logic [PIXEL_W-1:0] mem_rdata,
  // pixel stream
  output logic [PIXEL_W-1:0] pix_data,
  output logic               pix_dv,
  output logic               busy
);

  logic active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_addr <= '0;
      active   <= 1'b0;
      pix_dv   <= 1'b0;
    end else if (start) begin
      mem_addr <= '0;
      active   <= 1'b1;
      pix_dv   <= 1'b0;
    end else if (enable) begin
      pix_dv <= active;
      if (active) begin
        if (int'(mem_addr) == N_PIX - 1) active <= 1'b0;
        else                             mem_addr <= mem_addr + 1'b1;
      end
    end
  end

  assign mem_en   = enable && active;
  assign pix_data = mem_rdata;
  assign busy     = active || pix_dv;

endmodule
