// fpga_system: fabric side of the edge-computing CNN system.
//
// The processor copies an image into on-chip memory 1 through a DMA engine
// (port ocm1_*), then raises start. The controller clears the network, the
// image reader streams the 28x28 pixels, one per clock, through the network,
// and the output writer stores the 4x4 output positions, one word of C2
// features each, in on-chip memory 2. finish_irq then tells the processor
// that a second DMA engine may copy the result out (port ocm2_*). The DMA
// engines, bridges and processor are outside this module; their memory ports
// are brought out as ports.
// Timing (default sizes, 50 MHz design clock): start edge to finish_irq is
// about 2 (control) + 1 (memory read) + 784 (pixels) + 13 (network latency)
// + 2 (write, control) clocks, a little over 800 clocks.
// The block structure follows the source design's fabric system; memory
// widths, port details and the frame time are this design's.
module fpga_system
  import cnn_pkg::*;
#(
  parameter int IW  = IMG_W,
  parameter int IH  = IMG_H,
  parameter int NC2 = C2,
  parameter int OW  = ((IW - K + 1) / 2 - K + 1) / 2,   // output width
  parameter int OH  = ((IH - K + 1) / 2 - K + 1) / 2,   // output height
  parameter int A1W = $clog2(IW * IH),
  parameter int A2W = $clog2(OW * OH),
  parameter int OUT_W_BITS = NC2 * BITWIDTH
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // start / finish signals to and from the processor
  input  logic                  start,
  output logic                  finish_irq,
  // on-chip memory 1, DMA side (image in)
  input  logic                  ocm1_en,
  input  logic                  ocm1_we,
  input  logic [A1W-1:0]        ocm1_addr,
  input  logic [PIXEL_W-1:0]    ocm1_wdata,
  output logic [PIXEL_W-1:0]    ocm1_rdata,
  // on-chip memory 2, DMA side (features out)
  input  logic                  ocm2_en,
  input  logic                  ocm2_we,
  input  logic [A2W-1:0]        ocm2_addr,
  input  logic [OUT_W_BITS-1:0] ocm2_wdata,
  output logic [OUT_W_BITS-1:0] ocm2_rdata
);

  logic cnn_rst_n, wr_clear, rd_start, enable, frame_done;

  // image path
  logic           rd_en;
  logic [A1W-1:0] rd_addr;
  pixel_t         rd_data, pix_data;
  logic           pix_dv, rd_busy;

  // feature path
  data_t                 feat [NC2];
  logic                  feat_dv;
  logic                  wr_we;
  logic [A2W-1:0]        wr_addr;
  logic [OUT_W_BITS-1:0] wr_data;

  fpga_ctrl u_ctrl (
    .clk, .rst_n, .start, .frame_done,
    .cnn_rst_n, .wr_clear, .rd_start, .enable, .finish_irq
  );

  on_chip_memory #(.DATA_W(PIXEL_W), .DEPTH(IW * IH), .AW(A1W)) u_ocm1 (
    .clk,
    .a_en(ocm1_en), .a_we(ocm1_we), .a_addr(ocm1_addr), .a_wdata(ocm1_wdata), .a_rdata(ocm1_rdata),
    .b_en(rd_en), .b_we(1'b0), .b_addr(rd_addr), .b_wdata('0), .b_rdata(rd_data)
  );

  read_image #(.N_PIX(IW * IH), .PIXEL_W(PIXEL_W), .AW(A1W)) u_read (
    .clk, .rst_n, .start(rd_start), .enable,
    .mem_en(rd_en), .mem_addr(rd_addr), .mem_rdata(rd_data),
    .pix_data, .pix_dv, .busy(rd_busy)
  );

  cnn_process #(.IW(IW), .IH(IH), .NC2(NC2)) u_cnn (
    .clk, .rst_n(cnn_rst_n), .enable,
    .in_data(pix_data), .in_dv(pix_dv),
    .out_data(feat), .out_dv(feat_dv)
  );

  write_output #(.N_OUT(OW * OH), .C(NC2), .AW(A2W)) u_write (
    .clk, .rst_n, .clear(wr_clear), .enable,
    .out_data(feat), .out_dv(feat_dv),
    .mem_we(wr_we), .mem_addr(wr_addr), .mem_wdata(wr_data), .frame_done
  );

  on_chip_memory #(.DATA_W(OUT_W_BITS), .DEPTH(OW * OH), .AW(A2W)) u_ocm2 (
    .clk,
    .a_en(ocm2_en), .a_we(ocm2_we), .a_addr(ocm2_addr), .a_wdata(ocm2_wdata), .a_rdata(ocm2_rdata),
    .b_en(wr_we), .b_we(wr_we), .b_addr(wr_addr), .b_wdata(wr_data), .b_rdata()
  );

  // The reader must have delivered the whole image before the last output word.
  always_ff @(posedge clk) begin
    if (frame_done) assert (!rd_busy) else $error("frame ended while the image was still being read");
  end

endmodule
