// on_chip_memory: true dual-port on-chip RAM.
//
// Port A faces the DMA engine driven by the processor system, port B the
// fabric logic (image reader or output writer). Both ports can read and write
// the same array; each has a clock enable, an address, a write enable and a
// registered read: rdata shows the word at the address presented on the
// previous enabled clock edge (read-before-write on the same port) and holds
// while the port is not enabled. When both ports write the same address in
// the same cycle, port B wins. One clock for both ports. The content is not
// reset, as in a block RAM; the DMA fills it before use.
// The source design only says on-chip memory banks sit between the DMA
// engines and the fabric; port behaviour is this design's choice.
module on_chip_memory #(
  parameter int DATA_W = 8,
  parameter int DEPTH  = 784,
  parameter int AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  // port A
  input  logic              a_en,
  input  logic              a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // port B
  input  logic              b_en,
  input  logic              b_we,
  input  logic [AW-1:0]     b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end

endmodule
