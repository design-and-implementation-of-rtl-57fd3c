// edge_sram: single-port synchronous SRAM holding the edge map of the last
// frame, 2 words of 32 bits per 8x8 block. Default 512 x 32 bits (9-bit
// address, as in the thesis' memory interface), enough for 256 blocks.
// Control is active low chip select (cs_n) and active high write enable (we);
// a read returns the word on rdata the cycle after the address is presented,
// and rdata holds its value while the SRAM is not selected. The depth follows
// the 9-bit address of the thesis; the split data bus (the thesis uses one
// bidirectional bus), control polarities and read latency are this design's.
module edge_sram #(
  parameter int DEPTH  = 512,
  parameter int WIDTH  = 32,
  parameter int ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              cs_n,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!cs_n) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
