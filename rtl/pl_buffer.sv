// pl_buffer: the on-chip PL buffer.
//
// Holds original, frontal and contribution matrices as pages of one tile
// each (SA_N x SA_N elements, row-major). It is a single-port memory one page
// wide: a read returns a whole tile one cycle after the request, a write
// stores a whole tile. Keeping the matrices on chip and addressing them
// through the page table follows the published design; the page width, the
// single port and the one-cycle read latency are this design's choices.
module pl_buffer
  import mf_pkg::*;
(
  input  logic               clk,
  input  logic               en,
  input  logic               we,
  input  logic [PAGE_W-1:0]  page,
  input  tile_t              wdata,
  output tile_t              rdata
);

  tile_t mem [NUM_PAGES];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[page] <= wdata;
      else    rdata     <= mem[page];
    end
  end

endmodule
