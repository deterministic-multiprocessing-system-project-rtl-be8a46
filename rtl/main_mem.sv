// main_mem: block-RAM main memory of the deterministic multiprocessing
// system.
//
// 2**AW bytes of synchronous dual-port RAM. Port A (read/write) serves the
// memory controller; port B (read only) serves the graphics device, which
// scans a region of this memory as its frame buffer. Both ports register
// their read data: the data for an address presented with the enable high in
// cycle t is valid in cycle t+1. A write on port A returns the old contents
// on `a_rdata` (read-first). The contents start at zero.
//
// The description allows main memory to be built from spare block RAMs
// instead of the board's external ZBT SRAM; this model takes that option. The
// 64 KiB size, the second port and the read-first behaviour are this
// design's choices.
module main_mem
  import dmp_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  // port A: memory controller
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  data_t         a_wdata,
  output data_t         a_rdata,
  // port B: frame buffer reads
  input  logic          b_en,
  input  logic [AW-1:0] b_addr,
  output data_t         b_rdata
);

  data_t mem [2**AW];

  initial begin
    for (int unsigned k = 0; k < 2**AW; k++) mem[k] = '0;
  end

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
