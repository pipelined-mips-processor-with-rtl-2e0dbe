// dmem: data memory of the MEM stage.
//
// A word-addressed array of WORDS 32-bit words. Reads are combinational
// (rdata follows addr in the same cycle, as the DMEM Out line feeds the
// MEM/WB register directly in the schematic); a write of wdata happens on the
// rising clock edge when we is high. The word index is address bits above
// bit 1, so the data segment at 0x10010000 starts at index 0 and upper address
// bits are ignored. Only word accesses (lw/sw) exist. The size and decoding
// are this design's choices. There is no reset: the contents are whatever
// was last written (a testbench preloads the data segment).
module dmem
  import mips_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic  clk,
  input  logic  we,
  input  word_t addr,
  input  word_t wdata,
  output word_t rdata
);
  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];
endmodule
