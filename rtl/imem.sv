// imem: instruction memory of the fetch stage.
//
// A word-addressed array of WORDS 32-bit instructions with a combinational
// read port: inst = mem[addr word index] in the same cycle. The word index is
// taken from address bits above bit 1, so with the default 1024 words the
// program starting at 0x00400000 occupies indices 0, 1, 2, ... (upper address
// bits are ignored, i.e. the memory is mirrored). There is no write port; the
// contents come from INIT_FILE (hex, one word per line) when it is given, or
// are written by a testbench. Only the name and the read port come from the
// schematic; the size, the address decoding and the loading are this design's
// choices.
module imem
  import mips_pkg::*;
#(
  parameter int unsigned WORDS     = 1024,
  parameter string       INIT_FILE = ""
) (
  input  word_t addr,
  output word_t inst
);
  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign inst = mem[addr[AW+1:2]];
endmodule
