// pc_reg: the program counter of the fetch stage.
//
// A 32-bit register loaded with the next-PC value on every rising clock edge
// while pc_we is high. The hazard unit drops pc_we to stall fetch: while a
// branch or jr waits in ID for its outcome, and once a syscall has stopped the
// program. An active-low synchronous reset loads RESET_PC. The schematic shows
// the PC register and its stall input; the reset value 0x00400000 is the start
// of the text segment used by the programs run on this core, and the reset
// style is this design's choice.
module pc_reg
  import mips_pkg::*;
#(
  parameter word_t RESET_PC = 32'h0040_0000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  pc_we,    // 0 = stall
  input  word_t pc_next,
  output word_t pc
);
  always_ff @(posedge clk) begin
    if (!rst_n)     pc <= RESET_PC;
    else if (pc_we) pc <= pc_next;
  end
endmodule
