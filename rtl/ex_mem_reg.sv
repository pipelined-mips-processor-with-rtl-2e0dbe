// ex_mem_reg: the EX/MEM pipeline register.
//
// Holds one ex_mem_t record (see mips_pkg) between two pipeline stages. On a
// rising clock edge it loads d when we is high; a high rst clears it to all
// zeros, which is a bubble (no register or memory write, no branch). Clear
// wins over load, and rst_n (active low, synchronous) clears it on reset.
// The per-register write enable and clear follow the ex_mem_we / ex_mem_rst
// signals of the hazard-handling core; the field list follows the boxes of
// the schematic. One cycle of latency.
module ex_mem_reg
  import mips_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    we,
  input  logic    rst,
  input  ex_mem_t  d,
  output ex_mem_t  q
);
  always_ff @(posedge clk) begin
    if (!rst_n || rst) q <= '0;
    else if (we)       q <= d;
  end
endmodule
