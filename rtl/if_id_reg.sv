// if_id_reg: the IF/ID pipeline register.
//
// Holds one if_id_t record (see mips_pkg) between two pipeline stages. On a
// rising clock edge it loads d when we is high; a high rst clears it to all
// zeros, which is a bubble (no register or memory write, no branch). Clear
// wins over load, and rst_n (active low, synchronous) clears it on reset.
// The per-register write enable and clear follow the if_id_we / if_id_rst
// signals of the hazard-handling core; the field list follows the boxes of
// the schematic. One cycle of latency.
module if_id_reg
  import mips_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    we,
  input  logic    rst,
  input  if_id_t  d,
  output if_id_t  q
);
  always_ff @(posedge clk) begin
    if (!rst_n || rst) q <= '0;
    else if (we)       q <= d;
  end
endmodule
