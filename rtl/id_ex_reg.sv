// id_ex_reg: the ID/EX pipeline register.
//
// Holds one id_ex_t record (see mips_pkg) between two pipeline stages. On a
// rising clock edge it loads d when we is high; a high rst clears it to all
// zeros, which is a bubble (no register or memory write, no branch). Clear
// wins over load, and rst_n (active low, synchronous) clears it on reset.
// The per-register write enable and clear follow the id_ex_we / id_ex_rst
// signals of the hazard-handling core; the field list follows the boxes of
// the schematic. One cycle of latency.
module id_ex_reg
  import mips_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    we,
  input  logic    rst,
  input  id_ex_t  d,
  output id_ex_t  q
);
  always_ff @(posedge clk) begin
    if (!rst_n || rst) q <= '0;
    else if (we)       q <= d;
  end
endmodule
