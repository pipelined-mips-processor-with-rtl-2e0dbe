// reg_file: the 32 x 32-bit general-purpose register file of the ID stage.
//
// Two combinational read ports (Read Reg1/Read Data1 for rs, Read Reg2/Read
// Data2 for rt) and one write port (Write Reg, Write Data, Write EN) driven
// from the write-back stage, as in the schematic. Register $0 always reads 0
// and ignores writes. A write happens on the rising clock edge; a read of the
// register being written in the same cycle returns the new value (write-
// through), so an instruction in ID sees the result of the instruction three
// places ahead of it in WB. That write-through and the synchronous clear of
// all registers on reset (active-low rst_n) are this design's choices.
module reg_file
  import mips_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  reg_addr_t raddr1,
  input  reg_addr_t raddr2,
  output word_t     rdata1,
  output word_t     rdata2,
  input  logic      we,
  input  reg_addr_t waddr,
  input  word_t     wdata
);
  word_t regs [32];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    if (raddr1 == '0)                    rdata1 = '0;
    else if (we && waddr == raddr1)      rdata1 = wdata;
    else                                 rdata1 = regs[raddr1];
    if (raddr2 == '0)                    rdata2 = '0;
    else if (we && waddr == raddr2)      rdata2 = wdata;
    else                                 rdata2 = regs[raddr2];
  end
endmodule
