// forward_unit: operand forwarding for the EX stage.
//
// Compares the source registers (rs, rt) of the instruction in ID/EX with the
// destination of the instructions in EX/MEM and MEM/WB. When an older
// instruction that writes a register other than $0 matches, the unit raises
// the select of that operand's forwarding mux (ForwAsel / ForwBsel) and
// supplies the value on ForwAResult / ForwBResult; the nearer producer
// (EX/MEM) wins over MEM/WB. The EX/MEM value is the ALU result, or PC+4 for
// a jal; the MEM/WB value is the final write-back data, so a loaded word can
// be forwarded one instruction after it reaches WB. The block and its four
// output names come from the schematic; the comparison rules are the usual
// ones for this pipeline shape. A load followed directly by a user of its
// result is not detected: the program must keep one instruction between them.
// Purely combinational.
module forward_unit
  import mips_pkg::*;
(
  input  reg_addr_t ex_rs,
  input  reg_addr_t ex_rt,
  input  logic      mem_reg_write,
  input  reg_addr_t mem_waddr,
  input  word_t     mem_value,
  input  logic      wb_reg_write,
  input  reg_addr_t wb_waddr,
  input  word_t     wb_value,
  output logic      fwd_a_sel,     // 1: ALU A takes fwd_a_result
  output word_t     fwd_a_result,
  output logic      fwd_b_sel,     // 1: operand B takes fwd_b_result
  output word_t     fwd_b_result
);
  logic a_mem, a_wb, b_mem, b_wb;

  always_comb begin
    a_mem = mem_reg_write && mem_waddr != '0 && mem_waddr == ex_rs;
    a_wb  = wb_reg_write  && wb_waddr  != '0 && wb_waddr  == ex_rs;
    b_mem = mem_reg_write && mem_waddr != '0 && mem_waddr == ex_rt;
    b_wb  = wb_reg_write  && wb_waddr  != '0 && wb_waddr  == ex_rt;

    fwd_a_sel    = a_mem || a_wb;
    fwd_a_result = a_mem ? mem_value : wb_value;
    fwd_b_sel    = b_mem || b_wb;
    fwd_b_result = b_mem ? mem_value : wb_value;
  end
endmodule
