// instr_addr: instruction-address arithmetic and the next-PC mux.
//
// Computes, as in the top strip of the schematic:
//   jump target   = {PC+4[31:28], inst[25:0], 2'b00}   (ID stage)
//   branch target = PC+4 + (extended immediate << 2)   (ID stage, stored in
//                   ID/EX and used when the branch resolves in EX)
// and selects the next PC from PC+4 of the fetch stage, the branch target from
// ID/EX, the jump target, or the jr register value, according to pc_sel.
// Purely combinational.
module instr_addr
  import mips_pkg::*;
(
  input  pc_sel_e     pc_sel,
  input  word_t       if_pc4,      // PC+4 of the instruction being fetched
  input  word_t       id_pc4,      // PC+4 of the instruction in ID
  input  logic [25:0] id_target,   // jump field of the instruction in ID
  input  word_t       id_imm,      // extended immediate of the instruction in ID
  input  word_t       ex_br_target,
  input  word_t       ex_jr_target,
  output word_t       id_br_target,
  output word_t       pc_next
);
  word_t jump_target;

  always_comb begin
    id_br_target = id_pc4 + {id_imm[29:0], 2'b00};
    jump_target  = {id_pc4[31:28], id_target, 2'b00};
    unique case (pc_sel)
      PC_BRANCH: pc_next = ex_br_target;
      PC_JUMP:   pc_next = jump_target;
      PC_JR:     pc_next = ex_jr_target;
      default:   pc_next = if_pc4;
    endcase
  end
endmodule
