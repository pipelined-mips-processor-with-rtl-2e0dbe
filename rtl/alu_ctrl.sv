// alu_ctrl: ALU control of the EX stage.
//
// Combines the operation class from the main control (ALUop) with the
// function field of the instruction in ID/EX to choose the ALU operation.
// For the shifts it also tells whether the shift amount is the shamt field
// (sll, srl, sra) or the low five bits of rs (sllv, srlv, srav). The schematic
// names the block "ALU Ctrl" fed by ALUop; the encodings are this design's.
// Purely combinational.
module alu_ctrl
  import mips_pkg::*;
(
  input  alu_op_e    alu_op,
  input  logic [5:0] funct,
  output alu_fn_e    alu_fn,
  output logic       shift_var  // 1: shift amount from rs, 0: from shamt
);
  always_comb begin
    shift_var = 1'b0;
    unique case (alu_op)
      ALUOP_SUB:  alu_fn = ALU_SUB;
      ALUOP_SLT:  alu_fn = ALU_SLT;
      ALUOP_SLTU: alu_fn = ALU_SLTU;
      ALUOP_AND:  alu_fn = ALU_AND;
      ALUOP_OR:   alu_fn = ALU_OR;
      ALUOP_XOR:  alu_fn = ALU_XOR;
      ALUOP_RTYPE: begin
        unique case (funct)
          FN_ADD, FN_ADDU: alu_fn = ALU_ADD;
          FN_SUB, FN_SUBU: alu_fn = ALU_SUB;
          FN_AND:          alu_fn = ALU_AND;
          FN_OR:           alu_fn = ALU_OR;
          FN_XOR:          alu_fn = ALU_XOR;
          FN_NOR:          alu_fn = ALU_NOR;
          FN_SLT:          alu_fn = ALU_SLT;
          FN_SLTU:         alu_fn = ALU_SLTU;
          FN_SLL:          alu_fn = ALU_SLL;
          FN_SRL:          alu_fn = ALU_SRL;
          FN_SRA:          alu_fn = ALU_SRA;
          FN_SLLV: begin   alu_fn = ALU_SLL; shift_var = 1'b1; end
          FN_SRLV: begin   alu_fn = ALU_SRL; shift_var = 1'b1; end
          FN_SRAV: begin   alu_fn = ALU_SRA; shift_var = 1'b1; end
          default:         alu_fn = ALU_ADD;
        endcase
      end
      default: alu_fn = ALU_ADD;
    endcase
  end
endmodule
