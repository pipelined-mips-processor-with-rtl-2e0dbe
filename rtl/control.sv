// control: main decoder of the ID stage.
//
// Decodes the opcode (and, for R-type, the function field, to spot jr and
// syscall) of the instruction in IF/ID into the control word carried down the
// pipeline: RegDst, ALUSrc, MemtoReg, RegWrite, MemWr, Branch, BNE, Jump, JAL,
// JR, the immediate-extension mode and the ALU operation class. The signal
// names follow the schematic; the supported instructions are those the core
// is demonstrated with: add addu sub subu and or xor nor slt sltu sll srl sra
// sllv srlv srav jr syscall, addi slti sltiu andi ori xori lui lw sw beq bne,
// j jal. An opcode outside that set decodes as a no-op (no register or memory
// write), which is this design's choice. Purely combinational.
module control
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = CTRL_NOP;
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.alu_op = ALUOP_RTYPE;
        if (funct == FN_JR) begin
          ctrl.jr = 1'b1;
        end else if (funct == FN_SYSCALL) begin
          ctrl.halt = 1'b1;
        end else begin
          ctrl.reg_dst   = 1'b1;
          ctrl.reg_write = 1'b1;
        end
      end
      OP_J: ctrl.jump = 1'b1;
      OP_JAL: begin
        ctrl.jump      = 1'b1;
        ctrl.jal       = 1'b1;
        ctrl.reg_write = 1'b1;
      end
      OP_BEQ: begin
        ctrl.branch = 1'b1;
        ctrl.alu_op = ALUOP_SUB;
      end
      OP_BNE: begin
        ctrl.branch = 1'b1;
        ctrl.bne    = 1'b1;
        ctrl.alu_op = ALUOP_SUB;
      end
      OP_ADDI, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = 1'b1;
        unique case (opcode)
          OP_SLTI:  ctrl.alu_op = ALUOP_SLT;
          OP_SLTIU: ctrl.alu_op = ALUOP_SLTU;
          OP_ANDI:  begin ctrl.alu_op = ALUOP_AND; ctrl.ext_sel = EXT_ZERO; end
          OP_ORI:   begin ctrl.alu_op = ALUOP_OR;  ctrl.ext_sel = EXT_ZERO; end
          OP_XORI:  begin ctrl.alu_op = ALUOP_XOR; ctrl.ext_sel = EXT_ZERO; end
          OP_LUI:   ctrl.ext_sel = EXT_LUI;
          default:  ctrl.alu_op = ALUOP_ADD;
        endcase
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_write  = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src   = 1'b1;
        ctrl.mem_write = 1'b1;
      end
      default: ctrl = CTRL_NOP;
    endcase
  end
endmodule
