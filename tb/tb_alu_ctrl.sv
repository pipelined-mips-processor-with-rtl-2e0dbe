// tb_alu_ctrl: self-checking test of the ALU control.
//
// Walks every ALUop class and every function code of the instruction set and
// compares the selected ALU operation and shift-amount source with a table
// written out here.
module tb_alu_ctrl;
  import mips_pkg::*;
  alu_op_e alu_op;
  logic [5:0] funct;
  alu_fn_e alu_fn;
  logic shift_var;
  int checks = 0, failures = 0;

  alu_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(alu_op_e op, logic [5:0] f, alu_fn_e efn, logic evar);
    alu_op = op; funct = f;
    #1;
    checks++;
    if (alu_fn !== efn || shift_var !== evar) begin
      failures++;
      $display("FAIL op=%s funct=%02h: got %s/%0b exp %s/%0b",
               op.name(), f, alu_fn.name(), shift_var, efn.name(), evar);
    end
  endtask

  initial begin
    t(ALUOP_ADD, 6'h2A, ALU_ADD, 0);
    t(ALUOP_SUB, 6'h20, ALU_SUB, 0);
    t(ALUOP_SLT, 6'h00, ALU_SLT, 0);
    t(ALUOP_SLTU, 6'h00, ALU_SLTU, 0);
    t(ALUOP_AND, 6'h00, ALU_AND, 0);
    t(ALUOP_OR, 6'h00, ALU_OR, 0);
    t(ALUOP_XOR, 6'h00, ALU_XOR, 0);
    t(ALUOP_RTYPE, 6'h20, ALU_ADD, 0);
    t(ALUOP_RTYPE, 6'h21, ALU_ADD, 0);
    t(ALUOP_RTYPE, 6'h22, ALU_SUB, 0);
    t(ALUOP_RTYPE, 6'h23, ALU_SUB, 0);
    t(ALUOP_RTYPE, 6'h24, ALU_AND, 0);
    t(ALUOP_RTYPE, 6'h25, ALU_OR, 0);
    t(ALUOP_RTYPE, 6'h26, ALU_XOR, 0);
    t(ALUOP_RTYPE, 6'h27, ALU_NOR, 0);
    t(ALUOP_RTYPE, 6'h2A, ALU_SLT, 0);
    t(ALUOP_RTYPE, 6'h2B, ALU_SLTU, 0);
    t(ALUOP_RTYPE, 6'h00, ALU_SLL, 0);
    t(ALUOP_RTYPE, 6'h02, ALU_SRL, 0);
    t(ALUOP_RTYPE, 6'h03, ALU_SRA, 0);
    t(ALUOP_RTYPE, 6'h04, ALU_SLL, 1);
    t(ALUOP_RTYPE, 6'h06, ALU_SRL, 1);
    t(ALUOP_RTYPE, 6'h07, ALU_SRA, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
