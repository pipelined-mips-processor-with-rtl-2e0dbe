// tb_control: self-checking test of the main decoder.
//
// For each instruction of the set (taken from the encodings of the
// demonstration programs) the expected control word is written out here as a
// row of flags; every other opcode must decode as a no-op with no register
// or memory write and no control transfer.
module tb_control;
  import mips_pkg::*;
  logic [5:0] opcode, funct;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flags: reg_dst alu_src mem_to_reg reg_write mem_write branch bne jump jal jr halt
  task automatic t(string nm, word_t inst, logic [10:0] flags, ext_sel_e ext, alu_op_e op);
    logic [10:0] got;
    opcode = inst[31:26]; funct = inst[5:0];
    #1;
    got = {ctrl.reg_dst, ctrl.alu_src, ctrl.mem_to_reg, ctrl.reg_write, ctrl.mem_write,
           ctrl.branch, ctrl.bne, ctrl.jump, ctrl.jal, ctrl.jr, ctrl.halt};
    checks++;
    if (got !== flags || (ctrl.alu_src && ctrl.ext_sel !== ext) ||
        ((flags[9] || flags[7] || flags[5]) && ctrl.alu_op !== op)) begin
      failures++;
      $display("FAIL %s: flags %011b exp %011b ext %s op %s", nm, got, flags,
               ctrl.ext_sel.name(), ctrl.alu_op.name());
    end
  endtask

  initial begin
    t("add",   32'h00645820, 11'b10010000000, EXT_SIGN, ALUOP_RTYPE);
    t("subu",  32'h01457023, 11'b10010000000, EXT_SIGN, ALUOP_RTYPE);
    t("sll",   32'h0007A880, 11'b10010000000, EXT_SIGN, ALUOP_RTYPE);
    t("jr",    32'h03E00008, 11'b00000000010, EXT_SIGN, ALUOP_RTYPE);
    t("syscall", 32'h0000000C, 11'b00000000001, EXT_SIGN, ALUOP_RTYPE);
    t("addi",  32'h20010001, 11'b01010000000, EXT_SIGN, ALUOP_ADD);
    t("slti",  32'h28730007, 11'b01010000000, EXT_SIGN, ALUOP_SLT);
    t("sltiu", 32'h2D540003, 11'b01010000000, EXT_SIGN, ALUOP_SLTU);
    t("andi",  32'h30AF0007, 11'b01010000000, EXT_ZERO, ALUOP_AND);
    t("ori",   32'h34700007, 11'b01010000000, EXT_ZERO, ALUOP_OR);
    t("xori",  32'h38710007, 11'b01010000000, EXT_ZERO, ALUOP_XOR);
    t("lui",   32'h3C1B0005, 11'b01010000000, EXT_LUI,  ALUOP_ADD);
    t("lw",    32'h8E350000, 11'b01110000000, EXT_SIGN, ALUOP_ADD);
    t("sw",    32'hAE3B0000, 11'b01001000000, EXT_SIGN, ALUOP_ADD);
    t("beq",   32'h13C3FFFE, 11'b00000100000, EXT_SIGN, ALUOP_SUB);
    t("bne",   32'h17C3FFFE, 11'b00000110000, EXT_SIGN, ALUOP_SUB);
    t("j",     32'h08100033, 11'b00000001000, EXT_SIGN, ALUOP_ADD);
    t("jal",   32'h0C100035, 11'b00010001100, EXT_SIGN, ALUOP_ADD);
    for (int op = 0; op < 64; op++) begin
      if (op inside {0, 2, 3, 4, 5, 8, 10, 11, 12, 13, 14, 15, 35, 43}) continue;
      t($sformatf("op %02h", op), {6'(op), 26'h3FFFFFF}, 11'b0, EXT_SIGN, ALUOP_ADD);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
