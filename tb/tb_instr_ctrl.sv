// tb_instr_ctrl: self-checking test of the next-PC selection.
//
// Exhausts all 32 combinations of its five inputs and checks the PC source
// and the redirect flag against the rules: jr first, then a jump in ID, then
// a taken branch (beq on Zero, bne on not Zero), else sequential.
module tb_instr_ctrl;
  import mips_pkg::*;
  logic ex_branch, ex_bne, ex_zero, ex_jr, id_jump, ex_redirect;
  pc_sel_e pc_sel;
  int checks = 0, failures = 0;

  instr_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic taken;
      pc_sel_e e;
      {ex_branch, ex_bne, ex_zero, ex_jr, id_jump} = 5'(v);
      #1;
      taken = ex_branch && ((!ex_bne && ex_zero) || (ex_bne && !ex_zero));
      e = ex_jr ? PC_JR : id_jump ? PC_JUMP : taken ? PC_BRANCH : PC_SEQ;
      checks++;
      if (pc_sel !== e || ex_redirect !== (taken || ex_jr)) begin
        failures++;
        $display("FAIL inputs=%05b got %s/%0b exp %s", v[4:0], pc_sel.name(), ex_redirect, e.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
