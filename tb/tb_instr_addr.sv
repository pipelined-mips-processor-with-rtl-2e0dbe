// tb_instr_addr: self-checking test of the address arithmetic and PC mux.
//
// Random PCs, jump fields and immediates; the branch target is checked as
// PC+4 plus four times the signed immediate, the jump target as the upper
// four PC bits joined to the 26-bit field times four, and pc_next against the
// input chosen by pc_sel. Includes the branch offsets of the demonstration
// loops (-2 and -5).
module tb_instr_addr;
  import mips_pkg::*;
  pc_sel_e pc_sel;
  word_t if_pc4, id_pc4, id_imm, ex_br_target, ex_jr_target, id_br_target, pc_next;
  logic [25:0] id_target;
  int checks = 0, failures = 0;

  instr_addr dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string nm, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %08h exp %08h", nm, got, exp);
    end
  endtask

  initial begin
    int off;
    for (int i = 0; i < 1000; i++) begin
      off = (i == 0) ? -2 : (i == 1) ? -5 : int'(shortint'($urandom));
      if_pc4 = $urandom; id_pc4 = (i < 2) ? 32'h0040_0034 : $urandom;
      id_target = 26'($urandom); id_imm = word_t'(off);
      ex_br_target = $urandom; ex_jr_target = $urandom;
      pc_sel = pc_sel_e'(i % 4);
      #1;
      chk("branch target", id_br_target, id_pc4 + word_t'(off * 4));
      case (pc_sel)
        PC_SEQ:    chk("seq", pc_next, if_pc4);
        PC_BRANCH: chk("branch", pc_next, ex_br_target);
        PC_JUMP:   chk("jump", pc_next, (id_pc4 & 32'hF000_0000) + word_t'(id_target) * 4);
        default:   chk("jr", pc_next, ex_jr_target);
      endcase
    end
    chk("demo bne target", 32'h0040_0034 + word_t'(-2 * 4), 32'h0040_002C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
