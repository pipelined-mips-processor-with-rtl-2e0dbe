// tb_forward_unit: self-checking test of the forwarding unit.
//
// Random source and destination registers (drawn from a small set so that
// matches are frequent) and random write enables; the expected select and
// value are worked out here: the EX/MEM producer has priority, $0 is never
// forwarded, no write enable means no forwarding.
module tb_forward_unit;
  import mips_pkg::*;
  reg_addr_t ex_rs, ex_rt, mem_waddr, wb_waddr;
  logic mem_reg_write, wb_reg_write, fwd_a_sel, fwd_b_sel;
  word_t mem_value, wb_value, fwd_a_result, fwd_b_result;
  int checks = 0, failures = 0;
  int n_mem = 0, n_wb = 0;

  forward_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_operand(string nm, reg_addr_t src, logic sel, word_t val);
    logic e_sel;
    word_t e_val;
    e_sel = 1'b0;
    e_val = val;  // don't care when not selected
    if (mem_reg_write && mem_waddr == src && src != 0) begin
      e_sel = 1'b1; e_val = mem_value; n_mem++;
    end else if (wb_reg_write && wb_waddr == src && src != 0) begin
      e_sel = 1'b1; e_val = wb_value; n_wb++;
    end
    checks++;
    if (sel !== e_sel || (e_sel && val !== e_val)) begin
      failures++;
      $display("FAIL %s src=%0d mem(%0b,%0d) wb(%0b,%0d): sel %0b val %08h",
               nm, src, mem_reg_write, mem_waddr, wb_reg_write, wb_waddr, sel, val);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      ex_rs = 5'($urandom % 4); ex_rt = 5'($urandom % 4);
      mem_waddr = 5'($urandom % 4); wb_waddr = 5'($urandom % 4);
      mem_reg_write = 1'($urandom); wb_reg_write = 1'($urandom);
      mem_value = $urandom; wb_value = $urandom;
      #1;
      one_operand("A", ex_rs, fwd_a_sel, fwd_a_result);
      one_operand("B", ex_rt, fwd_b_sel, fwd_b_result);
    end
    checks++;
    if (n_mem == 0 || n_wb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
