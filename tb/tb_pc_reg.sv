// tb_pc_reg: self-checking test of the program counter.
//
// Checks the reset value 0x00400000, that the PC follows pc_next one clock
// later when pc_we is high and holds its value when pc_we is low.
module tb_pc_reg;
  import mips_pkg::*;
  logic clk = 0, rst_n = 0, pc_we;
  word_t pc_next, pc, exp;
  int checks = 0, failures = 0;

  pc_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc_we = 1; pc_next = 32'h1234_5678;
    @(posedge clk); #1;
    checks++; if (pc !== 32'h0040_0000) begin failures++; $display("FAIL reset %08h", pc); end
    rst_n = 1;
    exp = pc;
    for (int i = 0; i < 500; i++) begin
      pc_we = 1'($urandom); pc_next = $urandom;
      @(posedge clk);
      if (pc_we) exp = pc_next;
      #1;
      checks++;
      if (pc !== exp) begin failures++; $display("FAIL pc %08h exp %08h", pc, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
