// tb_reg_file: self-checking test of the register file.
//
// Checks reset clearing, $0 staying zero, random writes and reads on both
// ports against a shadow array, and the same-cycle write-through: a read of
// the register being written returns the new value before the clock edge.
module tb_reg_file;
  import mips_pkg::*;
  logic clk = 0, rst_n = 0, we;
  reg_addr_t raddr1, raddr2, waddr;
  word_t rdata1, rdata2, wdata;
  word_t shadow [32];
  int checks = 0, failures = 0;

  reg_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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
    we = 0; waddr = 0; wdata = 0; raddr1 = 0; raddr2 = 0;
    @(posedge clk); #1 rst_n = 1;
    foreach (shadow[i]) shadow[i] = '0;
    for (int i = 0; i < 32; i++) begin
      raddr1 = 5'(i); raddr2 = 5'(31 - i); #1;
      chk("after reset", rdata1, 0);
    end
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); waddr = 5'($urandom); wdata = $urandom;
      raddr1 = (i % 3 == 0) ? waddr : 5'($urandom);
      raddr2 = 5'($urandom);
      #1;
      chk("rd1", rdata1, (we && waddr == raddr1 && raddr1 != 0) ? wdata : shadow[raddr1]);
      chk("rd2", rdata2, (we && waddr == raddr2 && raddr2 != 0) ? wdata : shadow[raddr2]);
      @(posedge clk);
      if (we && waddr != 0) shadow[waddr] = wdata;
      #1;
    end
    we = 0; raddr1 = 0; #1;
    chk("$0", rdata1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
