// tb_mem_wb_reg: self-checking test of the mem_wb pipeline register.
//
// Drives random records with random write enable and clear, and checks
// one cycle later that the register loaded d (we high), cleared to a bubble
// (rst high, which wins), or held its value (we low).
module tb_mem_wb_reg;
  import mips_pkg::*;
  logic clk = 0, rst_n = 0, we, rst;
  mem_wb_t d, q, exp;
  int checks = 0, failures = 0;
  int n_load = 0, n_clear = 0, n_hold = 0;

  mem_wb_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mem_wb_t rand_rec();
    logic [$bits(mem_wb_t)-1:0] v;
    for (int i = 0; i < $bits(mem_wb_t); i++) v[i] = 1'($urandom);
    return mem_wb_t'(v);
  endfunction

  initial begin
    we = 1; rst = 0; d = rand_rec();
    @(posedge clk); #1;
    checks++; if (q !== '0) begin failures++; $display("FAIL not cleared by reset"); end
    rst_n = 1;
    exp = '0;
    for (int i = 0; i < 500; i++) begin
      d = rand_rec(); we = 1'($urandom); rst = ($urandom % 4 == 0);
      @(posedge clk);
      if (rst) begin exp = '0; n_clear++; end
      else if (we) begin exp = d; n_load++; end
      else n_hold++;
      #1;
      checks++;
      if (q !== exp) begin failures++; $display("FAIL cycle %0d", i); end
    end
    checks++;
    if (n_load == 0 || n_clear == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
