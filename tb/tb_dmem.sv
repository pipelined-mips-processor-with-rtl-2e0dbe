// tb_dmem: self-checking test of the data memory.
//
// Random word writes and reads at data-segment addresses (0x10010000 +
// 4*i) against a shadow array: a write lands on the clock edge only when we
// is high, a read returns the stored word in the same cycle.
module tb_dmem;
  import mips_pkg::*;
  logic clk = 0, we;
  word_t addr, wdata, rdata;
  word_t shadow [64];
  int checks = 0, failures = 0;

  dmem #(.WORDS(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    we = 1;
    for (int i = 0; i < 64; i++) begin
      addr = 32'h1001_0000 + word_t'(i * 4); wdata = ~word_t'(i);
      shadow[i] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 1000; i++) begin
      w = int'($urandom % 64);
      we = 1'($urandom); addr = 32'h1001_0000 + word_t'(w * 4); wdata = $urandom;
      #1;
      checks++;
      if (rdata !== shadow[w]) begin
        failures++;
        $display("FAIL read %08h got %08h exp %08h", addr, rdata, shadow[w]);
      end
      @(posedge clk);
      if (we) shadow[w] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
