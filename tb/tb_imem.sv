// tb_imem: self-checking test of the instruction memory.
//
// Fills the memory with a pattern derived from the word index, then reads it
// back at text-segment addresses (0x00400000 + 4*i) and checks that the
// word index comes from the address bits above bit 1 and that the
// read is combinational.
module tb_imem;
  import mips_pkg::*;
  word_t addr, inst;
  int checks = 0, failures = 0;

  imem #(.WORDS(256)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t pat(int i);
    return word_t'(i) * 32'h9E37_79B9 ^ 32'h2001_0001;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) dut.mem[i] = pat(i);
    for (int i = 0; i < 600; i++) begin
      int w;
      w = (i < 256) ? i : int'($urandom % 256);
      addr = 32'h0040_0000 + word_t'(w * 4) + ((i % 5 == 0) ? 32'd3 : 32'd0);
      #1;
      checks++;
      if (inst !== pat(w)) begin
        failures++;
        $display("FAIL addr %08h got %08h exp %08h", addr, inst, pat(w));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
