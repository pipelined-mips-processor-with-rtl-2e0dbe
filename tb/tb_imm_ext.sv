// tb_imm_ext: self-checking test of the immediate extension.
//
// Random and corner immediates in each mode; expected values are built here
// by arithmetic (sign extension as a signed 16-bit value, LUI as a multiply
// by 65536).
module tb_imm_ext;
  import mips_pkg::*;
  logic [15:0] imm;
  ext_sel_e sel;
  word_t ext;
  int checks = 0, failures = 0;

  imm_ext dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(logic [15:0] i, ext_sel_e s);
    word_t e;
    imm = i; sel = s;
    #1;
    case (s)
      EXT_SIGN: e = word_t'(int'(shortint'(i)));
      EXT_ZERO: e = word_t'(int'(i));
      default:  e = word_t'(i) * 32'd65536;
    endcase
    checks++;
    if (ext !== e) begin
      failures++;
      $display("FAIL imm=%04h sel=%s got %08h exp %08h", i, s.name(), ext, e);
    end
  endtask

  initial begin
    t(16'hFFFB, EXT_SIGN); t(16'h0007, EXT_SIGN); t(16'h8001, EXT_ZERO);
    t(16'h0005, EXT_LUI);  t(16'h1001, EXT_LUI);  t(16'h8000, EXT_SIGN);
    for (int i = 0; i < 300; i++) t(16'($urandom), ext_sel_e'(i % 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
