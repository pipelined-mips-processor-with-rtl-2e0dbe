// tb_alu: self-checking test of the ALU.
//
// Applies directed corner cases and random operands to every ALU operation
// and compares result and Zero with values computed here from the operation's
// definition (signed compare via the sign bits, shifts bit by bit).
module tb_alu;
  import mips_pkg::*;
  alu_fn_e fn;
  word_t a, b, result;
  logic [4:0] shamt;
  logic zero;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(alu_fn_e f, word_t x, word_t y, logic [4:0] s);
    word_t r;
    logic lt;
    case (f)
      ALU_ADD: r = x + y;
      ALU_SUB: r = x + ~y + 1;
      ALU_AND: r = x & y;
      ALU_OR:  r = x | y;
      ALU_XOR: r = (x | y) & ~(x & y);
      ALU_NOR: r = ~x & ~y;
      ALU_SLT: begin
        if (x[31] != y[31]) lt = x[31];
        else                lt = (x[30:0] < y[30:0]);
        r = {31'b0, lt};
      end
      ALU_SLTU: r = {31'b0, (x < y)};
      ALU_SLL: begin r = y; repeat (int'(s)) r = {r[30:0], 1'b0}; end
      ALU_SRL: begin r = y; repeat (int'(s)) r = {1'b0, r[31:1]}; end
      ALU_SRA: begin r = y; repeat (int'(s)) r = {r[31], r[31:1]}; end
      default: r = 'x;
    endcase
    return r;
  endfunction

  task automatic apply(alu_fn_e f, word_t x, word_t y, logic [4:0] s);
    word_t exp;
    fn = f; a = x; b = y; shamt = s;
    #1;
    exp = model(f, x, y, s);
    checks++;
    if (result !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL fn=%s a=%08h b=%08h s=%0d: got %08h z=%0b exp %08h",
               f.name(), x, y, s, result, zero, exp);
    end
  endtask

  initial begin
    static alu_fn_e fns [11] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
                          ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA};
    // directed cases from the instruction demonstrations
    apply(ALU_ADD, 3, 4, 0);                      // 7
    apply(ALU_ADD, 32'hFFFF_FFFD, 5, 0);          // 2
    apply(ALU_SUB, 32'hFFFF_FFFD, 5, 0);          // -8
    apply(ALU_SUB, 3, 3, 0);                      // zero
    apply(ALU_NOR, 3, 7, 0);                      // -8
    apply(ALU_SLT, 32'hFFFF_FFFD, 3, 0);          // 1
    apply(ALU_SLTU, 32'hFFFF_FFFD, 3, 0);         // 0
    apply(ALU_SLL, 0, 7, 2);                      // 28
    apply(ALU_SRA, 0, 32'h8000_0000, 31);         // -1
    apply(ALU_SRL, 0, 32'h8000_0000, 31);         // 1
    apply(ALU_SLT, 32'h7FFF_FFFF, 32'h8000_0000, 0);
    for (int i = 0; i < 2000; i++)
      apply(fns[i % 11], $urandom, (i % 7 == 0) ? $urandom % 4 : $urandom, 5'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
