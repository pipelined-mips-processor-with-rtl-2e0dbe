// alu: the 32-bit arithmetic and logic unit of the EX stage.
//
// Computes result = a op b for add, subtract, and, or, xor, nor, signed and
// unsigned set-less-than, and the three shifts of b by shamt (logical left,
// logical right, arithmetic right). Zero is high when the result is 0; beq
// and bne use it on a subtraction of rs and rt. Add and subtract wrap around
// with no overflow trap (add/sub and addu/subu behave alike), a choice of
// this design since no exception logic is described. Purely combinational.
module alu
  import mips_pkg::*;
(
  input  alu_fn_e    fn,
  input  word_t      a,
  input  word_t      b,
  input  logic [4:0] shamt,
  output word_t      result,
  output logic       zero
);
  always_comb begin
    unique case (fn)
      ALU_ADD:  result = a + b;
      ALU_SUB:  result = a - b;
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_XOR:  result = a ^ b;
      ALU_NOR:  result = ~(a | b);
      ALU_SLT:  result = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: result = {31'b0, a < b};
      ALU_SLL:  result = b << shamt;
      ALU_SRL:  result = b >> shamt;
      ALU_SRA:  result = word_t'($signed(b) >>> shamt);
      default:  result = a + b;
    endcase
  end

  assign zero = (result == '0);
endmodule
