// imm_ext: immediate extension of the ID stage.
//
// Turns the 16-bit immediate field into the 32-bit operand stored in the
// Imed field of ID/EX. The schematic draws a Sign Extend unit and a LUI unit
// feeding a two-way mux selected by the LUI control; this block adds a third
// case, zero extension, for andi, ori and xori as the MIPS instruction set
// defines them. Purely combinational:
//   EXT_SIGN: {16{imm[15]}, imm}   (arithmetic, slti(u), lw, sw, branches)
//   EXT_ZERO: {16'b0, imm}         (andi, ori, xori)
//   EXT_LUI : {imm, 16'b0}         (lui)
module imm_ext
  import mips_pkg::*;
(
  input  logic [15:0] imm,
  input  ext_sel_e    sel,
  output word_t       ext
);
  always_comb begin
    unique case (sel)
      EXT_ZERO: ext = {16'b0, imm};
      EXT_LUI:  ext = {imm, 16'b0};
      default:  ext = {{16{imm[15]}}, imm};
    endcase
  end
endmodule
