// instr_ctrl: chooses where the next instruction is fetched from.
//
// A conditional branch in EX is taken when Branch is set and the ALU Zero
// flag differs from BNE (beq: Zero = 1, bne: Zero = 0). The choice follows
// the mux chain of the schematic, nearest the PC first: jr in EX takes the
// register value, then a j/jal in ID takes the jump target, then a taken
// branch takes the branch target, otherwise PC+4. ex_redirect reports a
// taken branch or a jr to the hazard unit, which flushes the wrong-path
// instruction. Purely combinational.
module instr_ctrl
  import mips_pkg::*;
(
  input  logic    ex_branch,
  input  logic    ex_bne,
  input  logic    ex_zero,
  input  logic    ex_jr,
  input  logic    id_jump,
  output pc_sel_e pc_sel,
  output logic    ex_redirect
);
  logic taken;

  always_comb begin
    taken = ex_branch && (ex_zero != ex_bne);
    if (ex_jr)        pc_sel = PC_JR;
    else if (id_jump) pc_sel = PC_JUMP;
    else if (taken)   pc_sel = PC_BRANCH;
    else              pc_sel = PC_SEQ;
    ex_redirect = taken || ex_jr;
  end
endmodule
