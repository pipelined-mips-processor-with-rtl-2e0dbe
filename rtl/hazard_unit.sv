// hazard_unit: stall and flush control for control-flow changes.
//
// Drives the PC write enable and the write enable / synchronous clear of the
// IF/ID and ID/EX registers (pc_we, if_id_we, if_id_rst, id_ex_rst). Data
// hazards between ALU instructions are removed by forwarding instead, so this
// unit only deals with instructions that change the flow, in priority order:
//   1. taken branch or jr in EX (ex_redirect): the PC loads the target and
//      IF/ID and ID/EX are cleared, removing any wrong-path instruction.
//   2. syscall in ID: the PC and IF/ID hold and ID/EX is cleared, so the
//      syscall stays in ID, the older instructions drain, and fetching stops.
//   3. beq/bne or jr in ID: the PC holds and IF/ID is cleared, so no
//      instruction follows the branch until it resolves one cycle later in EX.
//   4. j/jal in ID: the PC loads the jump target and IF/ID is cleared,
//      discarding the one instruction fetched behind the jump.
// A not-taken branch thus costs one bubble, a taken branch or jr two, a jump
// one. Rules 1 and 3 are the behaviour described for this core (branch: PC
// stalled and IF/ID flushed; jr: IF/ID flushed the cycle after); for jumps it
// is described as clearing ID/EX one cycle later, which removes the same
// instruction. Rule 2 is this design's way to halt. Purely combinational.
module hazard_unit (
  input  logic ex_redirect,
  input  logic id_branch,
  input  logic id_jr,
  input  logic id_jump,
  input  logic id_halt,
  output logic pc_we,
  output logic if_id_we,
  output logic if_id_rst,
  output logic id_ex_rst
);
  always_comb begin
    pc_we     = 1'b1;
    if_id_we  = 1'b1;
    if_id_rst = 1'b0;
    id_ex_rst = 1'b0;
    if (ex_redirect) begin
      if_id_rst = 1'b1;
      id_ex_rst = 1'b1;
    end else if (id_halt) begin
      pc_we     = 1'b0;
      if_id_we  = 1'b0;
      id_ex_rst = 1'b1;
    end else if (id_branch || id_jr) begin
      pc_we     = 1'b0;
      if_id_rst = 1'b1;
    end else if (id_jump) begin
      if_id_rst = 1'b1;
    end
  end
endmodule
