// mips_pipeline: five-stage MIPS processor with forwarding and hazard control.
//
// Stages and what happens in each:
//   IF  : PC addresses the instruction memory; PC+4 is computed.
//   ID  : control decode, register-file read, immediate extension, the write
//         register (rd, rt or $31 for jal) is chosen, the branch target
//         PC+4 + (imm << 2) is computed and j/jal redirect the PC.
//   EX  : forwarding muxes pick each operand from the register value read in
//         ID or from the forwarding unit; the ALU computes; beq/bne resolve on
//         the Zero flag and jr redirects the PC to its (forwarded) rs value.
//   MEM : the data memory is read, or written by sw.
//   WB  : MemtoReg picks DMEM out or the ALU result, then the JAL mux picks
//         PC+4 for jal; the result is written to the register file.
// PC+4 travels through all four pipeline registers because jal writes it in
// WB. The forwarding unit removes data hazards between ALU instructions (from
// EX/MEM and MEM/WB into EX; a register written in WB is also readable in the
// same cycle in ID). The hazard unit stalls and flushes around branches,
// jumps and jr. A load followed immediately by an instruction that uses the
// loaded register is not interlocked: programs keep at least one instruction
// (or nop) between them. A syscall stops fetching; halt rises when it reaches
// ID, and the older instructions finish in the next three cycles.
//
// Ports: clk, rst_n (active low, synchronous). The register-write and data-
// memory buses are brought out for observation, with the PC and halt. The
// instruction memory is loaded from IMEM_INIT when given (a testbench may
// also write it directly). The pipeline structure, block names and stage
// assignment follow the schematic of the design; memory sizes, the reset PC
// handling, the exact flush timing and the halt mechanism are this design's
// choices (see the block headers). An assertion checks the invariant the
// hazard rules depend on: a redirect from EX never meets a control transfer
// in ID.
//
// HAZARD_UNITS = 0 gives the earlier form of the same core, described with
// it: no forwarding, no stalls and no flushes, so a program must itself keep
// three instructions (nops) between a register write and its use, one after
// j/jal, two after jr and three after beq/bne (two are enough here). The
// default, 1, is the core with both units.
module mips_pipeline
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter word_t       RESET_PC   = 32'h0040_0000,
  parameter string       IMEM_INIT  = "",
  parameter bit          HAZARD_UNITS = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  output word_t     pc,
  output logic      halt,
  output logic      reg_wr_en,
  output reg_addr_t reg_wr_addr,
  output word_t     reg_wr_data,
  output logic      dmem_wr,
  output word_t     dmem_addr,
  output word_t     dmem_data,
  output word_t     dmem_out
);
  // ---------------------------------------------------------------- hazard
  logic pc_we, if_id_we, if_id_rst, id_ex_rst;
  logic hz_pc_we, hz_if_id_we, hz_if_id_rst, hz_id_ex_rst;
  logic ex_redirect;
  pc_sel_e pc_sel;

  // ---------------------------------------------------------------- IF
  word_t if_pc4, if_inst, pc_next;
  if_id_t if_id_d, if_id_q;

  pc_reg #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .pc_we, .pc_next, .pc
  );

  assign if_pc4 = pc + 32'd4;

  imem #(.WORDS(IMEM_WORDS), .INIT_FILE(IMEM_INIT)) u_imem (
    .addr(pc), .inst(if_inst)
  );

  assign if_id_d = '{pc4: if_pc4, inst: if_inst};

  if_id_reg u_if_id (
    .clk, .rst_n, .we(if_id_we), .rst(if_id_rst), .d(if_id_d), .q(if_id_q)
  );

  // ---------------------------------------------------------------- ID
  ctrl_t     id_ctrl;
  reg_addr_t id_rs, id_rt, id_rd, id_waddr;
  word_t     id_data1, id_data2, id_imm, id_br_target;
  id_ex_t    id_ex_d, id_ex_q;
  mem_wb_t   mem_wb_q;

  assign id_rs = if_id_q.inst[25:21];
  assign id_rt = if_id_q.inst[20:16];
  assign id_rd = if_id_q.inst[15:11];

  control u_control (
    .opcode(if_id_q.inst[31:26]), .funct(if_id_q.inst[5:0]), .ctrl(id_ctrl)
  );

  reg_file u_reg_file (
    .clk, .rst_n,
    .raddr1(id_rs), .raddr2(id_rt), .rdata1(id_data1), .rdata2(id_data2),
    .we(reg_wr_en), .waddr(reg_wr_addr), .wdata(reg_wr_data)
  );

  imm_ext u_imm_ext (
    .imm(if_id_q.inst[15:0]), .sel(id_ctrl.ext_sel), .ext(id_imm)
  );

  // RegDst mux (rd / rt), then the JAL mux (x1F)
  always_comb begin
    id_waddr = id_ctrl.reg_dst ? id_rd : id_rt;
    if (id_ctrl.jal) id_waddr = RA_REG;
  end

  assign id_ex_d = '{
    ctrl:      id_ctrl,
    data1:     id_data1,
    data2:     id_data2,
    pc4:       if_id_q.pc4,
    br_target: id_br_target,
    waddr:     id_waddr,
    imm:       id_imm,
    inst:      if_id_q.inst
  };

  id_ex_reg u_id_ex (
    .clk, .rst_n, .we(1'b1), .rst(id_ex_rst), .d(id_ex_d), .q(id_ex_q)
  );

  // ---------------------------------------------------------------- EX
  ex_mem_t ex_mem_d, ex_mem_q;
  logic    fwd_a_sel, fwd_b_sel, shift_var, ex_zero;
  word_t   fwd_a_result, fwd_b_result, ex_a, ex_b_reg, ex_b, ex_result;
  word_t   mem_fwd_value;
  alu_fn_e ex_alu_fn;

  forward_unit u_forward (
    .ex_rs(id_ex_q.inst[25:21]), .ex_rt(id_ex_q.inst[20:16]),
    .mem_reg_write(ex_mem_q.reg_write), .mem_waddr(ex_mem_q.waddr),
    .mem_value(mem_fwd_value),
    .wb_reg_write(mem_wb_q.reg_write), .wb_waddr(mem_wb_q.waddr),
    .wb_value(reg_wr_data),
    .fwd_a_sel, .fwd_a_result, .fwd_b_sel, .fwd_b_result
  );

  // Without the hazard units (HAZARD_UNITS = 0) the operands always come
  // from the register values read in ID.
  assign ex_a     = (HAZARD_UNITS && fwd_a_sel) ? fwd_a_result : id_ex_q.data1;
  assign ex_b_reg = (HAZARD_UNITS && fwd_b_sel) ? fwd_b_result : id_ex_q.data2;
  assign ex_b     = id_ex_q.ctrl.alu_src ? id_ex_q.imm : ex_b_reg;

  alu_ctrl u_alu_ctrl (
    .alu_op(id_ex_q.ctrl.alu_op), .funct(id_ex_q.inst[5:0]),
    .alu_fn(ex_alu_fn), .shift_var
  );

  alu u_alu (
    .fn(ex_alu_fn), .a(ex_a), .b(ex_b),
    .shamt(shift_var ? ex_a[4:0] : id_ex_q.inst[10:6]),
    .result(ex_result), .zero(ex_zero)
  );

  instr_ctrl u_instr_ctrl (
    .ex_branch(id_ex_q.ctrl.branch), .ex_bne(id_ex_q.ctrl.bne),
    .ex_zero, .ex_jr(id_ex_q.ctrl.jr), .id_jump(id_ctrl.jump),
    .pc_sel, .ex_redirect
  );

  instr_addr u_instr_addr (
    .pc_sel, .if_pc4, .id_pc4(if_id_q.pc4), .id_target(if_id_q.inst[25:0]),
    .id_imm, .ex_br_target(id_ex_q.br_target), .ex_jr_target(ex_a),
    .id_br_target, .pc_next
  );

  hazard_unit u_hazard (
    .ex_redirect,
    .id_branch(id_ctrl.branch), .id_jr(id_ctrl.jr), .id_jump(id_ctrl.jump),
    .id_halt(id_ctrl.halt),
    .pc_we(hz_pc_we), .if_id_we(hz_if_id_we), .if_id_rst(hz_if_id_rst),
    .id_ex_rst(hz_id_ex_rst)
  );

  // Without the hazard units nothing is stalled or flushed: software pads
  // every control transfer with nops. Only the syscall hold is kept, so the
  // core still halts.
  assign pc_we     = HAZARD_UNITS ? hz_pc_we     : !id_ctrl.halt;
  assign if_id_we  = HAZARD_UNITS ? hz_if_id_we  : !id_ctrl.halt;
  assign if_id_rst = HAZARD_UNITS ? hz_if_id_rst : 1'b0;
  assign id_ex_rst = HAZARD_UNITS ? hz_id_ex_rst : id_ctrl.halt;

  assign ex_mem_d = '{
    reg_write:  id_ex_q.ctrl.reg_write,
    mem_to_reg: id_ex_q.ctrl.mem_to_reg,
    mem_write:  id_ex_q.ctrl.mem_write,
    jal:        id_ex_q.ctrl.jal,
    waddr:      id_ex_q.waddr,
    alu_result: ex_result,
    pc4:        id_ex_q.pc4,
    data2:      ex_b_reg,
    inst:       id_ex_q.inst
  };

  ex_mem_reg u_ex_mem (
    .clk, .rst_n, .we(1'b1), .rst(1'b0), .d(ex_mem_d), .q(ex_mem_q)
  );

  // ---------------------------------------------------------------- MEM
  mem_wb_t mem_wb_d;

  assign mem_fwd_value = ex_mem_q.jal ? ex_mem_q.pc4 : ex_mem_q.alu_result;

  assign dmem_wr   = ex_mem_q.mem_write;
  assign dmem_addr = ex_mem_q.alu_result;
  assign dmem_data = ex_mem_q.data2;

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .we(dmem_wr), .addr(dmem_addr), .wdata(dmem_data), .rdata(dmem_out)
  );

  assign mem_wb_d = '{
    reg_write:  ex_mem_q.reg_write,
    mem_to_reg: ex_mem_q.mem_to_reg,
    jal:        ex_mem_q.jal,
    waddr:      ex_mem_q.waddr,
    dmem_out:   dmem_out,
    alu_result: ex_mem_q.alu_result,
    pc4:        ex_mem_q.pc4,
    inst:       ex_mem_q.inst
  };

  mem_wb_reg u_mem_wb (
    .clk, .rst_n, .we(1'b1), .rst(1'b0), .d(mem_wb_d), .q(mem_wb_q)
  );

  // ---------------------------------------------------------------- WB
  assign reg_wr_en   = mem_wb_q.reg_write;
  assign reg_wr_addr = mem_wb_q.waddr;
  assign reg_wr_data = mem_wb_q.jal        ? mem_wb_q.pc4 :
                       mem_wb_q.mem_to_reg ? mem_wb_q.dmem_out :
                                             mem_wb_q.alu_result;

  assign halt = id_ctrl.halt;

  // The hazard rules rely on this: a branch or jr holds the PC and clears
  // IF/ID while in ID, so when it redirects from EX the ID stage holds a
  // bubble and no other control transfer competes for the PC.
  // Without the hazard units the nops that software places behind a branch
  // or jr give the same guarantee.
  a_redirect_alone: assert property (@(posedge clk) disable iff (!rst_n)
    ex_redirect |-> !(id_ctrl.branch || id_ctrl.jump || id_ctrl.jr || id_ctrl.halt));
endmodule
