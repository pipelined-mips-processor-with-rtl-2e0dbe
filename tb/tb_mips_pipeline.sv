// tb_mips_pipeline: end-to-end test of the five-stage MIPS pipeline.
//
// Assembles a program (with no nops between dependent ALU instructions) that
// exercises every instruction of the core, back-to-back read-after-write
// chains through both forwarding paths, the register-file write-through,
// taken and not-taken beq/bne, j, jal/jr and a halting syscall. The program
// is loaded into the instruction memory, run on the core, and the final
// register file and data memory are compared with an instruction-level
// reference model; a few results are also checked against hand-worked values.
// The cycle at which the syscall reaches ID must equal the count derived from
// the hazard rules (one cycle per instruction plus the bubbles). The test
// counts how often each mechanism happened and fails if one never did.
module tb_mips_pipeline;
  import mips_asm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [31:0] pc, reg_wr_data, dmem_addr, dmem_data, dmem_out;
  logic [4:0]  reg_wr_addr;
  logic        halt, reg_wr_en, dmem_wr;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  mips_pipeline dut (.*);

  always #5 clk = ~clk;

  // Watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  // Mechanism counters
  int n_fwd_a_mem = 0, n_fwd_a_wb = 0, n_fwd_b_mem = 0, n_fwd_b_wb = 0;
  int n_branch_stall = 0, n_branch_flush = 0, n_jr_redirect = 0;
  int n_jump_flush = 0, n_wt_bypass = 0, n_load_fwd = 0, n_halt = 0;

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (dut.u_forward.a_mem) n_fwd_a_mem++;
    if (dut.u_forward.a_wb && !dut.u_forward.a_mem) n_fwd_a_wb++;
    if (dut.u_forward.b_mem) n_fwd_b_mem++;
    if (dut.u_forward.b_wb && !dut.u_forward.b_mem) n_fwd_b_wb++;
    if ((dut.u_forward.a_wb || dut.u_forward.b_wb) && dut.mem_wb_q.mem_to_reg) n_load_fwd++;
    if (dut.id_ctrl.branch && !dut.pc_we) n_branch_stall++;
    if (dut.ex_redirect && dut.id_ex_q.ctrl.branch) n_branch_flush++;
    if (dut.ex_redirect && dut.id_ex_q.ctrl.jr) n_jr_redirect++;
    if (dut.id_ctrl.jump && dut.if_id_rst) n_jump_flush++;
    if (reg_wr_en && reg_wr_addr != 0 &&
        (reg_wr_addr == dut.id_rs || reg_wr_addr == dut.id_rt) &&
        dut.id_ctrl.reg_write) n_wt_bypass++;
    if (halt) n_halt++;
  end

  word_t prog [$];
  word_t dm_ref [];
  iss_result_t ref_r;
  int halt_cycle;

  function automatic word_t here();
    return TEXT_BASE + 32'(prog.size() * 4);
  endfunction

  initial begin
    word_t looper, looper2, task_a, exit_a, skip_a;
    int jal_idx, exit_idx, skip_idx, beqx_idx;

    // ---- register setup (values used by the instruction demonstrations)
    prog.push_back(ADDI(1, 0, 1));
    prog.push_back(ADDI(2, 0, 2));
    prog.push_back(ADDI(3, 0, 3));
    prog.push_back(ADDI(4, 0, 4));
    prog.push_back(ADDI(5, 0, 5));
    prog.push_back(ADDI(7, 0, 7));
    prog.push_back(ADDI(10, 0, -3));
    // ---- R-type arithmetic and logic
    prog.push_back(ADD (11, 3, 4));    // 7
    prog.push_back(ADDU(12, 5, 10));   // 2
    prog.push_back(SUB (13, 7, 4));    // 3
    prog.push_back(SUBU(14, 10, 5));   // -8
    prog.push_back(AND_(15, 3, 7));    // 3
    prog.push_back(OR_ (16, 3, 7));    // 7
    prog.push_back(XOR_(17, 3, 7));    // 4
    prog.push_back(NOR_(18, 3, 7));    // -8
    prog.push_back(SLT (19, 3, 7));    // 1
    prog.push_back(SLTU(20, 10, 3));   // 0
    prog.push_back(SLL (21, 7, 2));    // 28
    prog.push_back(SLLV(22, 7, 3));    // 56
    prog.push_back(SRL (23, 7, 2));    // 1
    prog.push_back(SRLV(24, 7, 2));    // 1
    prog.push_back(SRA (25, 10, 2));   // -1
    prog.push_back(SRAV(26, 14, 2));   // -2
    prog.push_back(SRL (28, 10, 28));  // 0xF
    // ---- read-after-write chains (forwarding)
    prog.push_back(ADD(11, 1, 2));     // 3
    prog.push_back(ADD(12, 11, 1));    // 4   rs from EX/MEM
    prog.push_back(ADD(13, 11, 1));    // 4   rs from MEM/WB
    prog.push_back(ADD(14, 11, 1));    // 4   rs through the register file
    prog.push_back(ADD(13, 11, 12));   // 7
    prog.push_back(ADD(29, 1, 13));    // 8   rt from EX/MEM
    prog.push_back(SUB(9, 2, 13));     // -5  rt from MEM/WB
    // ---- bne loop: $30 counts to 3
    prog.push_back(ADDI(30, 0, 0));
    looper = here();
    prog.push_back(ADD(30, 30, 1));
    prog.push_back(BNE(30, 3, -2));
    // ---- beq not taken, then lui and the immediates
    prog.push_back(BEQ(30, 1, 1));     // 3 != 1: falls through
    prog.push_back(LUI(27, 5));        // 0x00050000
    prog.push_back(ANDI(15, 5, 7));    // 5
    prog.push_back(ORI (16, 3, 7));    // 7
    prog.push_back(XORI(17, 3, 7));    // 4
    prog.push_back(SLTI(19, 3, 7));    // 1
    prog.push_back(SLTIU(20, 10, 3));  // 0
    prog.push_back(ORI (8, 0, 32'h8001)); // zero-extended: 0x00008001
    prog.push_back(SLTI(6, 10, -2));   // -3 < -2: 1
    // ---- beq taken over one instruction
    prog.push_back(BEQ(16, 11, 1));    // $16 = 7, $11 = 3: not taken
    prog.push_back(BEQ(15, 5, 1));     // taken
    prog.push_back(ADDI(6, 0, 99));    // skipped
    // ---- loads and stores
    prog.push_back(LUI(17, 32'h1001));
    prog.push_back(SW(27, 0, 17));     // base forwarded from EX/MEM
    prog.push_back(SW(21, 4, 17));
    prog.push_back(LW(21, 0, 17));
    prog.push_back(LW(22, 4, 17));
    prog.push_back(NOP());
    prog.push_back(ADD(24, 22, 21));   // loaded words forwarded from MEM/WB
    prog.push_back(ADDI(23, 22, 1));
    prog.push_back(SW(23, 8, 17));     // store data forwarded from EX/MEM
    // ---- jump
    skip_idx = prog.size();
    prog.push_back(32'h0);             // patched: j skip_add
    prog.push_back(ADD(21, 22, 0));    // must be skipped
    skip_a = here();
    prog[skip_idx] = J(skip_a);
    prog.push_back(ADD(21, 0, 0));
    // ---- jal / jr loop: $21 counts to 3
    jal_idx = prog.size();
    prog.push_back(32'h0);             // patched: jal task
    task_a = here();
    prog[jal_idx] = JAL(task_a);
    prog.push_back(ADDI(21, 21, 1));
    beqx_idx = prog.size();
    prog.push_back(32'h0);             // patched: beq $21, $3, exit_task
    prog.push_back(JR(31));
    exit_idx = prog.size();
    prog[beqx_idx] = BEQ(21, 3, exit_idx - beqx_idx - 1);
    prog.push_back(ADDI(2, 0, 10));
    prog.push_back(SYSCALL());
    prog.push_back(ADDI(1, 0, 77));    // must never execute
    prog.push_back(ADDI(2, 0, 77));

    // Load the program; clear the first data words.
    foreach (prog[i]) dut.u_imem.mem[i] = prog[i];
    for (int i = 0; i < 16; i++) dut.u_dmem.mem[i] = '0;
    dm_ref = new[1024];
    foreach (dm_ref[i]) dm_ref[i] = '0;
    ref_r = iss_run(prog, dm_ref, 10000);

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    halt_cycle = -1;
    while (halt_cycle < 0) begin
      @(posedge clk);
      #1;
      if (halt) halt_cycle = cycle;
    end
    repeat (6) @(posedge clk);
    #1;

    checks++;
    if (!ref_r.halted) begin failures++; $display("FAIL reference did not halt"); end
    for (int i = 0; i < 32; i++)
      check($sformatf("reg $%0d", i), dut.u_reg_file.regs[i], ref_r.regs[i]);
    for (int i = 0; i < 16; i++)
      check($sformatf("dmem[%0d]", i), dut.u_dmem.mem[i], dm_ref[i]);
    // Hand-worked values
    check("$11 = 1+2", dut.u_reg_file.regs[11], 32'd3);
    check("$13 chain", dut.u_reg_file.regs[13], 32'd7);
    check("$29 fwd B", dut.u_reg_file.regs[29], 32'd8);
    check("$9 fwd B wb", dut.u_reg_file.regs[9], 32'hFFFF_FFFB);
    check("$30 loop", dut.u_reg_file.regs[30], 32'd3);
    check("$27 lui", dut.u_reg_file.regs[27], 32'h0005_0000);
    check("$8 ori zext", dut.u_reg_file.regs[8], 32'h0000_8001);
    check("$6 beq skipped", dut.u_reg_file.regs[6], 32'd1);
    check("$21 jal loop", dut.u_reg_file.regs[21], 32'd3);
    check("$22 lw", dut.u_reg_file.regs[22], 32'd28);
    check("$24 lw+lw", dut.u_reg_file.regs[24], 32'h0005_001C);
    check("$2 exit code", dut.u_reg_file.regs[2], 32'd10);
    check("$1 not after syscall", dut.u_reg_file.regs[1], 32'd1);
    check("$31 link", dut.u_reg_file.regs[31], task_a);
    check("dmem[0]", dut.u_dmem.mem[0], 32'h0005_0000);
    check("dmem[2]", dut.u_dmem.mem[2], 32'd29);
    // Cycle count
    check("halt cycle", 32'(halt_cycle), 32'(expected_halt_cycle(ref_r)));
    $display("executed=%0d branches=%0d taken=%0d jumps=%0d jr=%0d halt at cycle %0d",
             ref_r.executed, ref_r.n_branch, ref_r.n_taken, ref_r.n_jump, ref_r.n_jr,
             halt_cycle);
    $display("fwdA mem=%0d wb=%0d fwdB mem=%0d wb=%0d loadfwd=%0d wt=%0d",
             n_fwd_a_mem, n_fwd_a_wb, n_fwd_b_mem, n_fwd_b_wb, n_load_fwd, n_wt_bypass);
    $display("branch stall=%0d branch flush=%0d jr=%0d jump flush=%0d halt=%0d",
             n_branch_stall, n_branch_flush, n_jr_redirect, n_jump_flush, n_halt);
    // Every mechanism must have happened
    checks++; if (n_fwd_a_mem == 0)    begin failures++; $display("FAIL no fwd A from EX/MEM"); end
    checks++; if (n_fwd_a_wb == 0)     begin failures++; $display("FAIL no fwd A from MEM/WB"); end
    checks++; if (n_fwd_b_mem == 0)    begin failures++; $display("FAIL no fwd B from EX/MEM"); end
    checks++; if (n_fwd_b_wb == 0)     begin failures++; $display("FAIL no fwd B from MEM/WB"); end
    checks++; if (n_load_fwd == 0)     begin failures++; $display("FAIL no load forwarding"); end
    checks++; if (n_wt_bypass == 0)    begin failures++; $display("FAIL no write-through"); end
    checks++; if (n_branch_stall == 0) begin failures++; $display("FAIL no branch stall"); end
    checks++; if (n_branch_flush == 0) begin failures++; $display("FAIL no taken-branch flush"); end
    checks++; if (n_jr_redirect == 0)  begin failures++; $display("FAIL no jr redirect"); end
    checks++; if (n_jump_flush == 0)   begin failures++; $display("FAIL no jump flush"); end
    checks++; if (n_halt == 0)         begin failures++; $display("FAIL no halt"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
