// tb_nop_programs: nop-scheduled programs on the core with and without the
// hazard units.
//
// Two copies of the core share clock and reset: dut_base with
// HAZARD_UNITS = 0 (no forwarding, no stalls, no flushes) and dut_full with
// the default configuration. Both run programs scheduled for the earlier core:
// three nops between a register write and its first use (two are enough
// around a jump, because the register file writes through), one nop after
// j/jal, two after jr and three after beq/bne. Programs:
//   1. the instruction demonstration: every instruction, a bne loop, a beq
//      that falls through, loads and stores, a j that skips an add, and a
//      jal/jr loop that counts $21 up to 3. It is laid out as in the
//      demonstration of the earlier core (j at 0x004000F4 to 0x00400100, jal
//      at 0x0040010C to 0x00400114), so the jump words are 08100040 and
//      0C100045 and the jal links 0x00400110;
//   2. bubble sort of 1, 9, 6, 3, 5, 8, -3, 11, 2, 10 with the same padding,
//      followed by ten loads that read the array back;
//   3. a short program with no padding (a back-to-back dependency and a
//      taken beq), which only the full core runs as written: the checks
//      confirm that the earlier core reads the stale register and executes
//      the two instructions behind the branch.
// Branch offsets and jump targets are resolved from labels. For each program
// and each core the testbench compares registers and data memory with the
// instruction-level reference model and checks the halt cycle. Without the
// hazard units every instruction, nops included, costs one cycle, plus two for
// a taken branch or jr (the nops fetched behind them) and one for j/jal. With
// them, the usual bubbles apply. Nops need no special case: a padded program
// also runs correctly on the full core.
module tb_nop_programs;
  import mips_asm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic halt_base, halt_full;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  mips_pipeline #(.HAZARD_UNITS(1'b0)) dut_base (
    .clk, .rst_n, .pc(), .halt(halt_base), .reg_wr_en(), .reg_wr_addr(),
    .reg_wr_data(), .dmem_wr(), .dmem_addr(), .dmem_data(), .dmem_out()
  );

  mips_pipeline dut_full (
    .clk, .rst_n, .pc(), .halt(halt_full), .reg_wr_en(), .reg_wr_addr(),
    .reg_wr_data(), .dmem_wr(), .dmem_addr(), .dmem_data(), .dmem_out()
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  // ------------------------------------------------------------ assembling
  localparam word_t RESET_ADDR = 32'h0040_0000;
  word_t prog [$];
  int    label_at [string];
  int    fix_idx [$];
  string fix_label [$];

  function automatic void emit(word_t w);
    prog.push_back(w);
  endfunction

  function automatic void nops(int n);
    repeat (n) prog.push_back(NOP());
  endfunction

  function automatic void label(string name);
    label_at[name] = prog.size();
  endfunction

  // Branch or jump whose offset or target is filled in by resolve().
  function automatic void emit_to(word_t w, string target);
    fix_idx.push_back(prog.size());
    fix_label.push_back(target);
    prog.push_back(w);
  endfunction

  function automatic void resolve();
    foreach (fix_idx[k]) begin
      int i = fix_idx[k];
      int t = label_at[fix_label[k]];
      if (prog[i][31:26] == 6'h02 || prog[i][31:26] == 6'h03)
        prog[i][25:0] = 26'((RESET_ADDR + 32'(4 * t)) >> 2);
      else
        prog[i][15:0] = 16'(t - (i + 1));
    end
    fix_idx.delete();
    fix_label.delete();
    label_at.delete();
  endfunction

  function automatic void build_demo();
    prog.delete();
    emit(ADDI(7, 0, 7));
    emit(ADDI(10, 0, -3));
    for (int r = 1; r <= 5; r++) emit(ADDI(r, 0, r));
    nops(2);                            // $3/$4/$5 are already 3+ slots back
    emit(ADD(11, 3, 4));
    emit(ADDU(12, 5, 10));
    emit(SUB(13, 7, 4));
    emit(SUBU(14, 10, 5));
    label("looper");
    emit(ADD(30, 30, 1));
    nops(4);
    emit_to(BNE(30, 3, 0), "looper");
    nops(3);
    emit(ADD(11, 3, 4));
    emit(AND_(15, 3, 7));
    emit(OR_(16, 3, 7));
    emit(XOR_(17, 3, 7));
    emit(NOR_(18, 3, 7));
    emit(SLT(19, 3, 7));
    emit(SLTU(20, 10, 3));
    emit(SLL(21, 7, 2));
    emit(SLLV(22, 7, 2));
    emit(SRL(23, 7, 2));
    emit(SRLV(24, 7, 2));
    emit(SRA(25, 3, 2));
    emit(SRAV(26, 3, 2));
    emit(ADDI(30, 0, 0));
    nops(3);
    label("looper_2");
    emit(ADD(30, 30, 1));
    nops(3);
    emit_to(BEQ(30, 3, 0), "looper_2");
    nops(3);
    emit(LUI(27, 5));
    emit(ANDI(15, 5, 7));
    emit(ORI(16, 3, 7));
    emit(XORI(17, 3, 7));
    emit(SLTI(19, 3, 7));
    emit(SLTIU(20, 10, 3));
    emit(LUI(17, 32'h1001));
    nops(3);
    emit(SW(27, 0, 17));
    emit(SW(21, 4, 17));
    emit(LW(21, 0, 17));
    emit(LW(22, 4, 17));
    emit_to(J(0), "skip_add");
    nops(1);
    emit(ADD(21, 22, 0));               // skipped
    label("skip_add");
    emit(ADD(21, 0, 0));
    nops(2);
    emit_to(JAL(0), "task");
    nops(1);
    label("task");
    emit(ADDI(21, 21, 1));
    nops(3);
    emit_to(BEQ(21, 3, 0), "exit_task");
    nops(3);
    emit(JR(31));
    nops(2);
    label("exit_task");
    emit(ADDI(2, 0, 10));
    emit(SYSCALL());
    resolve();
  endfunction

  function automatic void build_sort();
    prog.delete();
    emit(LUI(1, 32'h1001));
    nops(3);
    emit(ORI(23, 1, 0));
    emit(ADDI(16, 0, 0));
    emit(ADDI(19, 0, 9));
    emit(ADDI(17, 0, 0));
    emit(ADDI(12, 0, 10));
    emit(LUI(4, 32'h1010));
    nops(3);
    emit(ORI(4, 4, 4));
    label("loop");
    emit(SLL(15, 17, 2));
    nops(3);
    emit(ADD(15, 23, 15));
    nops(3);
    emit(LW(8, 0, 15));
    emit(LW(9, 4, 15));
    nops(3);
    emit(SLT(10, 8, 9));
    nops(3);
    emit_to(BNE(10, 0, 0), "increment");
    nops(3);
    emit(SW(9, 0, 15));
    emit(SW(8, 4, 15));
    label("increment");
    emit(ADDI(17, 17, 1));
    emit(SUB(21, 19, 16));
    nops(3);
    emit_to(BNE(17, 21, 0), "loop");
    nops(3);
    emit(ADDI(16, 16, 1));
    emit(ADDI(17, 0, 0));
    nops(3);
    emit_to(BNE(16, 19, 0), "loop");
    nops(3);
    for (int k = 0; k < 10; k++) emit(LW(8, 4 * k, 23));
    emit(ADDI(2, 0, 10));
    emit(SYSCALL());
    resolve();
  endfunction

  // ------------------------------------------------------------ running
  word_t init_vals [10] = '{1, 9, 6, 3, 5, 8, -3, 11, 2, 10};

  task automatic run(string name, bit with_data);
    word_t dm_ref [];
    iss_result_t r;
    int halt_base_at, halt_full_at, exp_base, exp_full, start;

    dm_ref = new[1024];
    foreach (dm_ref[i]) dm_ref[i] = '0;
    for (int i = 0; i < 1024; i++) begin
      dut_base.u_imem.mem[i] = (i < prog.size()) ? prog[i] : NOP();
      dut_full.u_imem.mem[i] = (i < prog.size()) ? prog[i] : NOP();
    end
    for (int i = 0; i < 32; i++) begin
      dut_base.u_dmem.mem[i] = '0;
      dut_full.u_dmem.mem[i] = '0;
    end
    if (with_data)
      for (int i = 0; i < 10; i++) begin
        dut_base.u_dmem.mem[i] = init_vals[i];
        dut_full.u_dmem.mem[i] = init_vals[i];
        dm_ref[i] = init_vals[i];
      end
    r = iss_run(prog, dm_ref, 100000);

    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    start = cycle;
    halt_base_at = -1;
    halt_full_at = -1;
    while (halt_base_at < 0 || halt_full_at < 0) begin
      @(posedge clk);
      #1;
      if (halt_base && halt_base_at < 0) halt_base_at = cycle - start;
      if (halt_full && halt_full_at < 0) halt_full_at = cycle - start;
    end
    repeat (6) @(posedge clk);
    #1;

    checks++;
    if (!r.halted) begin failures++; $display("FAIL %s: reference did not halt", name); end
    for (int i = 0; i < 32; i++) begin
      check($sformatf("%s base reg $%0d", name, i), dut_base.u_reg_file.regs[i], r.regs[i]);
      check($sformatf("%s full reg $%0d", name, i), dut_full.u_reg_file.regs[i], r.regs[i]);
      check($sformatf("%s base dmem[%0d]", name, i), dut_base.u_dmem.mem[i], dm_ref[i]);
      check($sformatf("%s full dmem[%0d]", name, i), dut_full.u_dmem.mem[i], dm_ref[i]);
    end
    exp_base = 1 + r.executed + 2 * r.n_taken + 2 * r.n_jr + r.n_jump;
    exp_full = expected_halt_cycle(r);
    check({name, " base halt cycle"}, 32'(halt_base_at), 32'(exp_base));
    check({name, " full halt cycle"}, 32'(halt_full_at), 32'(exp_full));
    $display("%s: %0d words, %0d instructions executed (nops included), halt at cycle %0d without and %0d with the hazard units",
             name, prog.size(), r.executed, halt_base_at, halt_full_at);
  endtask

  // A program without padding shows what the units remove: without them the
  // add reads the stale $1 and both instructions behind the taken beq
  // execute; with them the add sees 5 and the two are flushed.
  task automatic run_unpadded();
    int start;
    prog.delete();
    emit(ADDI(1, 0, 5));
    emit(ADD(2, 1, 1));
    emit(BEQ(0, 0, 2));
    emit(ADDI(3, 0, 1));
    emit(ADDI(4, 0, 1));
    emit(ADDI(5, 0, 1));
    emit(SYSCALL());
    for (int i = 0; i < 16; i++) begin
      dut_base.u_imem.mem[i] = (i < prog.size()) ? prog[i] : NOP();
      dut_full.u_imem.mem[i] = (i < prog.size()) ? prog[i] : NOP();
    end
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    start = cycle;
    while (!(halt_base && halt_full) && cycle - start < 100) @(posedge clk);
    repeat (6) @(posedge clk);
    #1;
    check("unpadded base $2 stale", dut_base.u_reg_file.regs[2], 32'd0);
    check("unpadded full $2 forwarded", dut_full.u_reg_file.regs[2], 32'd10);
    check("unpadded base $3 not flushed", dut_base.u_reg_file.regs[3], 32'd1);
    check("unpadded base $4 not flushed", dut_base.u_reg_file.regs[4], 32'd1);
    check("unpadded full $3 flushed", dut_full.u_reg_file.regs[3], 32'd0);
    check("unpadded full $4 flushed", dut_full.u_reg_file.regs[4], 32'd0);
    check("unpadded base $5", dut_base.u_reg_file.regs[5], 32'd1);
    check("unpadded full $5", dut_full.u_reg_file.regs[5], 32'd1);
  endtask

  initial begin
    build_demo();
    run("demo", 1'b0);
    // hand-worked results of the demonstration
    check("demo $11", dut_base.u_reg_file.regs[11], 32'd7);
    check("demo $14", dut_base.u_reg_file.regs[14], 32'hFFFF_FFF8);
    check("demo $18", dut_base.u_reg_file.regs[18], 32'hFFFF_FFF8);
    check("demo $21 task loop", dut_base.u_reg_file.regs[21], 32'd3);
    check("demo $22 lw", dut_base.u_reg_file.regs[22], 32'h0000_001C);
    check("demo $27 lui", dut_base.u_reg_file.regs[27], 32'h0005_0000);
    check("demo $30 beq loop", dut_base.u_reg_file.regs[30], 32'd1);
    check("demo mem 0x10010000", dut_base.u_dmem.mem[0], 32'h0005_0000);
    // the layout gives the demonstration's jump words and link value
    check("demo j word at 0x004000F4", prog[61], 32'h0810_0040);
    check("demo jal word at 0x0040010C", prog[67], 32'h0C10_0045);
    check("demo base $31 link", dut_base.u_reg_file.regs[31], 32'h0040_0110);
    check("demo full $31 link", dut_full.u_reg_file.regs[31], 32'h0040_0110);

    build_sort();
    run("bubble sort", 1'b1);
    begin
      static word_t sorted [10] = '{-3, 1, 2, 3, 5, 6, 8, 9, 10, 11};
      for (int i = 0; i < 10; i++)
        check($sformatf("sorted[%0d]", i), dut_base.u_dmem.mem[i], sorted[i]);
    end
    run_unpadded();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
