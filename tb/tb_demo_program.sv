// tb_demo_program: the instruction demonstration program, word for word.
//
// Runs the demonstration sequence of the core with data dependency handling
// using the very instruction words of that demonstration (add 00645820,
// bne 17C3FFFE, beq 13C3FFFE, j 08100033, jal 0C100035, jr 03E00008, ...).
// The jump words carry absolute targets, so the program is laid out with the
// j at 0x004000C4, its skipped add at 0x004000C8, skip_add at 0x004000CC, the
// jal at 0x004000D0 and the task loop from 0x004000D4; nops pad the gap after
// the loads. Checks the hand-worked results of each demonstration (including
// the link value 0x004000D4 written to $31 by the jal), the two stored words,
// agreement with the instruction-level reference model, and the cycle count.
module tb_demo_program;
  import mips_asm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [31:0] pc, reg_wr_data, dmem_addr, dmem_data, dmem_out;
  logic [4:0]  reg_wr_addr;
  logic        halt, reg_wr_en, dmem_wr;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int n_link_writes = 0;

  mips_pipeline dut (.*);

  always #5 clk = ~clk;

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

  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  // The jal must write 0x004000D4 to $31 on the write-back bus.
  always @(negedge clk) if (rst_n && reg_wr_en && reg_wr_addr == 5'd31) begin
    check("jal link on write bus", reg_wr_data, 32'h0040_00D4);
    n_link_writes++;
  end

  word_t prog [$];
  word_t dm_ref [];
  iss_result_t ref_r;
  int halt_cycle;

  initial begin
    static word_t words [] = '{
      // ADDI
      32'h20010001, 32'h20020002, 32'h20030003, 32'h20040004, 32'h20050005,
      // ADD SUB ADDU SUBU
      32'h00645820, 32'h00AA6021, 32'h00E46822, 32'h01457023,
      // AND OR XOR NOR
      32'h00677824, 32'h00678025, 32'h00678826, 32'h00679027,
      // SLT SLTU SLL SLLV SRL SRLV
      32'h0067982A, 32'h0143A02B, 32'h0007A880, 32'h0067B004, 32'h0007B882, 32'h0047C006,
      // SRA SRAV
      32'h0003C883, 32'h0043D007,
      // BNE loop, then add
      32'h201E0000, 32'h03C1F020, 32'h17C3FFFE, 32'h00645820,
      // BEQ (not taken) and LUI
      32'h201E0000, 32'h03C1F020, 32'h13C3FFFE, 32'h3C1B0005,
      // ANDI ORI XORI SLTI SLTIU, LUI base
      32'h30AF0007, 32'h34700007, 32'h38710007, 32'h28730007, 32'h2D540003, 32'h3C111001,
      // LW SW
      32'hAE3B0000, 32'hAE350004, 32'h00000000, 32'h8E350000, 32'h8E360004
    };
    // Set $7 and $10 first (their setup is not among the shown words).
    prog.push_back(ADDI(7, 0, 7));
    prog.push_back(ADDI(10, 0, -3));
    foreach (words[i]) prog.push_back(words[i]);
    while (prog.size() < 49) prog.push_back(NOP());      // j lands at 0x004000C4
    prog.push_back(32'h08100033);  // 0xC4 j skip_add
    prog.push_back(32'h02C0A820);  // 0xC8 add $21, $22, $0 (skipped)
    prog.push_back(32'h0000A820);  // 0xCC skip_add: add $21, $0, $0
    prog.push_back(32'h0C100035);  // 0xD0 jal task
    prog.push_back(32'h22B50001);  // 0xD4 task: addi $21, $21, 1
    prog.push_back(32'h12A30001);  // 0xD8 beq $21, $3, exit_task
    prog.push_back(32'h03E00008);  // 0xDC jr $ra
    prog.push_back(32'h2002000A);  // 0xE0 exit_task: addi $2, $0, 10
    prog.push_back(SYSCALL());

    foreach (prog[i]) dut.u_imem.mem[i] = prog[i];
    for (int i = 0; i < 8; i++) dut.u_dmem.mem[i] = '0;
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

    // Hand-worked results of the demonstrations
    check("$1",  dut.u_reg_file.regs[1],  32'd1);
    check("$2 exit code", dut.u_reg_file.regs[2], 32'd10);
    check("$11 add 3+4", dut.u_reg_file.regs[11], 32'd7);
    check("$12 addu -3+5", dut.u_reg_file.regs[12], 32'd2);
    check("$13 sub 7-4", dut.u_reg_file.regs[13], 32'd3);
    check("$14 subu -3-5", dut.u_reg_file.regs[14], 32'hFFFF_FFF8);
    check("$15 andi", dut.u_reg_file.regs[15], 32'd5);
    check("$16 ori", dut.u_reg_file.regs[16], 32'd7);
    check("$17 lui base", dut.u_reg_file.regs[17], 32'h1001_0000);
    check("$18 nor", dut.u_reg_file.regs[18], 32'hFFFF_FFF8);
    check("$19 slti", dut.u_reg_file.regs[19], 32'd1);
    check("$20 sltiu", dut.u_reg_file.regs[20], 32'd0);
    check("$21 task loop", dut.u_reg_file.regs[21], 32'd3);
    check("$22 lw", dut.u_reg_file.regs[22], 32'h0000_001C);
    check("$23 srl", dut.u_reg_file.regs[23], 32'd1);
    check("$24 srlv", dut.u_reg_file.regs[24], 32'd1);
    check("$25 sra", dut.u_reg_file.regs[25], 32'd0);
    check("$27 lui", dut.u_reg_file.regs[27], 32'h0005_0000);
    check("$30 beq loop", dut.u_reg_file.regs[30], 32'd1);
    check("$31 link", dut.u_reg_file.regs[31], 32'h0040_00D4);
    check("mem 0x10010000", dut.u_dmem.mem[0], 32'h0005_0000);
    check("mem 0x10010004", dut.u_dmem.mem[1], 32'h0000_001C);
    check("link written once", 32'(n_link_writes), 32'd1);
    for (int i = 0; i < 32; i++)
      check($sformatf("reg $%0d vs model", i), dut.u_reg_file.regs[i], ref_r.regs[i]);
    check("halt cycle", 32'(halt_cycle), 32'(expected_halt_cycle(ref_r)));
    $display("demo program: %0d instructions, halt at cycle %0d", ref_r.executed, halt_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
