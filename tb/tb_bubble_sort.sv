// tb_bubble_sort: the bubble-sort application run on the full-size core.
//
// The data segment at 0x10010000 is preloaded with the ten words
// 1, 9, 6, 3, 5, 8, -3, 11, 2, 10. The program is a two-level bubble sort
// (outer counter $16 up to 9, inner counter $17 up to 9 - $16, compare
// neighbours with slt and swap them with two sw when out of order) written
// with no nops except two after each pair of loads, then ten lw that read the
// sorted array back in address order, then addi $2, $0, 10 and syscall. The
// core runs with all parameters at their defaults. Checks: the memory holds
// -3, 1, 2, 3, 5, 6, 8, 9, 10, 11; the ten read-back loads appear on the
// data-memory bus in that order; registers and memory equal the instruction-
// level reference model; and the cycle at which the syscall reaches ID equals
// one per instruction plus the hazard bubbles.
module tb_bubble_sort;
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

  localparam int N = 10;
  word_t init_vals [N] = '{1, 9, 6, 3, 5, 8, -3, 11, 2, 10};
  word_t sorted    [N] = '{-3, 1, 2, 3, 5, 6, 8, 9, 10, 11};

  word_t prog [$];
  word_t dm_ref [];
  iss_result_t ref_r;
  int halt_cycle;
  int readback_idx;
  logic readback_phase;

  // The read-back loads are the only loads from register $23's base with
  // destination $8 after the sort; record the data-memory bus for each.
  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n) begin
    if (readback_phase && dut.ex_mem_q.mem_to_reg && readback_idx < N) begin
      check($sformatf("read-back address %0d", readback_idx), dmem_addr,
            DATA_BASE + 32'(readback_idx * 4));
      check($sformatf("read-back value %0d", readback_idx), dmem_out, sorted[readback_idx]);
      readback_idx++;
    end
  end

  initial begin
    prog.push_back(LUI(1, 32'h1001));
    prog.push_back(ORI(23, 1, 0));
    prog.push_back(ADDI(16, 0, 0));       // outer counter
    prog.push_back(ADDI(19, 0, 9));
    prog.push_back(ADDI(17, 0, 0));       // inner counter
    prog.push_back(ADDI(12, 0, 10));
    prog.push_back(LUI(4, 32'h1010));
    prog.push_back(ORI(4, 4, 4));
    // loop (index 8)
    prog.push_back(SLL(15, 17, 2));
    prog.push_back(ADD(15, 23, 15));
    prog.push_back(LW(8, 0, 15));
    prog.push_back(LW(9, 4, 15));
    prog.push_back(NOP());
    prog.push_back(NOP());
    prog.push_back(SLT(10, 8, 9));
    prog.push_back(BNE(10, 0, 2));        // to increment
    prog.push_back(SW(9, 0, 15));
    prog.push_back(SW(8, 4, 15));
    // increment (index 18)
    prog.push_back(ADDI(17, 17, 1));
    prog.push_back(SUB(21, 19, 16));
    prog.push_back(BNE(17, 21, 8 - 21));  // to loop
    prog.push_back(ADDI(16, 16, 1));
    prog.push_back(ADDI(17, 0, 0));
    prog.push_back(BNE(16, 19, 8 - 24));  // to loop
    for (int k = 0; k < N; k++) prog.push_back(LW(8, 4 * k, 23));
    prog.push_back(ADDI(2, 0, 10));
    prog.push_back(SYSCALL());

    foreach (prog[i]) dut.u_imem.mem[i] = prog[i];
    dm_ref = new[1024];
    foreach (dm_ref[i]) dm_ref[i] = '0;
    for (int i = 0; i < 32; i++) dut.u_dmem.mem[i] = '0;
    for (int i = 0; i < N; i++) begin
      dut.u_dmem.mem[i] = init_vals[i];
      dm_ref[i] = init_vals[i];
    end
    ref_r = iss_run(prog, dm_ref, 100000);

    readback_phase = 1'b0;
    readback_idx = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    halt_cycle = -1;
    while (halt_cycle < 0) begin
      @(posedge clk);
      #1;
      // the read-back loads start once the fetch address passes the sort
      if (dut.id_ex_q.inst == LW(8, 0, 23)) readback_phase = 1'b1;
      if (halt) halt_cycle = cycle;
    end
    repeat (6) @(posedge clk);
    #1;

    checks++;
    if (!ref_r.halted) begin failures++; $display("FAIL reference did not halt"); end
    for (int i = 0; i < N; i++)
      check($sformatf("sorted[%0d]", i), dut.u_dmem.mem[i], sorted[i]);
    for (int i = 0; i < 32; i++)
      check($sformatf("dmem[%0d] vs model", i), dut.u_dmem.mem[i], dm_ref[i]);
    for (int i = 0; i < 32; i++)
      check($sformatf("reg $%0d vs model", i), dut.u_reg_file.regs[i], ref_r.regs[i]);
    check("read-back loads seen", 32'(readback_idx), 32'(N));
    check("halt cycle", 32'(halt_cycle), 32'(expected_halt_cycle(ref_r)));
    $display("bubble sort: %0d instructions, %0d branches (%0d taken), halt at cycle %0d, CPI %0.3f",
             ref_r.executed, ref_r.n_branch, ref_r.n_taken, halt_cycle,
             real'(halt_cycle) / real'(ref_r.executed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
