// mips_asm_pkg: testbench helpers for the MIPS pipeline.
//
// Instruction encoders (a tiny assembler: one function per instruction
// format) and an instruction-level reference model, iss_run, that executes a
// program one instruction at a time with no pipeline, so the final register
// and memory state of the pipelined core can be compared with it. The model
// also counts the control-flow events the pipeline pays bubbles for, from
// which the testbenches derive the expected cycle count.
package mips_asm_pkg;

  typedef logic [31:0] word_t;

  localparam word_t TEXT_BASE = 32'h0040_0000;
  localparam word_t DATA_BASE = 32'h1001_0000;

  function automatic word_t r_type(int rs, int rt, int rd, int sh, logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction

  function automatic word_t i_type(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic word_t j_type(logic [5:0] op, word_t target);
    return {op, target[27:2]};
  endfunction

  function automatic word_t ADD  (int d, int s, int t); return r_type(s, t, d, 0, 6'h20); endfunction
  function automatic word_t ADDU (int d, int s, int t); return r_type(s, t, d, 0, 6'h21); endfunction
  function automatic word_t SUB  (int d, int s, int t); return r_type(s, t, d, 0, 6'h22); endfunction
  function automatic word_t SUBU (int d, int s, int t); return r_type(s, t, d, 0, 6'h23); endfunction
  function automatic word_t AND_ (int d, int s, int t); return r_type(s, t, d, 0, 6'h24); endfunction
  function automatic word_t OR_  (int d, int s, int t); return r_type(s, t, d, 0, 6'h25); endfunction
  function automatic word_t XOR_ (int d, int s, int t); return r_type(s, t, d, 0, 6'h26); endfunction
  function automatic word_t NOR_ (int d, int s, int t); return r_type(s, t, d, 0, 6'h27); endfunction
  function automatic word_t SLT  (int d, int s, int t); return r_type(s, t, d, 0, 6'h2A); endfunction
  function automatic word_t SLTU (int d, int s, int t); return r_type(s, t, d, 0, 6'h2B); endfunction
  function automatic word_t SLL  (int d, int t, int sh); return r_type(0, t, d, sh, 6'h00); endfunction
  function automatic word_t SRL  (int d, int t, int sh); return r_type(0, t, d, sh, 6'h02); endfunction
  function automatic word_t SRA  (int d, int t, int sh); return r_type(0, t, d, sh, 6'h03); endfunction
  function automatic word_t SLLV (int d, int t, int s); return r_type(s, t, d, 0, 6'h04); endfunction
  function automatic word_t SRLV (int d, int t, int s); return r_type(s, t, d, 0, 6'h06); endfunction
  function automatic word_t SRAV (int d, int t, int s); return r_type(s, t, d, 0, 6'h07); endfunction
  function automatic word_t JR   (int s); return r_type(s, 0, 0, 0, 6'h08); endfunction
  function automatic word_t SYSCALL(); return 32'h0000_000C; endfunction
  function automatic word_t NOP(); return 32'h0000_0000; endfunction
  function automatic word_t ADDI (int t, int s, int imm); return i_type(6'h08, s, t, imm); endfunction
  function automatic word_t SLTI (int t, int s, int imm); return i_type(6'h0A, s, t, imm); endfunction
  function automatic word_t SLTIU(int t, int s, int imm); return i_type(6'h0B, s, t, imm); endfunction
  function automatic word_t ANDI (int t, int s, int imm); return i_type(6'h0C, s, t, imm); endfunction
  function automatic word_t ORI  (int t, int s, int imm); return i_type(6'h0D, s, t, imm); endfunction
  function automatic word_t XORI (int t, int s, int imm); return i_type(6'h0E, s, t, imm); endfunction
  function automatic word_t LUI  (int t, int imm); return i_type(6'h0F, 0, t, imm); endfunction
  function automatic word_t LW   (int t, int off, int s); return i_type(6'h23, s, t, off); endfunction
  function automatic word_t SW   (int t, int off, int s); return i_type(6'h2B, s, t, off); endfunction
  // Branch offsets are in instructions, relative to the next instruction.
  function automatic word_t BEQ  (int s, int t, int off); return i_type(6'h04, s, t, off); endfunction
  function automatic word_t BNE  (int s, int t, int off); return i_type(6'h05, s, t, off); endfunction
  function automatic word_t J    (word_t target); return j_type(6'h02, target); endfunction
  function automatic word_t JAL  (word_t target); return j_type(6'h03, target); endfunction

  // Result of running a program on the reference model.
  typedef struct {
    word_t regs [32];
    int    executed;     // instructions before the syscall
    int    n_branch;     // beq/bne executed
    int    n_taken;      // of which taken
    int    n_jump;       // j/jal executed
    int    n_jr;         // jr executed
    bit    halted;
  } iss_result_t;

  // Execute prog (word index 0 at TEXT_BASE) on the data memory dm (word
  // index 0 at DATA_BASE, DM_WORDS words, upper address bits ignored) until a
  // syscall or max_steps instructions.
  function automatic iss_result_t iss_run(const ref word_t prog [$],
                                          ref word_t dm [], input int max_steps);
    iss_result_t r;
    word_t pc, inst, a, b, imm_s, imm_z, addr;
    int rs, rt, rd, sh, idx;
    logic [5:0] op, fn;
    foreach (r.regs[i]) r.regs[i] = '0;
    r.executed = 0; r.n_branch = 0; r.n_taken = 0; r.n_jump = 0; r.n_jr = 0;
    r.halted = 0;
    pc = TEXT_BASE;
    for (int step = 0; step < max_steps; step++) begin
      idx  = int'((pc - TEXT_BASE) >> 2);
      inst = (idx >= 0 && idx < prog.size()) ? prog[idx] : 32'h0;
      op = inst[31:26]; fn = inst[5:0];
      rs = int'(inst[25:21]); rt = int'(inst[20:16]); rd = int'(inst[15:11]);
      sh = int'(inst[10:6]);
      a = r.regs[rs]; b = r.regs[rt];
      imm_s = {{16{inst[15]}}, inst[15:0]};
      imm_z = {16'h0, inst[15:0]};
      if (op == 6'h00 && fn == 6'h0C) begin
        r.halted = 1;
        return r;
      end
      r.executed++;
      pc = pc + 4;
      case (op)
        6'h00: case (fn)
          6'h20, 6'h21: r.regs[rd] = a + b;
          6'h22, 6'h23: r.regs[rd] = a - b;
          6'h24: r.regs[rd] = a & b;
          6'h25: r.regs[rd] = a | b;
          6'h26: r.regs[rd] = a ^ b;
          6'h27: r.regs[rd] = ~(a | b);
          6'h2A: r.regs[rd] = (signed'(a) < signed'(b)) ? 1 : 0;
          6'h2B: r.regs[rd] = (a < b) ? 1 : 0;
          6'h00: r.regs[rd] = b << sh;
          6'h02: r.regs[rd] = b >> sh;
          6'h03: r.regs[rd] = signed'(b) >>> sh;
          6'h04: r.regs[rd] = b << a[4:0];
          6'h06: r.regs[rd] = b >> a[4:0];
          6'h07: r.regs[rd] = signed'(b) >>> a[4:0];
          6'h08: begin pc = a; r.n_jr++; end
          default: ;
        endcase
        6'h02: begin pc = {pc[31:28], inst[25:0], 2'b00}; r.n_jump++; end
        6'h03: begin r.regs[31] = pc; pc = {pc[31:28], inst[25:0], 2'b00}; r.n_jump++; end
        6'h04, 6'h05: begin
          r.n_branch++;
          if ((a == b) == (op == 6'h04)) begin
            pc = pc + (imm_s << 2);
            r.n_taken++;
          end
        end
        6'h08: r.regs[rt] = a + imm_s;
        6'h0A: r.regs[rt] = (signed'(a) < signed'(imm_s)) ? 1 : 0;
        6'h0B: r.regs[rt] = (a < imm_s) ? 1 : 0;
        6'h0C: r.regs[rt] = a & imm_z;
        6'h0D: r.regs[rt] = a | imm_z;
        6'h0E: r.regs[rt] = a ^ imm_z;
        6'h0F: r.regs[rt] = {inst[15:0], 16'h0};
        6'h23: begin
          addr = a + imm_s;
          r.regs[rt] = dm[(addr >> 2) % dm.size()];
        end
        6'h2B: begin
          addr = a + imm_s;
          dm[(addr >> 2) % dm.size()] = b;
        end
        default: ;
      endcase
      r.regs[0] = '0;
    end
    return r;
  endfunction

  // Cycles from the first clock edge after reset until the syscall sits in
  // ID: one per instruction, plus the bubbles the hazard unit inserts (one
  // per branch, one more per taken branch, two per jr, one per jump).
  function automatic int expected_halt_cycle(iss_result_t r);
    return 1 + r.executed + r.n_branch + r.n_taken + 2 * r.n_jr + r.n_jump;
  endfunction

endpackage
