// mips_pkg: types and constants shared by the five-stage MIPS pipeline.
//
// It holds the instruction encodings (opcodes and R-type function codes) of
// the MIPS subset the core executes, the decoded control word produced in the
// ID stage, the ALU operation codes, and one packed struct per pipeline
// register (IF/ID, ID/EX, EX/MEM, MEM/WB). The fields of the pipeline-register
// structs follow the boxes drawn in the processor schematic: control groups,
// Data1/Data2, PC+4, write address, immediate, JAL flag and the instruction
// word itself. The numeric encodings are the standard MIPS32 ones; the
// internal codes (alu_fn_e, ext_sel_e, alu_op_e) are this design's own.
package mips_pkg;

  localparam int unsigned XLEN = 32;
  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_addr_t;

  // Primary opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_SLTI  = 6'h0A;
  localparam logic [5:0] OP_SLTIU = 6'h0B;
  localparam logic [5:0] OP_ANDI  = 6'h0C;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_XORI  = 6'h0E;
  localparam logic [5:0] OP_LUI   = 6'h0F;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // R-type function codes (instruction bits 5:0)
  localparam logic [5:0] FN_SLL     = 6'h00;
  localparam logic [5:0] FN_SRL     = 6'h02;
  localparam logic [5:0] FN_SRA     = 6'h03;
  localparam logic [5:0] FN_SLLV    = 6'h04;
  localparam logic [5:0] FN_SRLV    = 6'h06;
  localparam logic [5:0] FN_SRAV    = 6'h07;
  localparam logic [5:0] FN_JR      = 6'h08;
  localparam logic [5:0] FN_SYSCALL = 6'h0C;
  localparam logic [5:0] FN_ADD     = 6'h20;
  localparam logic [5:0] FN_ADDU    = 6'h21;
  localparam logic [5:0] FN_SUB     = 6'h22;
  localparam logic [5:0] FN_SUBU    = 6'h23;
  localparam logic [5:0] FN_AND     = 6'h24;
  localparam logic [5:0] FN_OR      = 6'h25;
  localparam logic [5:0] FN_XOR     = 6'h26;
  localparam logic [5:0] FN_NOR     = 6'h27;
  localparam logic [5:0] FN_SLT     = 6'h2A;
  localparam logic [5:0] FN_SLTU    = 6'h2B;

  localparam reg_addr_t RA_REG = 5'd31;  // JAL link register

  // Operation class sent from the main control to the ALU control.
  typedef enum logic [2:0] {
    ALUOP_ADD   = 3'd0,  // lw, sw, addi, lui (rs is $0)
    ALUOP_SUB   = 3'd1,  // beq, bne (compare through Zero)
    ALUOP_RTYPE = 3'd2,  // decode the function field
    ALUOP_SLT   = 3'd3,  // slti
    ALUOP_SLTU  = 3'd4,  // sltiu
    ALUOP_AND   = 3'd5,  // andi
    ALUOP_OR    = 3'd6,  // ori
    ALUOP_XOR   = 3'd7   // xori
  } alu_op_e;

  // Operation performed by the ALU.
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_NOR  = 4'd5,
    ALU_SLT  = 4'd6,
    ALU_SLTU = 4'd7,
    ALU_SLL  = 4'd8,
    ALU_SRL  = 4'd9,
    ALU_SRA  = 4'd10
  } alu_fn_e;

  // Immediate extension mode (Sign Extend / LUI mux of the schematic, plus
  // zero extension for the logical immediates).
  typedef enum logic [1:0] {
    EXT_SIGN = 2'd0,
    EXT_ZERO = 2'd1,
    EXT_LUI  = 2'd2
  } ext_sel_e;

  // Next-PC source chosen by the instruction control.
  typedef enum logic [1:0] {
    PC_SEQ    = 2'd0,  // PC + 4
    PC_BRANCH = 2'd1,  // taken beq/bne, target registered in ID/EX
    PC_JUMP   = 2'd2,  // j/jal, resolved in ID
    PC_JR     = 2'd3   // jr, register value in EX
  } pc_sel_e;

  // Decoded control word of one instruction.
  typedef struct packed {
    logic     reg_dst;    // 1: write rd, 0: write rt
    logic     alu_src;    // 1: ALU B operand is the immediate
    logic     mem_to_reg; // 1: write back DMEM out
    logic     reg_write;
    logic     mem_write;
    logic     branch;     // beq or bne
    logic     bne;        // invert the Zero test
    logic     jump;       // j or jal
    logic     jal;        // write PC+4 to $31
    logic     jr;
    logic     halt;       // syscall
    ext_sel_e ext_sel;
    alu_op_e  alu_op;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '0;

  typedef struct packed {
    word_t pc4;
    word_t inst;
  } if_id_t;

  typedef struct packed {
    ctrl_t     ctrl;
    word_t     data1;
    word_t     data2;
    word_t     pc4;
    word_t     br_target;  // PC+4 + (imm << 2), computed in ID
    reg_addr_t waddr;
    word_t     imm;
    word_t     inst;
  } id_ex_t;

  typedef struct packed {
    logic      reg_write;
    logic      mem_to_reg;
    logic      mem_write;
    logic      jal;
    reg_addr_t waddr;
    word_t     alu_result;
    word_t     pc4;
    word_t     data2;
    word_t     inst;
  } ex_mem_t;

  typedef struct packed {
    logic      reg_write;
    logic      mem_to_reg;
    logic      jal;
    reg_addr_t waddr;
    word_t     dmem_out;
    word_t     alu_result;
    word_t     pc4;
    word_t     inst;
  } mem_wb_t;

endpackage
