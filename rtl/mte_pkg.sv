// Shared types and constants of the multithreaded emulation engine.
//
// The engine is a 4-thread, interleaved-multithreaded, MIPS-compatible
// 32-bit processor with a classical 5-stage pipeline (IF, ID, EX, MEM, WB).
// This package holds the thread/register counts, the MIPS opcode and
// function-field encodings the decoder understands, the enumerations that
// steer the datapath and the decoded control word carried down the pipeline.
// The thread count, register count and register width follow the design
// description (4 threads, 32 x 32-bit registers each); the enumerations and
// the control-word layout are this implementation's own.
package mte_pkg;

  localparam int unsigned NTHREADS = 4;   // hardware threads (1 system + 3 computation)
  localparam int unsigned TID_W    = $clog2(NTHREADS);
  localparam int unsigned NREGS    = 32;  // general purpose registers per thread
  localparam int unsigned XLEN     = 32;

  typedef logic [TID_W-1:0] tid_t;
  typedef logic [XLEN-1:0]  word_t;
  typedef logic [4:0]       reg_idx_t;

  // Thread 0 is the system thread: the only one that takes interrupts.
  localparam tid_t SYSTEM_TID = '0;

  // ---- MIPS primary opcodes -------------------------------------------
  localparam logic [5:0] OP_SPECIAL = 6'h00;
  localparam logic [5:0] OP_REGIMM  = 6'h01;
  localparam logic [5:0] OP_J       = 6'h02;
  localparam logic [5:0] OP_JAL     = 6'h03;
  localparam logic [5:0] OP_BEQ     = 6'h04;
  localparam logic [5:0] OP_BNE     = 6'h05;
  localparam logic [5:0] OP_BLEZ    = 6'h06;
  localparam logic [5:0] OP_BGTZ    = 6'h07;
  localparam logic [5:0] OP_ADDI    = 6'h08;
  localparam logic [5:0] OP_ADDIU   = 6'h09;
  localparam logic [5:0] OP_SLTI    = 6'h0A;
  localparam logic [5:0] OP_SLTIU   = 6'h0B;
  localparam logic [5:0] OP_ANDI    = 6'h0C;
  localparam logic [5:0] OP_ORI     = 6'h0D;
  localparam logic [5:0] OP_XORI    = 6'h0E;
  localparam logic [5:0] OP_LUI     = 6'h0F;
  localparam logic [5:0] OP_COP0    = 6'h10;
  localparam logic [5:0] OP_LB      = 6'h20;
  localparam logic [5:0] OP_LH      = 6'h21;
  localparam logic [5:0] OP_LW      = 6'h23;
  localparam logic [5:0] OP_LBU     = 6'h24;
  localparam logic [5:0] OP_LHU     = 6'h25;
  localparam logic [5:0] OP_SB      = 6'h28;
  localparam logic [5:0] OP_SH      = 6'h29;
  localparam logic [5:0] OP_SW      = 6'h2B;

  // ---- SPECIAL function codes -------------------------------------------
  localparam logic [5:0] FN_SLL   = 6'h00;
  localparam logic [5:0] FN_SRL   = 6'h02;
  localparam logic [5:0] FN_SRA   = 6'h03;
  localparam logic [5:0] FN_SLLV  = 6'h04;
  localparam logic [5:0] FN_SRLV  = 6'h06;
  localparam logic [5:0] FN_SRAV  = 6'h07;
  localparam logic [5:0] FN_JR    = 6'h08;
  localparam logic [5:0] FN_JALR  = 6'h09;
  localparam logic [5:0] FN_MFHI  = 6'h10;
  localparam logic [5:0] FN_MTHI  = 6'h11;
  localparam logic [5:0] FN_MFLO  = 6'h12;
  localparam logic [5:0] FN_MTLO  = 6'h13;
  localparam logic [5:0] FN_MULT  = 6'h18;
  localparam logic [5:0] FN_MULTU = 6'h19;
  localparam logic [5:0] FN_ADD   = 6'h20;
  localparam logic [5:0] FN_ADDU  = 6'h21;
  localparam logic [5:0] FN_SUB   = 6'h22;
  localparam logic [5:0] FN_SUBU  = 6'h23;
  localparam logic [5:0] FN_AND   = 6'h24;
  localparam logic [5:0] FN_OR    = 6'h25;
  localparam logic [5:0] FN_XOR   = 6'h26;
  localparam logic [5:0] FN_NOR   = 6'h27;
  localparam logic [5:0] FN_SLT   = 6'h2A;
  localparam logic [5:0] FN_SLTU  = 6'h2B;

  // ---- COP0 rs field and registers --------------------------------------
  localparam logic [4:0] C0_MF   = 5'h00;
  localparam logic [4:0] C0_MT   = 5'h04;
  localparam logic [5:0] FN_ERET = 6'h18;  // with rs = 5'h10 (CO bit)
  localparam logic [4:0] CP0_STATUS = 5'd12;
  localparam logic [4:0] CP0_CAUSE  = 5'd13;
  localparam logic [4:0] CP0_EPC    = 5'd14;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  typedef enum logic [3:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ, BR_J, BR_JR
  } br_op_e;

  typedef enum logic [1:0] { MEM_B, MEM_H, MEM_W } mem_size_e;

  typedef enum logic [2:0] { WB_ALU, WB_MEM, WB_LINK, WB_HI, WB_LO, WB_CP0 } wb_sel_e;

  typedef enum logic [2:0] { MD_NONE, MD_MULT, MD_MULTU, MD_MTHI, MD_MTLO } md_op_e;

  typedef enum logic [1:0] { IMM_SIGN, IMM_ZERO } imm_kind_e;

  // Decoded control word, produced in ID and carried to WB.
  typedef struct packed {
    alu_op_e   alu_op;
    logic      b_is_imm;     // ALU operand B is the immediate, not rt
    logic      shamt_var;    // shift amount from rs[4:0] instead of shamt
    imm_kind_e imm_kind;
    br_op_e    br_op;
    logic      mem_read;
    logic      mem_write;
    mem_size_e mem_size;
    logic      mem_unsigned;
    logic      reg_write;
    reg_idx_t  dest;
    wb_sel_e   wb_sel;
    md_op_e    md_op;
    logic      cp0_write;
    logic      eret;
    reg_idx_t  cp0_reg;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    alu_op: ALU_ADD, b_is_imm: 1'b0, shamt_var: 1'b0, imm_kind: IMM_SIGN,
    br_op: BR_NONE, mem_read: 1'b0, mem_write: 1'b0, mem_size: MEM_W,
    mem_unsigned: 1'b0, reg_write: 1'b0, dest: '0, wb_sel: WB_ALU,
    md_op: MD_NONE, cp0_write: 1'b0, eret: 1'b0, cp0_reg: '0
  };

endpackage
