// Shared types and constants of the SPUR-style CPU.
//
// Word and register formats follow the design: 40-bit registers made of a
// 6-bit type tag, a 2-bit generation number and 32 data bits; 32-bit
// instructions whose field boundaries (opcode 31:25, Rd/Cond 24:20,
// Rs1 19:15, immediate flag 14, Rs2 13:9, call address 27:0) are those of
// the published instruction formats. The numeric opcode values, the
// condition codes, the cache opcodes, the trap causes and the PSW bit
// layout are not published; the values below are this design's own.
package spur_pkg;

  localparam int unsigned NREG_PHYS = 138;  // 10 globals + 8 windows * 16
  localparam int unsigned NGLOBAL   = 10;
  localparam int unsigned NWINDOW   = 8;
  localparam int unsigned PREG_W    = 8;    // physical register index width

  typedef struct packed {
    logic [5:0]  ttype;  // object type tag
    logic [1:0]  gen;    // generation number
    logic [31:0] data;
  } word40_t;

  // Primary opcodes, bits 31:25. Call and jump use only bits 31:28.
  typedef enum logic [6:0] {
    OP_NOP     = 7'h00,
    OP_ADD     = 7'h01, OP_SUB  = 7'h02, OP_AND = 7'h03, OP_OR = 7'h04, OP_XOR = 7'h05,
    OP_SLL     = 7'h06, OP_SRL  = 7'h07, OP_SRA = 7'h08,
    OP_EXTRACT = 7'h09, OP_INSERT = 7'h0A,
    OP_RD_TAG  = 7'h0B, OP_WR_TAG = 7'h0C,
    OP_ADD_T   = 7'h0D, OP_SUB_T  = 7'h0E,
    OP_LD      = 7'h10, OP_LD_T   = 7'h11,
    OP_ST      = 7'h12, OP_ST_40  = 7'h13,
    OP_LD_S0   = 7'h18, OP_LD_S1 = 7'h19, OP_LD_S2 = 7'h1A, OP_LD_S3 = 7'h1B,
    OP_LD_S4   = 7'h1C, OP_LD_S5 = 7'h1D, OP_LD_S6 = 7'h1E,
    OP_ST_S0   = 7'h20, OP_ST_S1 = 7'h21, OP_ST_S2 = 7'h22,
    OP_RD_SPEC = 7'h28, OP_WR_SPEC = 7'h29,
    OP_RETURN  = 7'h2A, OP_RETT = 7'h2B,
    OP_CMPBR   = 7'h30, OP_CMPBR_TAG = 7'h31,
    OP_FP_FIRST = 7'h40, OP_FP_LD = 7'h52, OP_FP_ST = 7'h53
  } opcode_t;

  localparam logic [3:0] OP4_CALL = 4'hE;
  localparam logic [3:0] OP4_JUMP = 4'hF;

  // Compare-and-branch conditions (Cond field, 24:20)
  typedef enum logic [4:0] {
    C_EQ = 5'd0, C_NE = 5'd1, C_LT = 5'd2, C_LE = 5'd3, C_GT = 5'd4, C_GE = 5'd5,
    C_LTU = 5'd6, C_LEU = 5'd7, C_GTU = 5'd8, C_GEU = 5'd9, C_ALWAYS = 5'd10
  } cond_t;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0, ALU_SUB = 3'd1, ALU_AND = 3'd2, ALU_OR = 3'd3, ALU_XOR = 3'd4
  } alu_op_t;

  typedef enum logic [2:0] {
    RES_ALU = 3'd0, RES_SHIFT = 3'd1, RES_EXTRACT = 3'd2, RES_INSERT = 3'd3,
    RES_RDTAG = 3'd4, RES_WRTAG = 3'd5, RES_SPEC = 3'd6, RES_LINK = 3'd7
  } res_sel_t;

  // Cache opcodes sent to the MMU/CC (4 bits)
  typedef enum logic [3:0] {
    CO_NONE = 4'd0, CO_IFETCH = 4'd1, CO_PREFETCH = 4'd2, CO_LOAD = 4'd3, CO_STORE = 4'd4,
    CO_LD_S0 = 4'd5, CO_LD_S6 = 4'd11, CO_ST_S0 = 4'd12, CO_ST_S2 = 4'd14,
    CO_RSVD = 4'd15
  } cache_op_t;

  // Trap causes, in priority order (lowest number wins)
  typedef enum logic [3:0] {
    TC_FAULT = 4'd0, TC_ILLEGAL = 4'd1, TC_WOVF = 4'd2, TC_WUNF = 4'd3,
    TC_TAG = 4'd4, TC_GEN = 4'd5, TC_OVF = 4'd6, TC_FPU = 4'd7, TC_INTR = 4'd8,
    TC_NONE = 4'd15
  } trap_cause_t;

  // KPSW bit positions
  localparam int unsigned K_TRAP_EN  = 0;  // master trap enable
  localparam int unsigned K_INTR_EN  = 1;
  localparam int unsigned K_FPEXC_EN = 2;
  localparam int unsigned K_IU_EN    = 3;  // instruction cache enable
  localparam int unsigned K_IU_PF    = 4;  // prefetch enable
  localparam int unsigned K_FPU_EN   = 5;
  localparam int unsigned K_KERNEL   = 6;
  localparam int unsigned K_VIRTUAL  = 7;
  // UPSW bit positions
  localparam int unsigned U_OVF_EN = 0;
  localparam int unsigned U_TAG_EN = 1;
  localparam int unsigned U_GEN_EN = 2;

  localparam logic [5:0] TAG_FIXNUM = 6'd0;
  localparam logic [5:0] TAG_PAIR   = 6'd1;

  localparam logic [29:0] TRAP_BASE = 30'h0000_0040; // word address of vector 0
  localparam int unsigned TRAP_VEC_WORDS = 4;         // words per vector entry

  // High-level control word produced by the opcode decoder (master control)
  typedef struct packed {
    logic      legal;       // opcode is defined (and allowed in this FPU mode)
    logic      rd_a;        // reads Rs1
    logic      rd_b;        // reads Rs2 (when the immediate flag is clear)
    logic      wr_rd;       // writes a register
    alu_op_t   alu_op;
    res_sel_t  res_sel;
    logic [1:0] shift_kind; // 0 left, 1 right logical, 2 right arithmetic
    logic      is_load;     // reads external cache into Rd
    logic      is_store;    // writes Rs2 to external cache
    logic      store_imm;   // store immediate format
    logic      chk_data;    // data type check (both fixnum)
    logic      chk_ptr;     // pointer type check on Rs1
    logic      chk_gen;     // generation check (ST_40)
    logic      chk_ovf;     // integer overflow check
    logic      is_branch;
    logic      is_tag_branch;
    logic      is_call;
    logic      is_jump;
    logic      is_return;
    logic      is_rett;
    logic      wr_spec;
    logic      is_fpu;      // any coprocessor instruction
    logic      fpu_mem;     // coprocessor load or store: CPU makes the address
    cache_op_t cache_op;
  } ctrl_t;

endpackage
