// mt_pkg: types and constants shared by the fine-grained multithreaded
// processor (five-stage MIPS-style pipeline with one program counter, one
// register file and thread-tagged pipeline registers per thread) and its
// hardware scheduler engine (nHSE).
//
// The MIPS opcodes are the standard ones. The scheduler instructions are this
// design's own encoding (the architecture only states that the MIPS set is
// extended with instructions that control the scheduler): opcode 0x1C in
// I-format, imm[15:12] = sub-operation, imm[11:8] = scheduler register,
// imm[4:0] = target thread.
package mt_pkg;

  localparam int XLEN        = 32;
  localparam int MAX_THREADS = 32;     // thread tag is 5 bits wide
  localparam int NEV         = 5;      // event sources per thread

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      tid_t;      // thread number = priority (0 highest)
  typedef logic [4:0]      reg_t;

  // Thread STATE register
  typedef enum logic [1:0] {
    TS_IDLE   = 2'd0,
    TS_ACTIVE = 2'd1,
    TS_SLEEP  = 2'd2
  } tstate_e;

  // Event bit positions (Events Block inputs)
  localparam int EV_INT   = 0;
  localparam int EV_TIMER = 1;
  localparam int EV_WDT   = 2;
  localparam int EV_DL1   = 3;
  localparam int EV_DL2   = 4;

  // Forward-unit configurations (hazard/forward configuration table)
  typedef enum logic [2:0] {
    FW_UFW1 = 3'd1,
    FW_UFW2 = 3'd2,
    FW_UFW3 = 3'd3,
    FW_UFW4 = 3'd4,
    FW_NOFW = 3'd5
  } fwcfg_e;

  // Scheduler register numbers (imm[11:8] of MTS / MFS)
  localparam logic [3:0] SR_CTRL  = 4'd0;  // bit0: scheduler enable
  localparam logic [3:0] SR_STATE = 4'd1;  // tstate_e of target thread
  localparam logic [3:0] SR_TYPE  = 4'd2;  // bit0: 1 = hard thread (HT)
  localparam logic [3:0] SR_EVEN  = 4'd3;  // event enable mask
  localparam logic [3:0] SR_TIMER = 4'd4;  // periodic timer period, 0 = off
  localparam logic [3:0] SR_WDT   = 4'd5;  // watchdog reload, 0 = off
  localparam logic [3:0] SR_DL1   = 4'd6;  // deadline 1 (alarm), 0 = off
  localparam logic [3:0] SR_DL2   = 4'd7;  // deadline 2 (fault), 0 = off
  localparam logic [3:0] SR_EVPND = 4'd8;  // pending events, write 1 clears
  localparam logic [3:0] SR_ID    = 4'd9;  // read only: {type, thread number}

  // Scheduler sub-operations (imm[15:12])
  localparam logic [3:0] NOP_MTS  = 4'd0;  // scheduler register <- rt
  localparam logic [3:0] NOP_MFS  = 4'd1;  // rt <- scheduler register
  localparam logic [3:0] NOP_WAIT = 4'd2;  // sleep until an enabled event

  // Opcodes
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_SLTI  = 6'h0A;
  localparam logic [5:0] OP_SLTIU = 6'h0B;
  localparam logic [5:0] OP_ANDI  = 6'h0C;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_XORI  = 6'h0E;
  localparam logic [5:0] OP_LUI   = 6'h0F;
  localparam logic [5:0] OP_NHSE  = 6'h1C;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // R-type function codes
  localparam logic [5:0] FN_SLL  = 6'h00;
  localparam logic [5:0] FN_SRL  = 6'h02;
  localparam logic [5:0] FN_SRA  = 6'h03;
  localparam logic [5:0] FN_SLLV = 6'h04;
  localparam logic [5:0] FN_SRLV = 6'h06;
  localparam logic [5:0] FN_SRAV = 6'h07;
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_NOR  = 6'h27;
  localparam logic [5:0] FN_SLT  = 6'h2A;
  localparam logic [5:0] FN_SLTU = 6'h2B;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  // Decoded control word, produced in ID and carried down the pipeline
  typedef struct packed {
    logic    reg_write;   // writes rf[dst]
    logic    mem_read;    // LW
    logic    mem_write;   // SW
    logic    alu_imm;     // ALU operand B is the immediate
    logic    imm_zext;    // zero-extend the immediate (logical ops)
    logic    shamt_src;   // shift amount from instr[10:6] (else rs[4:0])
    alu_op_e alu_op;
    logic    link;        // JAL: result is PC+4
    logic    branch_eq;   // BEQ
    logic    branch_ne;   // BNE
    logic    jump;        // J / JAL
    logic    jump_reg;    // JR
    logic    use_rs;      // reads rs
    logic    use_rt;      // reads rt
    logic    nhse_mts;    // write scheduler register
    logic    nhse_mfs;    // read scheduler register
    logic    nhse_wait;   // WAIT
    logic    illegal;     // undefined encoding -> exception
    reg_t    dst;         // destination register
  } ctrl_t;

endpackage
