// aports_pkg: types and constants shared by the A-Ports blocks.
//
// It holds two groups of declarations. The first is the simulation-control
// mode that every module controller receives (free run, resynchronise,
// single step). The second is the instruction set of the 5-stage in-order
// target and the message types carried on the A-Ports that join its five
// model modules (inst, decinst, execres, result, resteer, wbinfo).
//
// The target executes a small MIPS subset (the published design only says "a subset
// of the MIPS ISA"); the exact list of instructions, the absence of branch
// delay slots and the use of BREAK as a halt are choices of this design.
package aports_pkg;

  // Simulation-control mode seen by every module controller.
  typedef enum logic [1:0] {
    MODE_RUN    = 2'd0,  // simulate whenever the inputs allow (decoupled)
    MODE_RESYNC = 2'd1,  // only modules that are behind may advance
    MODE_STEP   = 2'd2   // one model cycle per step pulse (after quiescence)
  } sim_mode_t;

  // ---------------------------------------------------------------------
  // Target ISA: MIPS-subset opcodes and function codes
  // ---------------------------------------------------------------------
  localparam logic [5:0] OPC_SPECIAL = 6'h00;
  localparam logic [5:0] OPC_J       = 6'h02;
  localparam logic [5:0] OPC_JAL     = 6'h03;
  localparam logic [5:0] OPC_BEQ     = 6'h04;
  localparam logic [5:0] OPC_BNE     = 6'h05;
  localparam logic [5:0] OPC_ADDIU   = 6'h09;
  localparam logic [5:0] OPC_SLTI    = 6'h0A;
  localparam logic [5:0] OPC_SLTIU   = 6'h0B;
  localparam logic [5:0] OPC_ANDI    = 6'h0C;
  localparam logic [5:0] OPC_ORI     = 6'h0D;
  localparam logic [5:0] OPC_XORI    = 6'h0E;
  localparam logic [5:0] OPC_LUI     = 6'h0F;
  localparam logic [5:0] OPC_LW      = 6'h23;
  localparam logic [5:0] OPC_SW      = 6'h2B;

  localparam logic [5:0] FN_SLL   = 6'h00;
  localparam logic [5:0] FN_SRL   = 6'h02;
  localparam logic [5:0] FN_SRA   = 6'h03;
  localparam logic [5:0] FN_JR    = 6'h08;
  localparam logic [5:0] FN_BREAK = 6'h0D;
  localparam logic [5:0] FN_ADDU  = 6'h21;
  localparam logic [5:0] FN_SUBU  = 6'h23;
  localparam logic [5:0] FN_AND   = 6'h24;
  localparam logic [5:0] FN_OR    = 6'h25;
  localparam logic [5:0] FN_XOR   = 6'h26;
  localparam logic [5:0] FN_NOR   = 6'h27;
  localparam logic [5:0] FN_SLT   = 6'h2A;
  localparam logic [5:0] FN_SLTU  = 6'h2B;

  // Decoded operation carried from DEC to EXE.
  typedef enum logic [4:0] {
    OP_NOP, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOR, OP_SLT, OP_SLTU,
    OP_SLL, OP_SRL, OP_SRA, OP_LUI, OP_LW, OP_SW, OP_BEQ, OP_BNE, OP_J,
    OP_JAL, OP_JR, OP_HALT,
    OP_REPLAY  // scoreboard stall: refetch this instruction's pc
  } op_t;

  typedef enum logic [1:0] {MEM_NONE, MEM_LOAD, MEM_STORE} mem_op_t;

  // ---------------------------------------------------------------------
  // A-Port message payloads (the NoMessage bit is added by the A-Port)
  // ---------------------------------------------------------------------
  // FET -> DEC
  typedef struct packed {
    logic [31:0] pc;
    logic [31:0] instr;
    logic [31:0] pred_npc;  // next pc predicted by the fetch module
    logic [1:0]  bht_ctr;   // branch-history counter read at fetch
    logic        epoch;
  } inst_msg_t;

  // DEC -> EXE
  typedef struct packed {
    op_t         op;
    logic        epoch;
    logic [31:0] pc;
    logic [31:0] a;        // rs value
    logic [31:0] b;        // rt value
    logic [31:0] imm;      // extended immediate or shift amount
    logic [31:0] target;   // branch / jump target (for JR: unused)
    logic [4:0]  rd;
    logic        wr;       // writes rd
    logic [31:0] pred_npc;
    logic [1:0]  bht_ctr;
  } dec_msg_t;

  // EXE -> MEM
  typedef struct packed {
    mem_op_t     mem_op;
    logic [31:0] addr;
    logic [31:0] value;    // ALU result or store data
    logic [4:0]  rd;
    logic        wr;       // writes rd
    logic        kill;     // squashed: only releases the scoreboard entry of rd
    logic        halt;
  } exe_msg_t;

  // MEM -> WB
  typedef struct packed {
    logic [31:0] value;
    logic [4:0]  rd;
    logic        wr;
    logic        kill;
    logic        halt;
  } res_msg_t;

  // WB -> DEC
  typedef struct packed {
    logic [4:0]  rd;
    logic [31:0] value;
    logic        wr;       // 1: write the register file; 0: release only
  } wb_msg_t;

  // EXE -> FET
  typedef struct packed {
    logic        redirect;  // fetch must restart at npc (new epoch)
    logic [31:0] npc;
    logic        upd_bht;   // write new_ctr into the branch predictor
    logic        upd_btb;   // write target into the branch target buffer
    logic [31:0] br_pc;     // pc of the resolved branch / jump
    logic [1:0]  new_ctr;
    logic [31:0] target;
    logic        is_jump;
  } resteer_msg_t;

  localparam int unsigned INST_W    = $bits(inst_msg_t);
  localparam int unsigned DEC_W     = $bits(dec_msg_t);
  localparam int unsigned EXE_W     = $bits(exe_msg_t);
  localparam int unsigned RES_W     = $bits(res_msg_t);
  localparam int unsigned WB_W      = $bits(wb_msg_t);
  localparam int unsigned RESTEER_W = $bits(resteer_msg_t);

endpackage
