// smt_pkg: types and constants shared by the blocks of the simultaneous
// multithreaded (SMT) DLX core.
//
// The core is a Tomasulo machine with a reorder buffer (ROB). Fetch, decode and
// issue are in order within a thread. Instructions wait in reservation stations
// and run out of order. The ROB commits them back in order, one commit pointer
// per thread. Sizes follow the main configuration of the design: 8 threads,
// 8-wide fetch split 4:2, a 32-entry instruction queue, 8-entry reservation
// queues, 4 ALU + 2 load/store + 1 branch units, a 64-entry ROB that commits
// 8 per cycle and a 512-entry 2-bit branch history table.
// Our own choices: the issue width (8), the memory sizes, the DLX subset
// (integer, word loads and stores) and the use of TRAP as "halt this thread".
package smt_pkg;

  localparam int XLEN = 32;
  localparam int IID_W = 32;       // unique instruction id tag given at fetch

  // DLX primary opcodes (bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'h00, OP_J    = 6'h02, OP_JAL  = 6'h03,
                         OP_BEQZ  = 6'h04, OP_BNEZ = 6'h05, OP_ADDI = 6'h08,
                         OP_ADDUI = 6'h09, OP_SUBI = 6'h0a, OP_SUBUI= 6'h0b,
                         OP_ANDI  = 6'h0c, OP_ORI  = 6'h0d, OP_XORI = 6'h0e,
                         OP_LHI   = 6'h0f, OP_TRAP = 6'h11, OP_JR   = 6'h12,
                         OP_JALR  = 6'h13, OP_SLLI = 6'h14, OP_SRLI = 6'h16,
                         OP_SRAI  = 6'h17, OP_SEQI = 6'h18, OP_SNEI = 6'h19,
                         OP_SLTI  = 6'h1a, OP_SGTI = 6'h1b, OP_SLEI = 6'h1c,
                         OP_SGEI  = 6'h1d, OP_LW   = 6'h23, OP_SW   = 6'h2b;
  // DLX R-type function codes (bits 5:0)
  localparam logic [5:0] FN_SLL = 6'h04, FN_SRL = 6'h06, FN_SRA = 6'h07,
                         FN_ADD = 6'h20, FN_ADDU= 6'h21, FN_SUB = 6'h22,
                         FN_SUBU= 6'h23, FN_AND = 6'h24, FN_OR  = 6'h25,
                         FN_XOR = 6'h26, FN_SEQ = 6'h28, FN_SNE = 6'h29,
                         FN_SLT = 6'h2a, FN_SGT = 6'h2b, FN_SLE = 6'h2c,
                         FN_SGE = 6'h2d;

  typedef enum logic [3:0] {
    A_ADD, A_SUB, A_AND, A_OR, A_XOR, A_SLL, A_SRL, A_SRA,
    A_SEQ, A_SNE, A_SLT, A_SGT, A_SLE, A_SGE, A_LHI
  } alu_op_e;

  // which kind of function unit an instruction needs
  typedef enum logic [1:0] {FU_ALU, FU_LDST, FU_BR, FU_NONE} fu_class_e;

  // what the ROB does with an instruction at commit
  typedef enum logic [2:0] {K_ALU, K_LOAD, K_STORE, K_BRANCH, K_TRAP} kind_e;

  typedef enum logic [2:0] {B_BEQZ, B_BNEZ, B_J, B_JAL, B_JR, B_JALR} br_op_e;

  // decoded instruction (decode stage -> instruction queue)
  typedef struct packed {
    logic            valid;
    logic [2:0]      tid;
    logic [IID_W-1:0] iid;
    logic [XLEN-1:0] pc;
    logic [XLEN-1:0] pred_npc;     // next pc predicted by fetch
    logic            pred_taken;
    fu_class_e       fu;
    kind_e           kind;
    alu_op_e         aop;
    br_op_e          bop;
    logic [4:0]      rs1;          // 0 = operand not used (reads as zero)
    logic [4:0]      rs2;
    logic            use_imm;      // second ALU operand is the immediate
    logic [4:0]      rd;           // 0 = no register result
    logic [XLEN-1:0] imm;
  } uop_t;

  // fetched instruction (fetch -> decode)
  typedef struct packed {
    logic            valid;
    logic [2:0]      tid;
    logic [IID_W-1:0] iid;
    logic [XLEN-1:0] pc;
    logic [XLEN-1:0] instr;
    logic [XLEN-1:0] pred_npc;
    logic            pred_taken;
  } fetch_t;

  // function unit result (FU -> complete stage -> common data bus / ROB)
  typedef struct packed {
    logic            valid;
    logic [2:0]      tid;
    logic [IID_W-1:0] iid;
    logic [5:0]      tag;          // ROB entry
    logic            has_val;      // value is a register result (RS may capture)
    logic [XLEN-1:0] value;        // register result, or store data
    logic [XLEN-1:0] addr;         // effective address of a load/store
    logic            taken;        // branch outcome
    logic [XLEN-1:0] npc;          // actual next pc of a branch
    logic            mispred;
  } result_t;

  // issued instruction (issue stage -> one reservation station)
  typedef struct packed {
    logic            valid;
    logic [2:0]      rs_id;        // reservation station that takes it
    logic [2:0]      tid;
    logic [IID_W-1:0] iid;
    logic [5:0]      tag;          // ROB entry that receives the result
    kind_e           kind;
    alu_op_e         aop;
    br_op_e          bop;
    logic            use_imm;
    logic [XLEN-1:0] imm;
    logic [XLEN-1:0] pc;
    logic [XLEN-1:0] pred_npc;
    logic            r1;           // operand 1 present
    logic [5:0]      q1;           // else: ROB entry that will produce it
    logic [XLEN-1:0] v1;
    logic            r2;
    logic [5:0]      q2;
    logic [XLEN-1:0] v2;
  } rs_entry_t;

  // ROB allocation (issue stage -> ROB), one per issued instruction
  typedef struct packed {
    logic            valid;
    logic [2:0]      tid;
    logic [IID_W-1:0] iid;
    logic [XLEN-1:0] pc;
    kind_e           kind;
    logic [4:0]      rd;
    logic            is_cond;      // conditional branch: trains the BHT
  } rob_alloc_t;

  // committed instruction (ROB -> register file, rename table, BHT)
  typedef struct packed {
    logic            valid;
    logic [2:0]      tid;
    logic [IID_W-1:0] iid;
    logic [5:0]      tag;
    logic [4:0]      rd;           // 0 = nothing to write
    logic [XLEN-1:0] value;
    logic            is_cond;
    logic            taken;
    logic [XLEN-1:0] pc;
  } commit_t;

endpackage
