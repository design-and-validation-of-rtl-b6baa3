// decode_stage: DLX instruction decode of the SMT DLX core.
//
// Turns each fetched DLX instruction into a micro-op (uop_t): which function
// unit class it needs, what the ROB does with it at commit, its source and
// destination registers and its immediate, already sign- or zero-extended
// (logical immediates and ADDUI/SUBUI zero-extend, LHI arrives shifted into
// the upper half). Register 0 as a source or destination means "none".
// Supported: the DLX integer ALU instructions in R and I form, LW, SW, BEQZ,
// BNEZ, J, JAL, JR, JALR and TRAP; any other opcode becomes a no-op (our
// choice: the design runs unmodified DLX code but lists no opcode table).
// Timing: one stage. The decoded bundle sits in register `dq` until the
// instruction queue takes it (`iq_take`); the stage takes a new fetch bundle
// (`take`) whenever `dq` is empty or being taken. Instructions of a thread
// being flushed or halted are dropped. `cnt[t]` gives the number of thread t's
// instructions held here, one half of the fetch heuristic's count.
module decode_stage
  import smt_pkg::*;
#(
  parameter int NT = 8,
  parameter int FW = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  fetch_t [FW-1:0]     fq,
  output logic                take,
  output uop_t   [FW-1:0]     dq,
  input  logic                iq_take,
  input  logic [NT-1:0]       flush,
  output logic [NT-1:0][3:0]  cnt
);
  localparam int TW = (NT > 1) ? $clog2(NT) : 1;

  function automatic uop_t decode(fetch_t f);
    uop_t u;
    logic [31:0] ins, sx16, zx16;
    logic [5:0] op, fn;
    ins  = f.instr;
    op   = ins[31:26];
    fn   = ins[5:0];
    sx16 = {{16{ins[15]}}, ins[15:0]};
    zx16 = {16'd0, ins[15:0]};
    u = '0;
    u.valid = f.valid;
    u.tid = f.tid;
    u.iid = f.iid;
    u.pc = f.pc;
    u.pred_npc = f.pred_npc;
    u.pred_taken = f.pred_taken;
    u.fu = FU_ALU;
    u.kind = K_ALU;
    u.aop = A_ADD;
    u.bop = B_BEQZ;
    u.rs1 = ins[25:21];
    u.use_imm = 1'b1;
    u.rd = ins[20:16];
    u.imm = sx16;
    unique case (op)
      OP_RTYPE: begin
        u.rs2 = ins[20:16];
        u.rd = ins[15:11];
        u.use_imm = 1'b0;
        unique case (fn)
          FN_SLL: u.aop = A_SLL;
          FN_SRL: u.aop = A_SRL;
          FN_SRA: u.aop = A_SRA;
          FN_ADD, FN_ADDU: u.aop = A_ADD;
          FN_SUB, FN_SUBU: u.aop = A_SUB;
          FN_AND: u.aop = A_AND;
          FN_OR:  u.aop = A_OR;
          FN_XOR: u.aop = A_XOR;
          FN_SEQ: u.aop = A_SEQ;
          FN_SNE: u.aop = A_SNE;
          FN_SLT: u.aop = A_SLT;
          FN_SGT: u.aop = A_SGT;
          FN_SLE: u.aop = A_SLE;
          FN_SGE: u.aop = A_SGE;
          default: u.rd = 5'd0;
        endcase
      end
      OP_ADDI:  u.aop = A_ADD;
      OP_ADDUI: begin u.aop = A_ADD; u.imm = zx16; end
      OP_SUBI:  u.aop = A_SUB;
      OP_SUBUI: begin u.aop = A_SUB; u.imm = zx16; end
      OP_ANDI:  begin u.aop = A_AND; u.imm = zx16; end
      OP_ORI:   begin u.aop = A_OR;  u.imm = zx16; end
      OP_XORI:  begin u.aop = A_XOR; u.imm = zx16; end
      OP_LHI:   begin u.aop = A_LHI; u.imm = {ins[15:0], 16'd0}; u.rs1 = 5'd0; end
      OP_SLLI:  u.aop = A_SLL;
      OP_SRLI:  u.aop = A_SRL;
      OP_SRAI:  u.aop = A_SRA;
      OP_SEQI:  u.aop = A_SEQ;
      OP_SNEI:  u.aop = A_SNE;
      OP_SLTI:  u.aop = A_SLT;
      OP_SGTI:  u.aop = A_SGT;
      OP_SLEI:  u.aop = A_SLE;
      OP_SGEI:  u.aop = A_SGE;
      OP_LW: begin u.fu = FU_LDST; u.kind = K_LOAD; end
      OP_SW: begin
        u.fu = FU_LDST; u.kind = K_STORE; u.rs2 = ins[20:16]; u.rd = 5'd0;
      end
      OP_BEQZ, OP_BNEZ: begin
        u.fu = FU_BR; u.kind = K_BRANCH; u.rd = 5'd0;
        u.bop = (op == OP_BEQZ) ? B_BEQZ : B_BNEZ;
      end
      OP_J, OP_JAL: begin
        u.fu = FU_BR; u.kind = K_BRANCH; u.rs1 = 5'd0;
        u.imm = {{6{ins[25]}}, ins[25:0]};
        u.bop = (op == OP_J) ? B_J : B_JAL;
        u.rd  = (op == OP_J) ? 5'd0 : 5'd31;
      end
      OP_JR, OP_JALR: begin
        u.fu = FU_BR; u.kind = K_BRANCH;
        u.bop = (op == OP_JR) ? B_JR : B_JALR;
        u.rd  = (op == OP_JR) ? 5'd0 : 5'd31;
      end
      OP_TRAP: begin
        u.fu = FU_NONE; u.kind = K_TRAP; u.rs1 = 5'd0; u.rd = 5'd0;
      end
      default: begin u.rs1 = 5'd0; u.rd = 5'd0; end   // no-op
    endcase
    return u;
  endfunction

  logic dq_empty;
  always_comb begin
    dq_empty = 1'b1;
    for (int i = 0; i < FW; i++) if (dq[i].valid) dq_empty = 1'b0;
    take = dq_empty || iq_take;
  end

  always_comb begin
    cnt = '0;
    for (int i = 0; i < FW; i++)
      if (dq[i].valid) cnt[dq[i].tid[TW-1:0]] = cnt[dq[i].tid[TW-1:0]] + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < FW; i++) dq[i] <= '0;
    end else begin
      for (int i = 0; i < FW; i++) begin
        if (take) begin
          dq[i] <= decode(fq[i]);
          if (flush[fq[i].tid[TW-1:0]]) dq[i].valid <= 1'b0;
        end else if (flush[dq[i].tid[TW-1:0]]) dq[i].valid <= 1'b0;
      end
    end
  end
endmodule
