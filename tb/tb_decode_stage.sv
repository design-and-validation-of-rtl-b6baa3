// tb_decode_stage: feeds DLX encodings of every supported kind and checks the
// decoded fields against expectations written here; checks the one-cycle
// latency, that the bundle is held while the queue does not take it, that a
// flush removes the thread's instructions, and the per-thread counts.
`timescale 1ns/1ps
module tb_decode_stage;
  import smt_pkg::*;
  localparam int NT = 8, FW = 8;
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0;
  fetch_t [FW-1:0] fq;
  logic take, iq_take;
  uop_t [FW-1:0] dq;
  logic [NT-1:0] flush;
  logic [NT-1:0][3:0] cnt;
  int checks = 0, failures = 0;
  decode_stage #(.NT(NT), .FW(FW)) dut (.*);

  typedef struct { logic [31:0] ins; fu_class_e fu; kind_e kind; int rs1, rs2, rd; logic use_imm;
                   logic [31:0] imm; alu_op_e aop; br_op_e bop; } exp_t;
  exp_t ex [FW];
  logic vb [FW];
  logic [2:0] tb_tid [FW];

  function automatic exp_t mk(int sel);
    exp_t e;
    int a, b, d; logic [15:0] im;
    a = $urandom_range(1, 31); b = $urandom_range(1, 31); d = $urandom_range(1, 31);
    im = 16'($urandom);
    e.fu = FU_ALU; e.kind = K_ALU; e.rs1 = a; e.rs2 = 0; e.rd = b; e.use_imm = 1;
    e.imm = {{16{im[15]}}, im}; e.aop = A_ADD; e.bop = B_BEQZ;
    case (sel)
      0: begin e.ins = {6'h0, 5'(a), 5'(b), 5'(d), 5'd0, FN_SUB}; e.rs2 = b; e.rd = d; e.use_imm = 0; e.aop = A_SUB; end
      1: begin e.ins = {6'h0, 5'(a), 5'(b), 5'(d), 5'd0, FN_SGE}; e.rs2 = b; e.rd = d; e.use_imm = 0; e.aop = A_SGE; end
      2: begin e.ins = {OP_ADDI, 5'(a), 5'(b), im}; end
      3: begin e.ins = {OP_ANDI, 5'(a), 5'(b), im}; e.imm = {16'd0, im}; e.aop = A_AND; end
      4: begin e.ins = {OP_LHI, 5'(a), 5'(b), im}; e.imm = {im, 16'd0}; e.aop = A_LHI; e.rs1 = 0; end
      5: begin e.ins = {OP_LW, 5'(a), 5'(b), im}; e.fu = FU_LDST; e.kind = K_LOAD; end
      6: begin e.ins = {OP_SW, 5'(a), 5'(b), im}; e.fu = FU_LDST; e.kind = K_STORE; e.rs2 = b; e.rd = 0; end
      7: begin e.ins = {OP_BNEZ, 5'(a), 5'(0), im}; e.fu = FU_BR; e.kind = K_BRANCH; e.rd = 0; e.bop = B_BNEZ; end
      8: begin e.ins = {OP_JAL, 26'h3ffff00}; e.fu = FU_BR; e.kind = K_BRANCH; e.rs1 = 0; e.rd = 31;
                e.bop = B_JAL; e.imm = 32'hffffff00; end
      9: begin e.ins = {OP_JR, 5'(a), 21'd0}; e.fu = FU_BR; e.kind = K_BRANCH; e.rd = 0; e.bop = B_JR; e.imm = 0; end
      10: begin e.ins = {OP_TRAP, 26'd0}; e.fu = FU_NONE; e.kind = K_TRAP; e.rs1 = 0; e.rd = 0; end
      default: begin e.ins = {OP_SRAI, 5'(a), 5'(b), im}; e.aop = A_SRA; end
    endcase
    return e;
  endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    fq = '0; iq_take = 1; flush = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [NT-1:0] fl;
      int exp_cnt [NT];
      @(negedge clk);
      for (int i = 0; i < FW; i++) begin
        ex[i] = mk($urandom_range(0, 11));
        fq[i] = '0;
        fq[i].valid = ($urandom_range(0, 7) != 0);
        fq[i].tid = 3'($urandom_range(0, 3));
        fq[i].iid = 32'(n * FW + i);
        fq[i].pc = 32'h100 + 4 * i;
        fq[i].instr = ex[i].ins;
      end
      checks++;
      if (!take) failures++;
      @(negedge clk);
      // decoded bundle is present one cycle later
      for (int t = 0; t < NT; t++) exp_cnt[t] = 0;
      for (int i = 0; i < FW; i++) begin
        checks++;
        if (dq[i].valid !== fq[i].valid || dq[i].iid !== fq[i].iid || dq[i].fu !== ex[i].fu
            || dq[i].kind !== ex[i].kind || dq[i].rs1 !== 5'(ex[i].rs1) || dq[i].rs2 !== 5'(ex[i].rs2)
            || dq[i].rd !== 5'(ex[i].rd)
            || (ex[i].fu != FU_NONE && ex[i].kind != K_BRANCH && ex[i].use_imm && dq[i].imm !== ex[i].imm)
            || (ex[i].fu == FU_ALU && (dq[i].aop !== ex[i].aop || dq[i].use_imm !== ex[i].use_imm))
            || (ex[i].fu == FU_BR && dq[i].bop !== ex[i].bop)
            || (ex[i].bop == B_JAL && dq[i].imm !== ex[i].imm)) begin
          failures++;
          if (failures < 5) $display("slot %0d instr %h decoded wrong", i, ex[i].ins);
        end
        if (fq[i].valid) exp_cnt[fq[i].tid]++;
      end
      for (int t = 0; t < NT; t++) begin checks++; if (int'(cnt[t]) != exp_cnt[t]) failures++; end
      // hold: the queue refuses; the bundle must stay, take must be low
      iq_take = 0;
      fl = '0; fl[$urandom_range(0, 3)] = 1'b1;
      for (int i = 0; i < FW; i++) vb[i] = fq[i].valid;
      for (int i = 0; i < FW; i++) tb_tid[i] = fq[i].tid;
      fq = '0;
      @(negedge clk);
      checks++;
      if (take) failures++;
      flush = fl;
      @(negedge clk);
      flush = '0;
      for (int i = 0; i < FW; i++) begin
        checks++;
        if (dq[i].valid !== (vb[i] && !fl[tb_tid[i]])
            || (dq[i].valid && dq[i].iid !== 32'(n * FW + i))) begin
          failures++;
          if (failures < 5) $display("hold/flush wrong in slot %0d", i);
        end
      end
      iq_take = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
