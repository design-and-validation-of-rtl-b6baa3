// tb_rob: the reorder buffer in a small configuration with random traffic.
// The bench allocates random instructions of two threads (ALU, load, store,
// branch, trap), returns their results out of order, models the data memory
// and checks: commits of a thread follow its allocation order, only finished
// instructions commit, at most COMMIT_W per cycle and one memory operation
// per cycle; a committed load returns the memory word and appears on the load
// lane with its tag; a store writes its address and data; a mispredicted
// branch flushes its thread and redirects it to the branch's actual next pc,
// after which no younger instruction of the thread commits; a TRAP halts its
// thread; free entries and pointers agree (mrp + free = mfp); the operand read
// ports report only finished register results; and one thread commits while
// the other's oldest instruction is still waiting.
`timescale 1ns/1ps
module tb_rob;
  import smt_pkg::*;
  localparam int NT = 2, ROB_N = 8, ISSUE_W = 2, COMMIT_W = 2, NFU = 2, NRD = 2;
  localparam int RBW = $clog2(ROB_N);
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0;
  rob_alloc_t [ISSUE_W-1:0] alloc;
  logic [RBW-1:0] mrp, mfp; logic [RBW:0] free;
  result_t [NFU-1:0] res;
  logic [NRD-1:0][RBW-1:0] rd_tag; logic [NRD-1:0] rd_ok; logic [NRD-1:0][31:0] rd_val;
  commit_t [COMMIT_W-1:0] commit;
  logic [NT-1:0] flush, halt; logic [NT-1:0][31:0] redirect_pc;
  result_t ld_lane;
  logic [31:0] dm_raddr, dm_rdata, dm_waddr, dm_wdata; logic dm_we;
  logic [NT-1:0] tfp_valid; logic [NT-1:0][RBW-1:0] tfp;
  rob #(.NT(NT), .ROB_N(ROB_N), .ISSUE_W(ISSUE_W), .COMMIT_W(COMMIT_W), .NFU(NFU), .NRD(NRD)) dut (.*);

  logic [31:0] mem [64];
  assign dm_rdata = mem[dm_raddr[7:2]];

  typedef struct { int tag; int tid; int iid; kind_e kind; logic done; logic [31:0] value, addr, npc;
                   logic mispred; int rd; } ent_t;
  ent_t ents [$];                     // live entries, allocation order
  int checks = 0, failures = 0, next_iid = 1, n_commit = 0, n_past = 0, n_flush = 0, n_trap = 0, n_ld = 0, n_st = 0;
  int mtag_rear = 0;

  initial begin : watchdog
    repeat (30000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int find(int tag);
    foreach (ents[i]) if (ents[i].tag == tag) return i;
    return -1;
  endfunction

  initial begin
    int cyc;
    alloc = '0; res = '0; rd_tag = '0;
    for (int i = 0; i < 64; i++) mem[i] = $urandom;
    repeat (2) @(negedge clk); rst_n = 1;
    for (cyc = 0; cyc < 4000; cyc++) begin
      int nfree; result_t [NFU-1:0] r_s; rob_alloc_t [ISSUE_W-1:0] a_s;
      logic [NT-1:0] oldest_wait, oldest_ready;
      @(negedge clk);
      // ---- results for random unfinished entries ----
      res = '0;
      for (int f = 0; f < NFU; f++)
        if (ents.size() != 0 && $urandom_range(0, 2) != 0) begin
          int i; i = $urandom_range(0, ents.size() - 1);
          if (!ents[i].done && ents[i].kind != K_TRAP && !(f == 1 && res[0].valid && res[0].tag == 6'(ents[i].tag))) begin
            res[f].valid = 1; res[f].tag = 6'(ents[i].tag); res[f].iid = 32'(ents[i].iid); res[f].tid = 3'(ents[i].tid);
            res[f].value = $urandom; res[f].addr = {24'd0, 6'($urandom), 2'b00};
            res[f].mispred = ($urandom_range(0, 7) == 0); res[f].npc = {20'd0, 10'($urandom), 2'b00};
            res[f].taken = $urandom_range(0, 1);
            res[f].has_val = (ents[i].kind == K_ALU);
          end
        end
      // ---- allocations within the free count ----
      nfree = int'(free);
      alloc = '0;
      if (cyc < 3500)
        for (int k = 0; k < ISSUE_W; k++)
          if (k < nfree && $urandom_range(0, 3) != 0) begin
            int kk;
            alloc[k].valid = 1; alloc[k].tid = 3'($urandom_range(0, NT - 1)); alloc[k].iid = 32'(next_iid++);
            kk = $urandom_range(0, 99);
            alloc[k].kind = (kk < 45) ? K_ALU : (kk < 65) ? K_LOAD : (kk < 80) ? K_STORE : (kk < 97) ? K_BRANCH : K_TRAP;
            alloc[k].rd = (alloc[k].kind == K_ALU || alloc[k].kind == K_LOAD) ? 5'($urandom_range(1, 31)) : 5'd0;
            alloc[k].pc = 32'h100;
          end else break;
      for (int p = 0; p < NRD; p++) rd_tag[p] = RBW'($urandom);
      #1;
      // ---- checks on this cycle's outputs ----
      checks++;
      if (RBW'(mrp + free[RBW-1:0]) != mfp) begin failures++; $display("mrp + free != mfp"); end
      if (int'(mrp) != mtag_rear) begin failures++; $display("rear pointer wrong"); end
      for (int p = 0; p < NRD; p++) begin
        int i; logic eok;
        i = find(int'(rd_tag[p]));
        eok = (i >= 0) && ents[i].done && (ents[i].kind == K_ALU || ents[i].kind == K_BRANCH);
        checks++;
        if (rd_ok[p] !== eok || (eok && rd_val[p] !== ents[i].value)) begin failures++; $display("read port wrong"); end
      end
      oldest_wait = '0; oldest_ready = '0;
      for (int t = 0; t < NT; t++)
        foreach (ents[i]) if (ents[i].tid == t) begin
          oldest_wait[t] = !ents[i].done;
          oldest_ready[t] = ents[i].done && ents[i].kind != K_LOAD && ents[i].kind != K_STORE;
          break;
        end
      begin
        int nmem; logic [NT-1:0] stopped; logic [NT-1:0] committed_t;
        nmem = 0; stopped = '0; committed_t = '0;
        for (int c = 0; c < COMMIT_W; c++) begin
          int i, t;
          if (!commit[c].valid) continue;
          n_commit++;
          i = find(int'(commit[c].tag));
          checks++;
          if (i < 0) begin failures++; $display("commit of unknown tag"); continue; end
          t = ents[i].tid;
          committed_t[t] = 1;
          // it must be the oldest live entry of its thread
          foreach (ents[j]) if (ents[j].tid == t) begin
            if (j != i) begin failures++; $display("thread %0d committed out of order", t); end
            break;
          end
          if (!ents[i].done || stopped[t] || commit[c].iid != 32'(ents[i].iid)) begin failures++; $display("bad commit"); end
          if (ents[i].kind == K_LOAD) begin
            nmem++; n_ld++;
            if (commit[c].value !== mem[ents[i].addr[7:2]] || !ld_lane.valid || ld_lane.tag != 6'(ents[i].tag)
                || ld_lane.value !== mem[ents[i].addr[7:2]]) begin failures++; $display("load wrong"); end
          end
          if (ents[i].kind == K_STORE) begin
            nmem++; n_st++;
            if (!dm_we || dm_waddr !== ents[i].addr || dm_wdata !== ents[i].value) begin failures++; $display("store wrong"); end
          end
          if ((ents[i].kind == K_BRANCH && ents[i].mispred) || ents[i].kind == K_TRAP) begin
            if (!flush[t] || (ents[i].kind == K_BRANCH && redirect_pc[t] !== ents[i].npc)
                || (halt[t] !== (ents[i].kind == K_TRAP))) begin failures++; $display("flush/redirect wrong"); end
            stopped[t] = 1;
            if (ents[i].kind == K_TRAP) n_trap++; else n_flush++;
          end
          if (ents[i].rd != 0 && commit[c].rd != 5'(ents[i].rd)) begin failures++; $display("rd wrong"); end
          ents.delete(i);
        end
        checks++;
        if (nmem > 1) begin failures++; $display("two memory operations in one cycle"); end
        for (int t = 0; t < NT; t++)
          if (committed_t[t] && oldest_wait[1 - t]) n_past++;
        // a thread whose oldest instruction is finished commits, unless the width is used up
        for (int t = 0; t < NT; t++) begin
          int ncv; ncv = 0;
          for (int c = 0; c < COMMIT_W; c++) if (commit[c].valid) ncv++;
          checks++;
          if (oldest_ready[t] && !committed_t[t] && ncv < COMMIT_W) begin
            failures++; $display("thread %0d blocked although its oldest instruction is finished", t);
          end
        end
        for (int t = 0; t < NT; t++) if (flush[t] && !stopped[t]) begin failures++; $display("flush without cause"); end
        // apply flushes: all younger entries of the thread disappear
        for (int t = 0; t < NT; t++)
          if (flush[t]) for (int i = ents.size() - 1; i >= 0; i--) if (ents[i].tid == t) ents.delete(i);
      end
      // memory effect and model updates at the edge
      if (dm_we) mem[dm_waddr[7:2]] = dm_wdata;
      r_s = res; a_s = alloc;
      @(posedge clk); #1;
      for (int f = 0; f < NFU; f++)
        if (r_s[f].valid) begin
          int i; i = find(int'(r_s[f].tag));
          if (i >= 0 && ents[i].iid == int'(r_s[f].iid)) begin
            ents[i].done = 1; ents[i].value = r_s[f].value; ents[i].addr = r_s[f].addr;
            ents[i].npc = r_s[f].npc; ents[i].mispred = r_s[f].mispred;
          end
        end
      for (int k = 0; k < ISSUE_W; k++)
        if (a_s[k].valid) begin
          ent_t e;
          e.tag = (mtag_rear + k) % ROB_N; e.tid = a_s[k].tid; e.iid = a_s[k].iid; e.kind = a_s[k].kind;
          e.done = (a_s[k].kind == K_TRAP); e.value = 0; e.addr = 0; e.npc = 0; e.mispred = 0; e.rd = a_s[k].rd;
          ents.push_back(e);
        end
      for (int k = 0; k < ISSUE_W; k++) if (a_s[k].valid) mtag_rear = (mtag_rear + 1) % ROB_N;
    end
    alloc = '0; res = '0;
    checks++;
    if (n_commit == 0 || n_past == 0 || n_flush == 0 || n_trap == 0 || n_ld == 0 || n_st == 0) begin
      failures++; $display("mechanism missing: commit %0d past %0d flush %0d trap %0d ld %0d st %0d",
                           n_commit, n_past, n_flush, n_trap, n_ld, n_st);
    end
    $display("commits %0d, commits past a waiting thread %0d", n_commit, n_past);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
