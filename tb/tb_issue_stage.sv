// tb_issue_stage: the issue stage in a small configuration, surrounded by a
// model of the reservation stations, the ROB, the register file and the CDB.
// Random bundles with many register dependences arrive from decode. The bench
// checks each cycle that issue respects the issue width, the free ROB entries
// and the free room of every station (and the station class), that ROB tags
// are consecutive from the rear pointer, that each thread issues in order,
// and that every source operand is renamed correctly: register file value if
// no write is pending, else the pending writer's value from the ROB or the
// CDB if available this cycle, else a wait on the writer's tag, including
// writers issued earlier in the same cycle. Random flushes remove a thread;
// at the end every instruction that was not flushed has issued exactly once.
`timescale 1ns/1ps
module tb_issue_stage;
  import smt_pkg::*;
  localparam int NT = 2, FW = 4, IQ_N = 8, ISSUE_W = 3, N_ALU = 2, N_LDST = 1, N_BR = 1;
  localparam int RS_DEPTH = 3, ROB_N = 16, NCDB = 2, COMMIT_W = 2;
  localparam int NRS = N_ALU + N_LDST + N_BR, RSFW = $clog2(RS_DEPTH + 1), RBW = $clog2(ROB_N);
  localparam int CNTW = $clog2(IQ_N + 1);
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0;
  uop_t [FW-1:0] dq;
  logic iq_take;
  logic [NT-1:0] flush;
  logic [NRS-1:0][RSFW-1:0] rs_free;
  logic [RBW:0] rob_free;
  logic [RBW-1:0] rob_rear;
  result_t [NCDB-1:0] cdb;
  commit_t [COMMIT_W-1:0] commit;
  logic [2*ISSUE_W-1:0][2:0] rf_tid;
  logic [2*ISSUE_W-1:0][4:0] rf_reg;
  logic [2*ISSUE_W-1:0][31:0] rf_data;
  logic [2*ISSUE_W-1:0][RBW-1:0] rob_rtag;
  logic [2*ISSUE_W-1:0] rob_rok;
  logic [2*ISSUE_W-1:0][31:0] rob_rval;
  rs_entry_t [ISSUE_W-1:0] iss;
  rob_alloc_t [ISSUE_W-1:0] alloc;
  logic [NT-1:0][CNTW-1:0] cnt;
  issue_stage #(.NT(NT), .FW(FW), .IQ_N(IQ_N), .ISSUE_W(ISSUE_W), .N_ALU(N_ALU), .N_LDST(N_LDST),
                .N_BR(N_BR), .RS_DEPTH(RS_DEPTH), .ROB_N(ROB_N), .NCDB(NCDB), .COMMIT_W(COMMIT_W)) dut (.*);

  // ROB model, indexed by tag
  logic m_v [ROB_N], m_done [ROB_N];
  int   m_tid [ROB_N], m_rd [ROB_N], m_iid [ROB_N];
  kind_e m_kind [ROB_N];
  int   rear = 0, used = 0;
  // rename model
  logic pend [NT][32];
  int   ptag [NT][32];
  // in-order bookkeeping
  int   expq [NT][$];          // iids of thread t, in order, not yet issued
  int   issued_cnt = 0, sent = 0, killed = 0;
  int   next_iid = 1;
  int   checks = 0, failures = 0;
  rob_alloc_t [ISSUE_W-1:0] alloc_s;

  function automatic logic [31:0] rfv(logic [2:0] t, logic [4:0] r);
    return (r == 0) ? 32'd0 : {8'hc0, 5'd0, t, 11'd0, r};
  endfunction
  function automatic logic [31:0] robv(int iid);
    return 32'h5000_0000 + 32'(iid);
  endfunction
  always_comb
    for (int i = 0; i < 2 * ISSUE_W; i++) begin
      rf_data[i]  = rfv(rf_tid[i], rf_reg[i]);
      rob_rok[i]  = m_v[rob_rtag[i]] && m_done[rob_rtag[i]] && m_kind[rob_rtag[i]] != K_LOAD;
      rob_rval[i] = robv(m_iid[rob_rtag[i]]);
    end

  function automatic uop_t rnd_uop(int t);
    uop_t u; int k;
    u = '0;
    u.valid = 1'b1; u.tid = 3'(t); u.iid = 32'(next_iid); next_iid++;
    u.rs1 = 5'($urandom_range(0, 4)); u.rs2 = 5'($urandom_range(0, 4)); u.rd = 5'($urandom_range(0, 4));
    k = $urandom_range(0, 99);
    u.fu = FU_ALU; u.kind = K_ALU;
    if (k < 20)      begin u.fu = FU_LDST; u.kind = ($urandom_range(0, 1) != 0) ? K_LOAD : K_STORE; end
    else if (k < 32) begin u.fu = FU_BR; u.kind = K_BRANCH; u.rd = 0; end
    else if (k < 36) begin u.fu = FU_NONE; u.kind = K_TRAP; u.rs1 = 0; u.rs2 = 0; u.rd = 0; end
    if (u.kind == K_STORE) u.rd = 0;
    return u;
  endfunction

  initial begin : watchdog
    repeat (30000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n_cycles;
    dq = '0; flush = '0; rs_free = '0; cdb = '0; commit = '0;
    for (int i = 0; i < ROB_N; i++) begin m_v[i] = 0; m_done[i] = 0; m_iid[i] = 0; m_kind[i] = K_ALU; end
    for (int t = 0; t < NT; t++) for (int r = 0; r < 32; r++) begin pend[t][r] = 0; ptag[t][r] = 0; end
    rob_free = ROB_N; rob_rear = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    n_cycles = 0;
    while (n_cycles < 3000 || used != 0 || expq[0].size() != 0 || expq[1].size() != 0) begin
      int per_rs [NRS];
      logic [NT-1:0] pend_next_v;
      n_cycles++;
      if (n_cycles > 20000) break;
      @(negedge clk);
      // ---- drive inputs ----
      if (n_cycles < 3000 && !dq[0].valid) begin
        for (int f = 0; f < FW; f++) begin
          dq[f] = rnd_uop($urandom_range(0, NT - 1));
          if ($urandom_range(0, 5) == 0) dq[f].valid = 0;
        end
      end
      for (int r = 0; r < NRS; r++) rs_free[r] = RSFW'($urandom_range(0, RS_DEPTH));
      rob_free = (RBW+1)'(ROB_N - used);
      rob_rear = RBW'(rear);
      flush = '0;
      if (n_cycles < 3000 && $urandom_range(0, 30) == 0) flush[$urandom_range(0, NT - 1)] = 1;
      // CDB: results of random not-done entries
      cdb = '0;
      for (int c = 0; c < NCDB; c++) begin
        int q; q = $urandom_range(0, ROB_N - 1);
        if (m_v[q] && !m_done[q] && !flush[m_tid[q]] && $urandom_range(0, 1) != 0) begin
          cdb[c].valid = 1; cdb[c].tag = 6'(q); cdb[c].iid = 32'(m_iid[q]); cdb[c].tid = 3'(m_tid[q]);
          cdb[c].has_val = (m_kind[q] == K_ALU || m_kind[q] == K_BRANCH);
          cdb[c].value = robv(m_iid[q]);
        end
      end
      // commit: oldest entry of each thread if done, by scanning from the front
      commit = '0;
      begin
        int nc; logic [NT-1:0] blk;
        nc = 0; blk = flush;
        for (int k = 0; k < used; k++) begin
          int q; q = (rear - used + k + ROB_N) % ROB_N;
          if (m_v[q] && !blk[m_tid[q]]) begin
            if (m_done[q] && nc < COMMIT_W && $urandom_range(0, 2) != 0) begin
              commit[nc].valid = 1; commit[nc].tid = 3'(m_tid[q]); commit[nc].tag = 6'(q);
              commit[nc].rd = 5'(m_rd[q]); nc++;
            end else blk[m_tid[q]] = 1;
          end
        end
      end
      #1;
      // ---- check outputs ----
      for (int r = 0; r < NRS; r++) per_rs[r] = 0;
      begin
        int nis; logic gap; int wr_tag [NT][32]; logic wr_v [NT][32];
        nis = 0; gap = 0;
        for (int t = 0; t < NT; t++) for (int r = 0; r < 32; r++) wr_v[t][r] = 0;
        for (int k = 0; k < ISSUE_W; k++) begin
          if (!alloc[k].valid) begin gap = 1; continue; end
          checks++;
          if (gap) begin failures++; $display("alloc slots not contiguous"); end
          nis++;
          if (flush[alloc[k].tid]) begin failures++; $display("issued flushed thread"); end
          if (expq[alloc[k].tid].size() == 0 || expq[alloc[k].tid][0] != int'(alloc[k].iid)) begin
            failures++; $display("thread %0d issued %0d out of order", alloc[k].tid, alloc[k].iid);
          end else void'(expq[alloc[k].tid].pop_front());
          if (iss[k].valid) begin
            int lo, hi;
            per_rs[iss[k].rs_id]++;
            lo = (iss[k].kind == K_BRANCH) ? N_ALU + N_LDST : (iss[k].kind == K_LOAD || iss[k].kind == K_STORE) ? N_ALU : 0;
            hi = (iss[k].kind == K_BRANCH) ? NRS - 1 : (iss[k].kind == K_LOAD || iss[k].kind == K_STORE) ? N_ALU + N_LDST - 1 : N_ALU - 1;
            if (int'(iss[k].rs_id) < lo || int'(iss[k].rs_id) > hi) begin failures++; $display("wrong station class"); end
            if (iss[k].tag != 6'((rear + k) % ROB_N)) begin failures++; $display("tag not from rear"); end
            // operands
            for (int s = 0; s < 2; s++) begin
              int r; int t; logic er; int eq; logic [31:0] ev; logic gr; int gq; logic [31:0] gv;
              t = alloc[k].tid;
              r = (s == 0) ? dut.iq[dut.sidx[k]].rs1 : dut.iq[dut.sidx[k]].rs2;
              gr = (s == 0) ? iss[k].r1 : iss[k].r2;
              gq = (s == 0) ? iss[k].q1 : iss[k].q2;
              gv = (s == 0) ? iss[k].v1 : iss[k].v2;
              er = 1; eq = 0; ev = rfv(3'(t), 5'(r));
              if (r != 0 && wr_v[t][r]) begin er = 0; eq = wr_tag[t][r]; end
              else if (r != 0 && pend[t][r]) begin
                eq = ptag[t][r];
                if (m_done[eq] && m_kind[eq] != K_LOAD) ev = robv(m_iid[eq]);
                else begin
                  er = 0;
                  for (int c = 0; c < NCDB; c++)
                    if (cdb[c].valid && cdb[c].has_val && cdb[c].tag == 6'(eq)) begin er = 1; ev = cdb[c].value; end
                end
              end
              checks++;
              if (gr !== er || (er && gv !== ev) || (!er && gq != eq)) begin
                failures++;
                if (failures < 10) $display("operand %0d of iid %0d: got r=%0d q=%0d v=%h exp r=%0d q=%0d v=%h",
                                            s, alloc[k].iid, gr, gq, gv, er, eq, ev);
              end
            end
          end
          if (alloc[k].rd != 0) begin wr_v[alloc[k].tid][alloc[k].rd] = 1; wr_tag[alloc[k].tid][alloc[k].rd] = (rear + k) % ROB_N; end
        end
        checks++;
        if (nis > ISSUE_W || nis > ROB_N - used) begin failures++; $display("too many issued"); end
        for (int r = 0; r < NRS; r++) if (per_rs[r] > int'(rs_free[r])) begin failures++; $display("station %0d overfilled", r); end
        issued_cnt += nis;
      end
      // remember the bundle the stage takes
      if (iq_take)
        for (int f = 0; f < FW; f++)
          if (dq[f].valid) begin
            sent++;
            if (!flush[dq[f].tid]) expq[dq[f].tid].push_back(int'(dq[f].iid)); else killed++;
          end
      alloc_s = alloc;
      @(posedge clk); #1;
      // ---- update models ----
      for (int c = 0; c < COMMIT_W; c++)
        if (commit[c].valid) begin
          if (commit[c].rd != 0 && pend[commit[c].tid][commit[c].rd] && ptag[commit[c].tid][commit[c].rd] == int'(commit[c].tag))
            pend[commit[c].tid][commit[c].rd] = 0;
          m_v[commit[c].tag] = 0;
        end
      for (int c = 0; c < NCDB; c++) if (cdb[c].valid) m_done[cdb[c].tag] = 1;
      for (int k = 0; k < ISSUE_W; k++)
        if (alloc_s[k].valid) begin
          int q; q = (rear + k) % ROB_N;
          m_v[q] = 1; m_done[q] = (alloc_s[k].kind == K_TRAP); m_tid[q] = alloc_s[k].tid; m_rd[q] = alloc_s[k].rd;
          m_iid[q] = alloc_s[k].iid; m_kind[q] = alloc_s[k].kind;
          if (alloc_s[k].rd != 0) begin pend[alloc_s[k].tid][alloc_s[k].rd] = 1; ptag[alloc_s[k].tid][alloc_s[k].rd] = q; end
        end
      for (int t = 0; t < NT; t++)
        if (flush[t]) begin
          for (int r = 0; r < 32; r++) pend[t][r] = 0;
          for (int q = 0; q < ROB_N; q++) if (m_v[q] && m_tid[q] == t) m_v[q] = 0;
          killed += expq[t].size();
          expq[t].delete();
        end
      for (int k = 0; k < ISSUE_W; k++) if (alloc_s[k].valid) rear = (rear + 1) % ROB_N;
      // used = distance from the oldest valid entry to rear
      begin
        int u; u = 0;
        for (int k = 0; k < used + ISSUE_W; k++) begin
          int q; q = (rear - 1 - k + 2 * ROB_N) % ROB_N;
          if (k < ROB_N && m_v[q]) u = k + 1;
        end
        used = u;
      end
      if (iq_take) dq = '0;
      for (int t = 0; t < NT; t++) if (flush[t]) for (int f = 0; f < FW; f++) if (dq[f].tid == 3'(t)) dq[f].valid = 0;
    end
    checks++;
    if (expq[0].size() != 0 || expq[1].size() != 0 || issued_cnt + killed != sent) begin
      failures++; $display("left over: sent %0d issued %0d killed %0d", sent, issued_cnt, killed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
