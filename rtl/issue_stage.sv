// issue_stage: shared instruction queue, register renaming and issue of the
// SMT DLX core.
//
// The instruction queue (IQ, IQ_N = 32 entries) is shared by all threads and
// kept in fetch order by compaction. Each cycle the stage scans it from the
// oldest entry and issues up to ISSUE_W instructions. Within a thread issue is
// in order: once an instruction of a thread cannot issue, no younger one of
// that thread issues this cycle; other threads still can, which is how one
// cycle holds instructions of several threads. An instruction issues when a
// reorder buffer (ROB) entry is free and, unless it is a TRAP, a reservation
// station of its class (ALU, load/store, branch) has room; among the stations
// of a class the one with most free room is taken.
// Renaming: a per-thread table records, for each register, whether an
// uncommitted instruction will write it and which ROB entry that is. Issued
// instructions get consecutive ROB entries starting at the ROB's rear
// pointer. A source operand is read from the register file if no write is
// pending, else from the ROB entry if its value is there, else from a common
// data bus lane that carries it this cycle, else the reservation station waits
// for that ROB entry. Writers issued earlier in the same cycle are seen too.
// A table entry is cleared when its writer commits, and all of a thread's
// entries are cleared when the thread is flushed (the flush always comes from
// that thread's oldest instruction, so nothing of it remains in flight).
// Interface: takes the decode bundle (`iq_take`) when the IQ has room for a
// full bundle; sends `iss` to the stations and `alloc` to the ROB in the same
// cycle; `cnt[t]` is thread t's IQ occupancy for the fetch heuristic.
// The IQ size, the 4/2/1 unit mix and the 8-entry stations follow the design;
// the issue width, the station choice and the scan order are our own.
module issue_stage
  import smt_pkg::*;
#(
  parameter int NT       = 8,
  parameter int FW       = 8,
  parameter int IQ_N     = 32,
  parameter int ISSUE_W  = 8,
  parameter int N_ALU    = 4,
  parameter int N_LDST   = 2,
  parameter int N_BR     = 1,
  parameter int RS_DEPTH = 8,
  parameter int ROB_N    = 64,
  parameter int NCDB     = 8,
  parameter int COMMIT_W = 8,
  localparam int NRS  = N_ALU + N_LDST + N_BR,
  localparam int RSFW = $clog2(RS_DEPTH + 1),
  localparam int RBW  = $clog2(ROB_N),
  localparam int CNTW = $clog2(IQ_N + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  uop_t       [FW-1:0]          dq,
  output logic                         iq_take,
  input  logic       [NT-1:0]          flush,
  input  logic       [NRS-1:0][RSFW-1:0] rs_free,
  input  logic       [RBW:0]           rob_free,
  input  logic       [RBW-1:0]         rob_rear,
  input  result_t    [NCDB-1:0]        cdb,
  input  commit_t    [COMMIT_W-1:0]    commit,
  output logic [2*ISSUE_W-1:0][2:0]    rf_tid,
  output logic [2*ISSUE_W-1:0][4:0]    rf_reg,
  input  logic [2*ISSUE_W-1:0][31:0]   rf_data,
  output logic [2*ISSUE_W-1:0][RBW-1:0] rob_rtag,
  input  logic [2*ISSUE_W-1:0]         rob_rok,
  input  logic [2*ISSUE_W-1:0][31:0]   rob_rval,
  output rs_entry_t  [ISSUE_W-1:0]     iss,
  output rob_alloc_t [ISSUE_W-1:0]     alloc,
  output logic       [NT-1:0][CNTW-1:0] cnt
);
  localparam int TW = (NT > 1) ? $clog2(NT) : 1;

  uop_t iq [IQ_N];
  logic [CNTW-1:0] count;
  logic            busy [NT][32];
  logic [RBW-1:0]  rtag [NT][32];

  // ---------------- selection ----------------
  logic [ISSUE_W-1:0]                 sv;      // slot used
  logic [ISSUE_W-1:0][$clog2(IQ_N)-1:0] sidx;  // IQ entry in slot
  logic [ISSUE_W-1:0][2:0]            srs;     // station of slot
  logic [IQ_N-1:0]                    issued;

  // Each queue entry learns whether it issues and in which slot; the slot
  // arrays are then filled by comparing, so no variable is written at a
  // computed index (that keeps the logic free of false loops).
  logic [IQ_N-1:0][$clog2(ISSUE_W+1)-1:0] islot;
  logic [IQ_N-1:0][2:0]                   irs;

  always_comb begin
    logic [NT-1:0] blocked;
    int nis;
    int use_cnt [NRS];
    int lo, hi, best, bestroom;
    logic [TW-1:0] t;
    blocked = flush;
    nis = 0;
    issued = '0; islot = '0; irs = '0;
    lo = 0; hi = -1; best = -1; bestroom = 0; t = '0;
    for (int r = 0; r < NRS; r++) use_cnt[r] = 0;
    for (int i = 0; i < IQ_N; i++) begin
      t = iq[i].tid[TW-1:0];
      if (i < int'(count) && !blocked[t]) begin
        if (nis >= ISSUE_W || nis >= int'(rob_free)) begin
          blocked = '1;
        end else begin
          lo = 0; hi = -1;
          unique case (iq[i].fu)
            FU_ALU:  begin lo = 0;             hi = N_ALU - 1; end
            FU_LDST: begin lo = N_ALU;         hi = N_ALU + N_LDST - 1; end
            FU_BR:   begin lo = N_ALU + N_LDST; hi = NRS - 1; end
            default: ;
          endcase
          best = -1; bestroom = 0;
          for (int r = 0; r < NRS; r++)
            if (r >= lo && r <= hi && int'(rs_free[r]) - use_cnt[r] > bestroom) begin
              best = r; bestroom = int'(rs_free[r]) - use_cnt[r];
            end
          if (iq[i].fu != FU_NONE && best < 0) begin
            for (int b = 0; b < NT; b++) if (b == int'(t)) blocked[b] = 1'b1;
          end else begin
            issued[i] = 1'b1;
            islot[i]  = ($clog2(ISSUE_W+1))'(nis);
            irs[i]    = (best < 0) ? 3'd0 : 3'(best);
            for (int r = 0; r < NRS; r++) if (r == best) use_cnt[r] = use_cnt[r] + 1;
            nis++;
          end
        end
      end
    end
  end

  always_comb begin
    sv = '0; sidx = '0; srs = '0;
    for (int k = 0; k < ISSUE_W; k++)
      for (int i = 0; i < IQ_N; i++)
        if (issued[i] && int'(islot[i]) == k) begin
          sv[k]   = 1'b1;
          sidx[k] = ($clog2(IQ_N))'(i);
          srs[k]  = irs[i];
        end
  end

  // ---------------- operand read ----------------
  logic [ISSUE_W-1:0][RBW-1:0] stag;
  always_comb begin
    for (int k = 0; k < ISSUE_W; k++) begin
      uop_t u;
      u = iq[sidx[k]];
      stag[k] = rob_rear + RBW'(k);
      rf_tid[2*k]   = u.tid;  rf_reg[2*k]   = u.rs1;
      rf_tid[2*k+1] = u.tid;  rf_reg[2*k+1] = u.rs2;
      rob_rtag[2*k]   = rtag[u.tid[TW-1:0]][u.rs1];
      rob_rtag[2*k+1] = rtag[u.tid[TW-1:0]][u.rs2];
    end
  end

  always_comb begin
    logic [4:0] r;
    logic rdy, hit;
    logic [RBW-1:0] q;
    logic [31:0] v;
    r = '0; rdy = 1'b0; hit = 1'b0; q = '0; v = '0;
    for (int k = 0; k < ISSUE_W; k++) begin
      uop_t u;
      u = iq[sidx[k]];
      iss[k]   = '0;
      alloc[k] = '0;
      if (sv[k]) begin
        alloc[k].valid   = 1'b1;
        alloc[k].tid     = u.tid;
        alloc[k].iid     = u.iid;
        alloc[k].pc      = u.pc;
        alloc[k].kind    = u.kind;
        alloc[k].rd      = u.rd;
        alloc[k].is_cond = (u.kind == K_BRANCH) && (u.bop == B_BEQZ || u.bop == B_BNEZ);
        iss[k].valid    = (u.fu != FU_NONE);
        iss[k].rs_id    = srs[k];
        iss[k].tid      = u.tid;
        iss[k].iid      = u.iid;
        iss[k].tag      = 6'(stag[k]);
        iss[k].kind     = u.kind;
        iss[k].aop      = u.aop;
        iss[k].bop      = u.bop;
        iss[k].use_imm  = u.use_imm;
        iss[k].imm      = u.imm;
        iss[k].pc       = u.pc;
        iss[k].pred_npc = u.pred_npc;
        for (int s = 0; s < 2; s++) begin
          r = (s == 0) ? u.rs1 : u.rs2;
          rdy = 1'b1; q = '0; v = 32'd0;
          hit = 1'b0;
          // a writer issued earlier in this cycle
          for (int j = 0; j < ISSUE_W; j++)
            if (j < k && sv[j] && r != 5'd0 && iq[sidx[j]].tid == u.tid && iq[sidx[j]].rd == r) begin
              hit = 1'b1; q = stag[j];
            end
          if (hit) begin
            rdy = 1'b0;
          end else if (r != 5'd0 && busy[u.tid[TW-1:0]][r]) begin
            q = rtag[u.tid[TW-1:0]][r];
            if (rob_rok[2*k+s]) begin
              v = rob_rval[2*k+s];
            end else begin
              rdy = 1'b0;
              for (int c = 0; c < NCDB; c++)
                if (cdb[c].valid && cdb[c].has_val && cdb[c].tag == 6'(q)) begin
                  rdy = 1'b1; v = cdb[c].value;
                end
            end
          end else begin
            v = rf_data[2*k+s];
          end
          if (s == 0) begin iss[k].r1 = rdy; iss[k].q1 = 6'(q); iss[k].v1 = v; end
          else        begin iss[k].r2 = rdy; iss[k].q2 = 6'(q); iss[k].v2 = v; end
        end
      end
    end
  end

  // ---------------- queue update ----------------
  uop_t iq_n [IQ_N];
  int   count_n;
  always_comb begin
    iq_take = (IQ_N - int'(count)) >= FW;
    count_n = 0;
    for (int i = 0; i < IQ_N; i++) iq_n[i] = '0;
    for (int i = 0; i < IQ_N; i++)
      if (i < int'(count) && !issued[i] && !flush[iq[i].tid[TW-1:0]]) begin
        iq_n[count_n] = iq[i];
        count_n++;
      end
    if (iq_take)
      for (int f = 0; f < FW; f++)
        if (dq[f].valid && !flush[dq[f].tid[TW-1:0]] && count_n < IQ_N) begin
          iq_n[count_n] = dq[f];
          count_n++;
        end
  end

  always_comb begin
    cnt = '0;
    for (int i = 0; i < IQ_N; i++)
      if (i < int'(count)) cnt[iq[i].tid[TW-1:0]] = cnt[iq[i].tid[TW-1:0]] + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < IQ_N; i++) iq[i] <= '0;
      for (int t = 0; t < NT; t++)
        for (int r = 0; r < 32; r++) begin
          busy[t][r] <= 1'b0;
          rtag[t][r] <= '0;
        end
    end else begin
      count <= CNTW'(count_n);
      for (int i = 0; i < IQ_N; i++) iq[i] <= iq_n[i];
      for (int c = 0; c < COMMIT_W; c++)
        if (commit[c].valid && commit[c].rd != 5'd0
            && rtag[commit[c].tid[TW-1:0]][commit[c].rd] == RBW'(commit[c].tag))
          busy[commit[c].tid[TW-1:0]][commit[c].rd] <= 1'b0;
      for (int k = 0; k < ISSUE_W; k++)
        if (sv[k] && iq[sidx[k]].rd != 5'd0) begin
          busy[iq[sidx[k]].tid[TW-1:0]][iq[sidx[k]].rd] <= 1'b1;
          rtag[iq[sidx[k]].tid[TW-1:0]][iq[sidx[k]].rd] <= stag[k];
        end
      for (int t = 0; t < NT; t++)
        if (flush[t])
          for (int r = 0; r < 32; r++) busy[t][r] <= 1'b0;
    end
  end
endmodule
