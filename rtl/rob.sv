// rob: reorder buffer of the SMT DLX core, with one commit pointer per thread.
//
// A circular queue of ROB_N entries (64) shared by all threads. The issue
// stage allocates entries in order at the main rear pointer (mrp); results
// from the common data bus mark them done. Each cycle up to COMMIT_W (8)
// instructions commit. Commit does not stop at the first unfinished entry:
// every thread has its own front pointer, found each cycle by scanning from
// the main front pointer (mfp), and a thread commits its own instructions in
// order independently of the others, so a slow instruction blocks only its own
// thread. The mfp then moves past every entry that is no longer valid; the
// entries between mrp and mfp are free, so free entries = ROB_N - used and
// mrp + free = mfp (mod ROB_N).
// At commit the ROB also carries out the work the design gives it: register
// results are written to the register file; loads read the data memory and
// their value is broadcast on an extra CDB lane (`ld_lane`) for waiting
// instructions; stores write the data memory; one memory operation per cycle,
// a load waits for the port (loads block, stores do not wait for a reply). A
// mispredicted branch flushes all younger instructions of its thread and
// redirects its fetch (`flush`, `redirect_pc`); a TRAP flushes and halts the
// thread (`halt`). Conditional branches train the branch table (`commit`).
// ROB_N must be a power of two. Our choices: the single memory port, the
// extra load lane and TRAP meaning "halt this thread".
module rob
  import smt_pkg::*;
#(
  parameter int NT       = 8,
  parameter int ROB_N    = 64,
  parameter int ISSUE_W  = 8,
  parameter int COMMIT_W = 8,
  parameter int NFU      = 7,
  parameter int NRD      = 16,
  localparam int RBW = $clog2(ROB_N)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  rob_alloc_t [ISSUE_W-1:0]   alloc,
  output logic       [RBW-1:0]       mrp,
  output logic       [RBW-1:0]       mfp,
  output logic       [RBW:0]         free,
  input  result_t    [NFU-1:0]       res,
  input  logic [NRD-1:0][RBW-1:0]    rd_tag,
  output logic [NRD-1:0]             rd_ok,
  output logic [NRD-1:0][31:0]       rd_val,
  output commit_t    [COMMIT_W-1:0]  commit,
  output logic       [NT-1:0]        flush,
  output logic [NT-1:0][31:0]        redirect_pc,
  output logic       [NT-1:0]        halt,
  output result_t                    ld_lane,
  output logic [31:0]                dm_raddr,
  input  logic [31:0]                dm_rdata,
  output logic                       dm_we,
  output logic [31:0]                dm_waddr,
  output logic [31:0]                dm_wdata,
  output logic [NT-1:0]              tfp_valid,
  output logic [NT-1:0][RBW-1:0]     tfp
);
  localparam int TW = (NT > 1) ? $clog2(NT) : 1;

  typedef struct packed {
    logic            valid;
    logic [2:0]      tid;
    logic [IID_W-1:0] iid;
    logic [31:0]     pc;
    kind_e           kind;
    logic [4:0]      rd;
    logic            is_cond;
    logic            done;
    logic [31:0]     value;
    logic [31:0]     addr;
    logic            taken;
    logic [31:0]     npc;
    logic            mispred;
  } rob_entry_t;

  rob_entry_t q [ROB_N];
  logic [RBW:0] used;

  assign free = (RBW+1)'(ROB_N) - used;

  // operand reads for the issue stage: value present and a register result
  always_comb
    for (int i = 0; i < NRD; i++) begin
      rd_ok[i]  = q[rd_tag[i]].valid && q[rd_tag[i]].done
                  && (q[rd_tag[i]].kind == K_ALU || q[rd_tag[i]].kind == K_BRANCH);
      rd_val[i] = q[rd_tag[i]].value;
    end

  // ---------------- commit scan ----------------
  logic [ROB_N-1:0] clr;
  logic             ld_v;
  logic [RBW-1:0]   ld_idx;
  int               ld_slot;
  commit_t [COMMIT_W-1:0] com;

  always_comb begin
    logic [NT-1:0] blocked;
    int ncom;
    logic memused;
    blocked = '0; ncom = 0; memused = 1'b0;
    clr = '0; com = '0;
    flush = '0; halt = '0; redirect_pc = '0;
    ld_v = 1'b0; ld_idx = '0; ld_slot = 0;
    dm_raddr = '0; dm_we = 1'b0; dm_waddr = '0; dm_wdata = '0;
    tfp_valid = '0; tfp = '0;
    for (int k = 0; k < ROB_N; k++) begin
      logic [RBW-1:0] idx;
      logic [TW-1:0] t;
      logic ok;
      idx = mfp + RBW'(k);
      t = q[idx].tid[TW-1:0];
      ok = 1'b0;
      if (k < int'(used) && q[idx].valid) begin
        if (!tfp_valid[t]) begin
          tfp_valid[t] = 1'b1;
          tfp[t] = idx;
        end
        if (!blocked[t]) begin
          ok = q[idx].done && ncom < COMMIT_W;
          if (q[idx].kind == K_LOAD || q[idx].kind == K_STORE) ok = ok && !memused;
          if (!ok) blocked[t] = 1'b1;
        end
      end
      if (ok) begin
        clr[idx] = 1'b1;
        com[ncom].valid   = 1'b1;
        com[ncom].tid     = q[idx].tid;
        com[ncom].iid     = q[idx].iid;
        com[ncom].tag     = 6'(idx);
        com[ncom].rd      = q[idx].rd;
        com[ncom].value   = q[idx].value;
        com[ncom].is_cond = q[idx].is_cond;
        com[ncom].taken   = q[idx].taken;
        com[ncom].pc      = q[idx].pc;
        unique case (q[idx].kind)
          K_LOAD: begin
            memused = 1'b1;
            dm_raddr = q[idx].addr;
            ld_v = 1'b1; ld_idx = idx; ld_slot = ncom;
          end
          K_STORE: begin
            memused = 1'b1;
            dm_we = 1'b1; dm_waddr = q[idx].addr; dm_wdata = q[idx].value;
          end
          K_BRANCH: if (q[idx].mispred) begin
            flush[t] = 1'b1; redirect_pc[t] = q[idx].npc; blocked[t] = 1'b1;
          end
          K_TRAP: begin
            flush[t] = 1'b1; halt[t] = 1'b1; redirect_pc[t] = q[idx].pc + 32'd4;
            blocked[t] = 1'b1;
          end
          default: ;
        endcase
        ncom++;
      end
    end
  end

  always_comb begin
    commit = com;
    ld_lane = '0;
    if (ld_v) begin
      commit[ld_slot].value = dm_rdata;
      ld_lane.valid   = 1'b1;
      ld_lane.has_val = 1'b1;
      ld_lane.tid     = q[ld_idx].tid;
      ld_lane.iid     = q[ld_idx].iid;
      ld_lane.tag     = 6'(ld_idx);
      ld_lane.value   = dm_rdata;
    end
  end

  // ---------------- pointer advance ----------------
  logic [RBW-1:0] mfp_n;
  int             adv, nalloc;
  always_comb begin
    logic found;
    found = 1'b0;
    adv = int'(used);
    for (int k = 0; k < ROB_N; k++) begin
      logic [RBW-1:0] idx;
      idx = mfp + RBW'(k);
      if (!found && k < int'(used) && q[idx].valid && !clr[idx] && !flush[q[idx].tid[TW-1:0]]) begin
        found = 1'b1;
        adv = k;
      end
    end
    mfp_n = mfp + RBW'(adv);
    nalloc = 0;
    for (int a = 0; a < ISSUE_W; a++) if (alloc[a].valid) nalloc++;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mfp <= '0; mrp <= '0; used <= '0;
      for (int i = 0; i < ROB_N; i++) q[i] <= '0;
    end else begin
      for (int i = 0; i < ROB_N; i++)
        if (clr[i] || (q[i].valid && flush[q[i].tid[TW-1:0]])) q[i].valid <= 1'b0;
      for (int f = 0; f < NFU; f++)
        if (res[f].valid && q[res[f].tag[RBW-1:0]].valid && q[res[f].tag[RBW-1:0]].iid == res[f].iid
            && !flush[res[f].tid[TW-1:0]]) begin
          q[res[f].tag[RBW-1:0]].done    <= 1'b1;
          q[res[f].tag[RBW-1:0]].value   <= res[f].value;
          q[res[f].tag[RBW-1:0]].addr    <= res[f].addr;
          q[res[f].tag[RBW-1:0]].taken   <= res[f].taken;
          q[res[f].tag[RBW-1:0]].npc     <= res[f].npc;
          q[res[f].tag[RBW-1:0]].mispred <= res[f].mispred;
        end
      for (int a = 0; a < ISSUE_W; a++)
        if (alloc[a].valid) begin
          rob_entry_t e;
          e = '0;
          e.valid   = 1'b1;
          e.tid     = alloc[a].tid;
          e.iid     = alloc[a].iid;
          e.pc      = alloc[a].pc;
          e.kind    = alloc[a].kind;
          e.rd      = alloc[a].rd;
          e.is_cond = alloc[a].is_cond;
          e.done    = (alloc[a].kind == K_TRAP);
          q[mrp + RBW'(a)] <= e;
        end
      mfp  <= mfp_n;
      mrp  <= mrp + RBW'(nalloc);
      used <= (RBW+1)'(int'(used) - adv + nalloc);
    end
  end

  // the issue stage never allocates more than the free entries
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 int'(used) + nalloc - adv <= ROB_N);
endmodule
