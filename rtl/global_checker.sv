// global_checker: global runtime self-checker of the SMT DLX pipeline.
//
// Watches, without touching it, the traffic between fetch, decode, issue and
// the complete stage, and raises a sticky error bit per rule:
//   err[0] an instruction of a flushed thread shows up after the flush: once
//          thread t is flushed, no instruction of t fetched before the flush
//          (iid not above the highest iid fetch had produced) may appear at
//          the decode output, the issue output or on the result bus;
//   err[1] issue out of order or twice: per thread, the ids of issued
//          instructions must strictly increase;
//   err[2] fetch or decode misbehave while the next stage is full: a bundle
//          that is not taken must stay unchanged, except for flushed entries;
//   err[3] the same instruction twice in one cycle on the issue lanes or on
//          the result bus;
//   err[4] issue stops feeding the stations: the checker keeps its own count
//          of each thread's instructions in the instruction queue (bundles
//          taken from decode, minus issued ones, zero after a flush); when a
//          thread that is not being flushed has instructions queued, the ROB
//          has a free entry and no reservation station is full (stalled),
//          at least one instruction must issue that cycle.
// The rules follow the design's global self-checker; how each is detected
// (through the unique instruction ids) is our choice.
module global_checker
  import smt_pkg::*;
#(
  parameter int NT      = 8,
  parameter int FW      = 8,
  parameter int ISSUE_W = 8,
  parameter int NFU     = 7,
  parameter int IQ_N    = 32,
  parameter int RSFW    = 4,   // width of a station's free-entry count
  parameter int RBW     = 6    // ROB pointer width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  fetch_t     [FW-1:0]      fq,
  input  uop_t       [FW-1:0]      dq,
  input  logic                     iq_take,
  input  rs_entry_t  [ISSUE_W-1:0] iss,
  input  rob_alloc_t [ISSUE_W-1:0] alloc,
  input  result_t    [NFU-1:0]     cdb,
  input  logic       [NT-1:0]      flush,
  input  logic [NFU-1:0][RSFW-1:0] rs_free,
  input  logic       [RBW:0]       rob_free,
  output logic       [4:0]         err
);
  localparam int TW = (NT > 1) ? $clog2(NT) : 1;

  logic [IID_W-1:0]          max_iid;      // highest iid seen from fetch
  logic [NT-1:0]             cut_v;
  logic [NT-1:0][IID_W-1:0]  cut;          // iids <= cut[t] are flushed
  logic [NT-1:0]             last_v;
  logic [NT-1:0][IID_W-1:0]  last_iss;
  uop_t [FW-1:0]             dq_prev;
  logic                      dq_held;
  logic [NT-1:0]             flush_prev;
  logic [4:0]                bad;
  localparam int QW = $clog2(IQ_N + 1);
  logic [NT-1:0][QW-1:0]     qcnt;         // shadow count of queued instructions
  logic [NT-1:0][QW-1:0]     qcnt_n;

  always_comb begin
    logic [QW-1:0] add, sub;
    add = '0; sub = '0;
    for (int t = 0; t < NT; t++) begin
      add = '0; sub = '0;
      for (int i = 0; i < FW; i++)
        if (iq_take && dq[i].valid && int'(dq[i].tid[TW-1:0]) == t) add = add + 1'b1;
      for (int k = 0; k < ISSUE_W; k++)
        if (alloc[k].valid && int'(alloc[k].tid[TW-1:0]) == t) sub = sub + 1'b1;
      qcnt_n[t] = flush[t] ? '0 : qcnt[t] + add - sub;
    end
  end

  function automatic logic stale(logic [2:0] tid, logic [IID_W-1:0] iid,
                                 logic [NT-1:0] cv, logic [NT-1:0][IID_W-1:0] c);
    return cv[tid[TW-1:0]] && iid <= c[tid[TW-1:0]];
  endfunction

  logic [IID_W-1:0] fq_max;
  always_comb begin
    fq_max = max_iid;
    for (int i = 0; i < FW; i++) if (fq[i].valid && fq[i].iid > fq_max) fq_max = fq[i].iid;
  end

  always_comb begin
    logic [NT-1:0] lv;
    logic [NT-1:0][IID_W-1:0] li;
    logic room, waiting;
    room = 1'b0; waiting = 1'b0;
    bad = '0;
    lv = last_v; li = last_iss;
    for (int i = 0; i < FW; i++)
      if (dq[i].valid && stale(dq[i].tid, dq[i].iid, cut_v, cut)) bad[0] = 1'b1;
    for (int k = 0; k < ISSUE_W; k++) begin
      if (alloc[k].valid) begin
        if (stale(alloc[k].tid, alloc[k].iid, cut_v, cut)) bad[0] = 1'b1;
        if (lv[alloc[k].tid[TW-1:0]] && alloc[k].iid <= li[alloc[k].tid[TW-1:0]]) bad[1] = 1'b1;
        lv[alloc[k].tid[TW-1:0]] = 1'b1;
        li[alloc[k].tid[TW-1:0]] = alloc[k].iid;
      end
      for (int j = 0; j < k; j++)
        if (iss[k].valid && iss[j].valid && iss[k].iid == iss[j].iid) bad[3] = 1'b1;
    end
    for (int f = 0; f < NFU; f++) begin
      if (cdb[f].valid && stale(cdb[f].tid, cdb[f].iid, cut_v, cut)) bad[0] = 1'b1;
      for (int g = 0; g < f; g++)
        if (cdb[f].valid && cdb[g].valid && cdb[f].iid == cdb[g].iid) bad[3] = 1'b1;
    end
    room = (rob_free != '0); waiting = 1'b0;
    for (int k = 0; k < ISSUE_W; k++) if (alloc[k].valid) room = 1'b0;
    for (int f = 0; f < NFU; f++) if (rs_free[f] == '0) room = 1'b0;
    for (int t = 0; t < NT; t++) if (qcnt[t] != '0 && !flush[t]) waiting = 1'b1;
    if (room && waiting) bad[4] = 1'b1;
    if (dq_held)
      for (int i = 0; i < FW; i++)
        if (dq_prev[i].valid && !flush_prev[dq_prev[i].tid[TW-1:0]]
            && (!dq[i].valid || dq[i].iid != dq_prev[i].iid)) bad[2] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err <= '0; max_iid <= '0; cut_v <= '0; cut <= '0;
      last_v <= '0; last_iss <= '0; dq_prev <= '0; dq_held <= 1'b0; flush_prev <= '0;
      qcnt <= '0;
    end else begin
      qcnt <= qcnt_n;
      err <= err | bad;
      max_iid <= fq_max;
      for (int t = 0; t < NT; t++)
        if (flush[t]) begin
          cut_v[t] <= 1'b1;
          cut[t]   <= fq_max;
        end
      for (int k = 0; k < ISSUE_W; k++)
        if (alloc[k].valid) begin
          last_v[alloc[k].tid[TW-1:0]]   <= 1'b1;
          last_iss[alloc[k].tid[TW-1:0]] <= alloc[k].iid;
        end
      dq_prev    <= dq;
      dq_held    <= !iq_take;
      flush_prev <= flush;
    end
  end

  always_ff @(posedge clk)
    if (rst_n) a_protocol: assert (bad == '0) else $warning("pipeline self-check failed: %b", bad);
endmodule
