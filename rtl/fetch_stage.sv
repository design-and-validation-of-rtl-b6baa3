// fetch_stage: program counters and instruction fetch of the SMT DLX core.
//
// Holds one program counter per thread. Each cycle it picks up to FT threads
// and fetches up to FPT consecutive instructions from each (the 4:2 scheme:
// 4 instructions from 2 threads, 8 per cycle). Threads are picked by the
// instruction-count heuristic: the eligible threads with the fewest
// instructions in the decode and instruction-queue stages (icount) go first,
// so that a slow thread cannot clog the shared queue. Ties go round robin.
// Conditional branches are predicted by the shared 2-bit table (bpred); J and
// JAL are always taken; JR and JALR are predicted to fall through. A fetch
// block ends after a predicted-taken branch. A TRAP ends the block and stops
// fetching from its thread until the reorder buffer redirects or halts it.
// Every fetched instruction gets a unique id (iid) from a global counter.
// Interface: the bundle register `fq` (FT*FPT slots, slot = thread slot * FPT
// + position) is consumed when `take` is high; a new bundle is fetched only if
// the register is empty or being consumed. `flush[t]`/`redirect_pc[t]` come
// from the ROB when a mispredicted branch of thread t commits; `halt[t]` when
// its TRAP commits. Both drop t's instructions still in `fq`.
// Our choices: the tie-break, JR/JALR prediction, stopping at TRAP, and no
// alignment of fetch blocks (the caches were not built).
module fetch_stage
  import smt_pkg::*;
#(
  parameter int NT  = 8,
  parameter int FT  = 2,
  parameter int FPT = 4,
  parameter int CW  = 6,            // width of the icount inputs
  localparam int FW = FT * FPT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [NT-1:0]          start_mask,
  input  logic [NT-1:0][31:0]    start_pc,
  input  logic [NT-1:0]          flush,
  input  logic [NT-1:0][31:0]    redirect_pc,
  input  logic [NT-1:0]          halt,
  input  logic [NT-1:0][CW-1:0]  icount,
  output logic [FW-1:0][31:0]    im_addr,
  input  logic [FW-1:0][31:0]    im_data,
  output logic [FW-1:0][31:0]    bp_pc,
  input  logic [FW-1:0]          bp_taken,
  input  logic                   take,
  output fetch_t [FW-1:0]        fq,
  output logic [NT-1:0]          active
);
  localparam int TW = (NT > 1) ? $clog2(NT) : 1;

  logic [NT-1:0][31:0] pc;
  logic [NT-1:0]       stopped;       // fetched a TRAP, waiting for commit
  logic [TW-1:0]       rr;
  logic [IID_W-1:0]    iid_ctr;

  logic                can_fetch;
  logic [FT-1:0]       sel_v;
  logic [FT-1:0][TW-1:0] sel_t;
  fetch_t [FW-1:0]     nb;
  logic [NT-1:0][31:0] pc_n;
  logic [NT-1:0]       stop_n;
  logic [IID_W-1:0]    iid_n;

  always_comb begin
    can_fetch = take;
    if (!take) begin
      can_fetch = 1'b1;
      for (int i = 0; i < FW; i++) if (fq[i].valid) can_fetch = 1'b0;
    end
  end

  // thread selection: FT smallest icounts among eligible threads
  always_comb begin
    logic [NT-1:0] used;
    logic [CW-1:0] best;
    logic [TW-1:0] t;
    used = '0;
    best = '1;
    t = '0;
    sel_v = '0;
    sel_t = '0;
    for (int s = 0; s < FT; s++) begin
      best = '1;
      for (int k = 0; k < NT; k++) begin
        t = TW'((int'(rr) + k) % NT);
        if (can_fetch && active[t] && !stopped[t] && !flush[t] && !halt[t] && !used[t]
            && (!sel_v[s] || icount[t] < best)) begin
          sel_v[s] = 1'b1;
          sel_t[s] = t;
          best = icount[t];
        end
      end
      if (sel_v[s]) used[sel_t[s]] = 1'b1;
    end
  end

  // address generation: consecutive words from each selected thread
  always_comb
    for (int s = 0; s < FT; s++)
      for (int i = 0; i < FPT; i++) begin
        im_addr[s*FPT+i] = pc[sel_t[s]] + 32'(4*i);
        bp_pc[s*FPT+i]   = pc[sel_t[s]] + 32'(4*i);
      end

  // predecode, prediction and bundle formation
  always_comb begin
    logic        live, tk, trap;
    logic [31:0] ins, a, tgt;
    logic [5:0]  op;
    live = 1'b0; tk = 1'b0; trap = 1'b0; ins = '0; a = '0; tgt = '0; op = '0;
    pc_n   = pc;
    stop_n = stopped;
    iid_n  = iid_ctr;
    nb     = '0;
    for (int s = 0; s < FT; s++) begin
      live = sel_v[s];
      for (int i = 0; i < FPT; i++) begin
        ins = im_data[s*FPT+i];
        a   = im_addr[s*FPT+i];
        op  = ins[31:26];
        tk  = 1'b0;
        tgt = a + 32'd4;
        trap = (op == OP_TRAP);
        if (op == OP_BEQZ || op == OP_BNEZ) begin
          tk  = bp_taken[s*FPT+i];
          tgt = a + 32'd4 + {{16{ins[15]}}, ins[15:0]};
        end else if (op == OP_J || op == OP_JAL) begin
          tk  = 1'b1;
          tgt = a + 32'd4 + {{6{ins[25]}}, ins[25:0]};
        end
        if (live) begin
          nb[s*FPT+i].valid      = 1'b1;
          nb[s*FPT+i].tid        = 3'(sel_t[s]);
          nb[s*FPT+i].iid        = iid_n;
          nb[s*FPT+i].pc         = a;
          nb[s*FPT+i].instr      = ins;
          nb[s*FPT+i].pred_taken = tk;
          nb[s*FPT+i].pred_npc   = tk ? tgt : a + 32'd4;
          iid_n = iid_n + 1'b1;
          pc_n[sel_t[s]] = tk ? tgt : a + 32'd4;
          if (trap) stop_n[sel_t[s]] = 1'b1;
          if (tk || trap) live = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      stopped <= '0;
      active  <= '0;
      rr      <= '0;
      iid_ctr <= '0;
      for (int i = 0; i < FW; i++) fq[i] <= '0;
    end else begin
      if (can_fetch) begin
        fq <= nb;
        pc <= pc_n;
        stopped <= stop_n;
        iid_ctr <= iid_n;
        rr <= (int'(rr) == NT - 1) ? '0 : rr + 1'b1;
      end
      for (int i = 0; i < FW; i++) begin
        if (can_fetch) begin
          if (nb[i].valid && (flush[nb[i].tid[TW-1:0]] || halt[nb[i].tid[TW-1:0]])) fq[i].valid <= 1'b0;
        end else if (fq[i].valid && (flush[fq[i].tid[TW-1:0]] || halt[fq[i].tid[TW-1:0]]))
          fq[i].valid <= 1'b0;
      end
      for (int t = 0; t < NT; t++) begin
        if (flush[t]) begin
          pc[t] <= redirect_pc[t];
          stopped[t] <= 1'b0;
        end
        if (halt[t]) active[t] <= 1'b0;
        if (start && start_mask[t]) begin
          pc[t] <= start_pc[t];
          active[t] <= 1'b1;
          stopped[t] <= 1'b0;
        end
      end
    end
  end
endmodule
