// tb_fetch_stage: drives the fetch stage against a random program held in a
// memory model, random instruction counts, random consumption of the bundle,
// random flushes and halts. A model of the thread program counters checks
// every bundle: it must come from the eligible threads with the smallest
// counts, hold consecutive instructions from each thread's pc, end after a
// predicted-taken branch or a TRAP, carry the right predicted next pc and
// strictly increasing ids; a bundle not taken must stay; a flushed thread
// restarts at the redirect pc; a halted thread is no longer fetched.
`timescale 1ns/1ps
module tb_fetch_stage;
  import smt_pkg::*;
  localparam int NT = 8, FT = 2, FPT = 4, CW = 6, FW = FT * FPT;
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0;
  logic start; logic [NT-1:0] start_mask; logic [NT-1:0][31:0] start_pc;
  logic [NT-1:0] flush, halt; logic [NT-1:0][31:0] redirect_pc;
  logic [NT-1:0][CW-1:0] icount;
  logic [FW-1:0][31:0] im_addr, im_data, bp_pc;
  logic [FW-1:0] bp_taken;
  logic take;
  fetch_t [FW-1:0] fq;
  logic [NT-1:0] active;
  fetch_stage #(.NT(NT), .FT(FT), .FPT(FPT), .CW(CW)) dut (.*);

  logic [31:0] mem [1024];
  always_comb
    for (int i = 0; i < FW; i++) begin
      im_data[i]  = mem[im_addr[i][11:2]];
      bp_taken[i] = bp_pc[i][4];
    end

  int checks = 0, failures = 0;
  logic [31:0] mpc [NT];
  logic mact [NT], mstop [NT];
  logic [31:0] last_iid;
  int sel_two = 0;
  logic [FT-1:0] sv;
  logic [FT-1:0][2:0] st;

  initial begin : watchdog
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      int k; k = $urandom_range(0, 99);
      if (k < 60)      mem[i] = {6'h0, 5'd1, 5'd2, 5'd3, 5'd0, FN_ADD};
      else if (k < 75) mem[i] = {OP_BEQZ, 5'd1, 5'd0, 16'(4 * $urandom_range(0, 40) - 80)};
      else if (k < 84) mem[i] = {OP_J, 26'(4 * $urandom_range(0, 40) - 60)};
      else if (k < 90) mem[i] = {OP_TRAP, 26'd0};
      else             mem[i] = {OP_JR, 5'd4, 21'd0};
    end
    start = 0; start_mask = '0; flush = '0; halt = '0; take = 0; icount = '0;
    for (int t = 0; t < NT; t++) begin
      start_pc[t] = 32'h400 + 32'h40 * t; redirect_pc[t] = 0;
      mpc[t] = start_pc[t]; mact[t] = 1; mstop[t] = 0;
    end
    last_iid = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; start_mask = '1;
    @(posedge clk); #1 start = 0; start_mask = '0;
    for (int n = 0; n < 3000; n++) begin
      logic cf; logic [NT-1:0] elig; fetch_t [FW-1:0] old;
      @(negedge clk);
      flush = '0; halt = '0;
      for (int t = 0; t < NT; t++) icount[t] = CW'($urandom_range(0, 12));
      take = ($urandom_range(0, 9) < 7);
      if ($urandom_range(0, 3) == 0) begin
        int t; t = $urandom_range(0, NT - 1);
        flush[t] = 1; redirect_pc[t] = 32'h400 + 4 * $urandom_range(0, 200);
        if ($urandom_range(0, 5) == 0) halt[t] = 1;
      end
      if ($urandom_range(0, 40) == 0) begin     // restart a halted thread
        for (int t = 0; t < NT; t++) if (!mact[t]) begin
          start = 1; start_mask = '0; start_mask[t] = 1; start_pc[t] = 32'h400 + 8 * t;
        end
      end
      cf = take;
      if (!take) begin cf = 1; for (int i = 0; i < FW; i++) if (fq[i].valid) cf = 0; end
      for (int t = 0; t < NT; t++) elig[t] = mact[t] && !mstop[t] && !flush[t] && !halt[t];
      old = fq;
      #1;
      sv = dut.sel_v; st = dut.sel_t;
      @(posedge clk); #1;
      start = 0;
      if (cf) begin
        logic [NT-1:0] seen; int ngroups;
        seen = '0; ngroups = 0;
        for (int s = 0; s < FT; s++) begin
          int t; logic live; logic [31:0] p;
          if (!sv[s]) continue;
          t = int'(st[s]);
          ngroups++;
          checks++;
          if (!elig[t] || seen[t]) begin failures++; $display("thread %0d not eligible", t); end
          for (int u = 0; u < NT; u++)
            if (elig[u] && !seen[u] && u != t && icount[u] < icount[t] && !(s == 1 && u == int'(st[0]))) begin
              failures++; $display("thread %0d picked over %0d with smaller count act=%b stop=%b mstop=%0d n=%0d", t, u, dut.active, dut.stopped, mstop[u], n);
            end
          seen[t] = 1;
          live = 1; p = mpc[t];
          for (int i = 0; i < FPT; i++) begin
            fetch_t f; logic tk, trap; logic [31:0] ins, tgt;
            f = fq[s*FPT+i];
            ins = mem[p[11:2]];
            tk = 0; tgt = p + 4; trap = (ins[31:26] == OP_TRAP);
            if (ins[31:26] == OP_BEQZ) begin tk = p[4]; tgt = p + 4 + {{16{ins[15]}}, ins[15:0]}; end
            if (ins[31:26] == OP_J) begin tk = 1; tgt = p + 4 + {{6{ins[25]}}, ins[25:0]}; end
            checks++;
            if (flush[t] || halt[t]) begin
              if (f.valid) begin failures++; $display("flushed thread still in bundle"); end
            end else if (f.valid !== live || (live && (f.tid !== 3'(t) || f.pc !== p || f.instr !== ins
                       || f.pred_taken !== tk || f.pred_npc !== (tk ? tgt : p + 4)
                       || (last_iid != 0 && f.iid <= last_iid)))) begin
              failures++;
              if (failures < 8) $display("slot %0d/%0d of thread %0d wrong (pc %h exp %h)", s, i, t, f.pc, p);
            end
            if (live) begin
              if (f.valid) last_iid = f.iid;
              mpc[t] = tk ? tgt : p + 4;
              p = mpc[t];
              if (trap) mstop[t] = 1;
              if (tk || trap) live = 0;
            end
          end
        end
        if (ngroups == 2) sel_two++;
      end else begin
        for (int i = 0; i < FW; i++) begin
          checks++;
          if (fq[i].valid !== (old[i].valid && !flush[old[i].tid] && !halt[old[i].tid])
              || (fq[i].valid && fq[i].iid !== old[i].iid)) failures++;
        end
      end
      for (int t = 0; t < NT; t++) begin
        if (flush[t]) begin mpc[t] = redirect_pc[t]; mstop[t] = 0; end
        if (halt[t]) mact[t] = 0;
        if (start_mask[t] && dut.active[t] && !mact[t]) begin mact[t] = 1; mpc[t] = start_pc[t]; mstop[t] = 0; end
      end
      start_mask = '0;
      for (int t = 0; t < NT; t++) begin
        checks++;
        if (active[t] !== mact[t]) failures++;
      end
    end
    checks++;
    if (sel_two == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
