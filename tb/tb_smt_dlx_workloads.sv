// tb_smt_dlx_workloads: small-program workloads on the SMT DLX core at its
// full size, run with 1, 2, 4 and 8 threads.
//
// The kernels are the kind of program the core was evaluated with: a bubble
// sort and a selection sort of 16 words and an iterative Fibonacci series of
// 24 numbers, a few thousand instructions per run. Thread t runs kernel
// t mod 3 on its own data region (code at byte 0x800*t, data at
// 0x2000 + 0x400*t). For each thread count the core is reset, the data is
// reloaded, threads 0..n-1 are started together and the bench waits until all
// have trapped. A sequential instruction-set model in the bench runs the same
// programs; every register of the started threads and the whole data memory
// must match it, and neither runtime self-checker may raise a flag. The bench
// prints the IPC (committed instructions per cycle) of each thread count and
// checks that running 8 threads gives more throughput than running 1, the
// trend the design was built for.
`timescale 1ns/1ps
module tb_smt_dlx_workloads;
  import smt_pkg::*;
  localparam int NT = 8;
  localparam int DATA_BASE = 32'h2000;
  localparam int NSORT = 16;
  localparam int NFIB  = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [NT-1:0] start_mask = '0;
  logic [NT-1:0][31:0] start_pc;
  logic im_we = 0, dm_ld_we = 0;
  logic [31:0] im_waddr = 0, im_wdata = 0, dm_ld_addr = 0, dm_ld_data = 0;
  logic [NT-1:0] active;
  logic [3:0] commits;
  logic rob_chk_err;
  logic [4:0] glob_chk_err;

  smt_dlx_top dut (.*);

  logic [31:0] prog [4096];
  logic [31:0] mem  [4096];
  logic [31:0] mem0 [4096];
  logic [31:0] regs [NT][32];
  int checks = 0, failures = 0;

  function automatic logic [31:0] rr(logic [5:0] fn, int rd, int rs1, int rs2);
    return {6'h00, 5'(rs1), 5'(rs2), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] ii(logic [5:0] op, int rd, int rs1, int imm);
    return {op, 5'(rs1), 5'(rd), 16'(imm)};
  endfunction
  function automatic logic [31:0] jj(logic [5:0] op, int off);
    return {op, 26'(off)};
  endfunction

  int pcw;   // word index being written
  task automatic emit(logic [31:0] w);
    prog[pcw] = w; pcw++;
  endtask

  // branch at word `at` to word `to`
  function automatic logic [31:0] br(logic [5:0] op, int rs, int at, int to);
    return ii(op, 0, rs, (to - (at + 1)) * 4);
  endfunction

  task automatic bubble(int base);
    int outer, inner, skip_at, noswap;
    emit(ii(OP_ADDI, 1, 0, base));
    emit(ii(OP_ADDI, 2, 0, NSORT - 1));
    outer = pcw;
    emit(ii(OP_ADDI, 4, 1, 0));
    emit(ii(OP_ADDI, 5, 2, 0));
    inner = pcw;
    emit(ii(OP_LW, 6, 4, 0));
    emit(ii(OP_LW, 7, 4, 4));
    emit(rr(FN_SGT, 8, 6, 7));
    skip_at = pcw; emit(0);
    emit(ii(OP_SW, 7, 4, 0));
    emit(ii(OP_SW, 6, 4, 4));
    noswap = pcw;
    prog[skip_at] = br(OP_BEQZ, 8, skip_at, noswap);
    emit(ii(OP_ADDI, 4, 4, 4));
    emit(ii(OP_SUBI, 5, 5, 1));
    emit(br(OP_BNEZ, 5, pcw, inner));
    emit(ii(OP_SUBI, 2, 2, 1));
    emit(br(OP_BNEZ, 2, pcw, outer));
    emit(jj(OP_TRAP, 0));
  endtask

  task automatic selection(int base);
    int outer, inner, skip_at, skip;
    emit(ii(OP_ADDI, 1, 0, base));
    emit(ii(OP_ADDI, 2, 0, NSORT - 1));
    outer = pcw;
    emit(ii(OP_ADDI, 4, 1, 4));
    emit(ii(OP_ADDI, 5, 2, 0));
    emit(ii(OP_ADDI, 9, 1, 0));
    emit(ii(OP_LW, 10, 1, 0));
    inner = pcw;
    emit(ii(OP_LW, 6, 4, 0));
    emit(rr(FN_SLT, 8, 6, 10));
    skip_at = pcw; emit(0);
    emit(ii(OP_ADDI, 10, 6, 0));
    emit(ii(OP_ADDI, 9, 4, 0));
    skip = pcw;
    prog[skip_at] = br(OP_BEQZ, 8, skip_at, skip);
    emit(ii(OP_ADDI, 4, 4, 4));
    emit(ii(OP_SUBI, 5, 5, 1));
    emit(br(OP_BNEZ, 5, pcw, inner));
    emit(ii(OP_LW, 11, 1, 0));
    emit(ii(OP_SW, 10, 1, 0));
    emit(ii(OP_SW, 11, 9, 0));
    emit(ii(OP_ADDI, 1, 1, 4));
    emit(ii(OP_SUBI, 2, 2, 1));
    emit(br(OP_BNEZ, 2, pcw, outer));
    emit(jj(OP_TRAP, 0));
  endtask

  // Fibonacci series; the add step is a subroutine called with JAL, left with JR
  task automatic fibonacci(int base);
    int loop, call_at, sub_at;
    emit(ii(OP_ADDI, 1, 0, base));
    emit(ii(OP_ADDI, 2, 0, 0));
    emit(ii(OP_ADDI, 3, 0, 1));
    emit(ii(OP_ADDI, 5, 0, NFIB));
    loop = pcw;
    emit(ii(OP_SW, 2, 1, 0));
    call_at = pcw; emit(0);
    emit(ii(OP_ADDI, 2, 3, 0));
    emit(ii(OP_ADDI, 3, 4, 0));
    emit(ii(OP_ADDI, 1, 1, 4));
    emit(ii(OP_SUBI, 5, 5, 1));
    emit(br(OP_BNEZ, 5, pcw, loop));
    emit(jj(OP_TRAP, 0));
    sub_at = pcw;
    emit(rr(FN_ADD, 4, 2, 3));
    emit(ii(OP_JR, 0, 31, 0));
    prog[call_at] = jj(OP_JAL, (sub_at - (call_at + 1)) * 4);
  endtask

  // sequential reference model of one thread
  task automatic run_ref(int t);
    logic [31:0] pc, ins, a, b, y, sx, zx, npc;
    logic [5:0] op, fn;
    int rs1, rs2, rd, steps;
    pc = 32'h800 * t;
    for (int r = 0; r < 32; r++) regs[t][r] = 0;
    steps = 0;
    forever begin
      ins = prog[pc[13:2]];
      op = ins[31:26]; fn = ins[5:0];
      rs1 = ins[25:21]; rs2 = ins[20:16]; rd = ins[15:11];
      sx = {{16{ins[15]}}, ins[15:0]}; zx = {16'd0, ins[15:0]};
      a = regs[t][rs1]; b = regs[t][rs2];
      npc = pc + 4;
      y = 0;
      steps++;
      if (steps > 100000) begin failures++; $display("reference model runaway t%0d", t); return; end
      case (op)
        OP_RTYPE: begin
          case (fn)
            FN_ADD: y = a + b;  FN_SUB: y = a - b;  FN_AND: y = a & b;
            FN_OR:  y = a | b;  FN_XOR: y = a ^ b;  FN_SLL: y = a << b[4:0];
            FN_SRL: y = a >> b[4:0];  FN_SRA: y = $signed(a) >>> b[4:0];
            FN_SEQ: y = 32'(a == b);  FN_SNE: y = 32'(a != b);
            FN_SLT: y = 32'($signed(a) < $signed(b));  FN_SGT: y = 32'($signed(a) > $signed(b));
            FN_SLE: y = 32'($signed(a) <= $signed(b)); FN_SGE: y = 32'($signed(a) >= $signed(b));
            default: ;
          endcase
          if (rd != 0) regs[t][rd] = y;
        end
        OP_LW: if (rs2 != 0) regs[t][rs2] = mem[13'((a + sx) >> 2)];
        OP_SW: mem[13'((a + sx) >> 2)] = b;
        OP_BEQZ: if (a == 0) npc = pc + 4 + sx;
        OP_BNEZ: if (a != 0) npc = pc + 4 + sx;
        OP_J:    npc = pc + 4 + {{6{ins[25]}}, ins[25:0]};
        OP_JAL:  begin regs[t][31] = pc + 4; npc = pc + 4 + {{6{ins[25]}}, ins[25:0]}; end
        OP_JR:   npc = a;
        OP_JALR: begin regs[t][31] = pc + 4; npc = a; end
        OP_TRAP: return;
        default: begin
          case (op)
            OP_ADDI: y = a + sx;  OP_ADDUI: y = a + zx;  OP_SUBI: y = a - sx;
            OP_SUBUI: y = a - zx; OP_ANDI: y = a & zx;   OP_ORI: y = a | zx;
            OP_XORI: y = a ^ zx;  OP_LHI: y = {ins[15:0], 16'd0};
            OP_SLLI: y = a << sx[4:0];  OP_SRLI: y = a >> sx[4:0];
            OP_SRAI: y = $signed(a) >>> sx[4:0];
            OP_SEQI: y = 32'(a == sx);  OP_SNEI: y = 32'(a != sx);
            OP_SLTI: y = 32'($signed(a) < $signed(sx));  OP_SGTI: y = 32'($signed(a) > $signed(sx));
            OP_SLEI: y = 32'($signed(a) <= $signed(sx)); OP_SGEI: y = 32'($signed(a) >= $signed(sx));
            default: ;
          endcase
          if (rs2 != 0) regs[t][rs2] = y;
        end
      endcase
      pc = npc;
    end
  endtask

  int cycles = 0, total_commits = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    total_commits += int'(commits);
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nthr [4] = '{1, 2, 4, 8};
  real ipc [4];

  initial begin
    void'($urandom(11));
    for (int i = 0; i < 4096; i++) begin
      prog[i] = 0;
      mem0[i] = 32'($signed(16'($urandom)));
    end
    for (int t = 0; t < NT; t++) begin
      pcw = 512 * t;
      case (t % 3)
        0: bubble(DATA_BASE + 32'h400 * t);
        1: selection(DATA_BASE + 32'h400 * t);
        default: fibonacci(DATA_BASE + 32'h400 * t);
      endcase
      start_pc[t] = 32'h800 * t;
    end
    for (int p = 0; p < 4; p++) begin
      rst_n = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      // program and data; the memories keep their contents through reset,
      // but the data is reloaded because the previous run sorted it
      for (int i = 0; i < 4096; i++) begin
        @(negedge clk);
        im_we = 1; im_waddr = 4 * i; im_wdata = prog[i];
        dm_ld_we = 1; dm_ld_addr = 4 * i; dm_ld_data = mem0[i];
      end
      @(negedge clk);
      im_we = 0; dm_ld_we = 0;
      for (int i = 0; i < 4096; i++) mem[i] = mem0[i];
      for (int t = 0; t < NT; t++) for (int r = 0; r < 32; r++) regs[t][r] = 0;
      for (int t = 0; t < nthr[p]; t++) run_ref(t);
      start_mask = NT'((1 << nthr[p]) - 1); start = 1;
      @(negedge clk);
      cycles = 0; total_commits = 0;
      start = 0;
      @(negedge clk);
      while (active != 0) @(negedge clk);
      repeat (5) @(negedge clk);
      ipc[p] = real'(total_commits) / cycles;
      $display("%0d thread(s): %0d instructions in %0d cycles, IPC %0.2f", nthr[p], total_commits, cycles, ipc[p]);
      for (int t = 0; t < NT; t++)
        for (int r = 0; r < 32; r++) begin
          checks++;
          if (dut.u_rf.regs[t][r] !== regs[t][r]) begin
            failures++;
            if (failures < 10) $display("%0d threads: t%0d r%0d = %h, expected %h", nthr[p], t, r, dut.u_rf.regs[t][r], regs[t][r]);
          end
        end
      for (int i = 0; i < 4096; i++) begin
        checks++;
        if (dut.u_dmem.mem[i] !== mem[i]) begin
          failures++;
          if (failures < 10) $display("%0d threads: mem[%0d] = %h, expected %h", nthr[p], i, dut.u_dmem.mem[i], mem[i]);
        end
      end
      // the sorted regions really are sorted (independent of the model)
      for (int t = 0; t < nthr[p]; t++)
        if (t % 3 != 2)
          for (int k = 0; k < NSORT - 1; k++) begin
            checks++;
            if ($signed(dut.u_dmem.mem[(DATA_BASE + 32'h400 * t) / 4 + k]) >
                $signed(dut.u_dmem.mem[(DATA_BASE + 32'h400 * t) / 4 + k + 1])) begin
              failures++; $display("thread %0d: data not sorted at %0d", t, k);
            end
          end
      checks++;
      if (rob_chk_err || glob_chk_err != 0) begin
        failures++; $display("self-checker flags rob=%b global=%b", rob_chk_err, glob_chk_err);
      end
    end
    checks++;
    if (!(ipc[3] > ipc[0])) begin
      failures++; $display("8 threads give no more throughput than 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
