// tb_smt_dlx_top: end-to-end test of the SMT DLX core at its full size.
//
// Every thread gets its own program and data region. A program sums an array
// in a loop (loads, a backward branch), runs a block of random instructions
// (ALU operations with random registers, loads, stores and forward branches
// whose direction depends on the data), calls a subroutine with JAL/JR and
// ends with TRAP. A sequential instruction-set model in this bench runs the
// same programs one thread at a time; at the end every register of every
// thread and every word of data memory must match it. The bench also counts
// how often each mechanism of the core occurred (two-thread fetch, taken
// prediction, queue full, station full, ROB full, issue from several threads
// in one cycle, operand waits, commit past a blocked thread, load broadcast,
// store, misprediction flush, trap) and fails if one never did, and it fails
// if a runtime self-checker raised a flag.
`timescale 1ns/1ps
module tb_smt_dlx_top;
  import smt_pkg::*;
  localparam int NT = 8;
  localparam int CODE_WORDS = 512;          // per thread, byte base 0x800*t
  localparam int DATA_BASE  = 32'h2000;     // data region of thread t: DATA_BASE + 0x400*t
  localparam int NRAND      = 120;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [NT-1:0] start_mask = '0;
  logic [NT-1:0][31:0] start_pc;
  logic im_we = 0, dm_ld_we = 0;
  logic [31:0] im_waddr, im_wdata, dm_ld_addr, dm_ld_data;
  logic [NT-1:0] active;
  logic [3:0] commits;
  logic rob_chk_err;
  logic [4:0] glob_chk_err;

  smt_dlx_top dut (.*);

  // ---------------- program image and reference model ----------------
  logic [31:0] prog [4096];
  logic [31:0] mem  [4096];
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

  task automatic build(int t);
    int base, loop, jal_at, sub_at, n;
    logic [5:0] fns [14] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR, FN_SLL, FN_SRL,
                             FN_SRA, FN_SEQ, FN_SNE, FN_SLT, FN_SGT, FN_SLE, FN_SGE};
    logic [5:0] iops [12] = '{OP_ADDI, OP_SUBI, OP_ANDI, OP_ORI, OP_XORI, OP_SLLI,
                              OP_SRLI, OP_SEQI, OP_SLTI, OP_SGEI, OP_LHI, OP_ADDUI};
    base = DATA_BASE + 32'h400 * t;
    pcw = 512 * t;
    emit(ii(OP_ADDI, 1, 0, base));
    emit(ii(OP_ADDI, 3, 0, 16));
    emit(ii(OP_ADDI, 4, 1, 0));
    emit(ii(OP_ADDI, 2, 0, 0));
    loop = pcw;
    emit(ii(OP_LW, 5, 4, 0));
    emit(rr(FN_ADD, 2, 2, 5));
    emit(ii(OP_ADDI, 4, 4, 4));
    emit(ii(OP_SUBI, 3, 3, 1));
    emit(ii(OP_BNEZ, 0, 3, (loop - (pcw + 1)) * 4));
    emit(ii(OP_SW, 2, 1, 256));
    n = 0;
    while (n < NRAND) begin
      int k, rd, a, b;
      k  = $urandom_range(0, 99);
      rd = $urandom_range(2, 30);
      a  = $urandom_range(0, 31);
      b  = $urandom_range(0, 31);
      if (k < 45)      emit(rr(fns[$urandom_range(0, 13)], rd, a, b));
      else if (k < 65) emit(ii(iops[$urandom_range(0, 11)], rd, a, $urandom_range(0, 65535)));
      else if (k < 77) emit(ii(OP_LW, rd, 1, 4 * $urandom_range(0, 70)));
      else if (k < 87) emit(ii(OP_SW, a, 1, 4 * $urandom_range(0, 70)));
      else if (n < NRAND - 6)
        emit(ii(($urandom_range(0, 1) != 0) ? OP_BEQZ : OP_BNEZ, 0, a, 4 * $urandom_range(0, 4)));
      else emit(rr(FN_ADD, rd, a, b));
      n++;
    end
    jal_at = pcw;
    emit(jj(OP_JAL, 0));                 // patched below
    emit(ii(OP_SW, 31, 1, 264));
    emit(jj(OP_TRAP, 0));
    sub_at = pcw;
    emit(rr(FN_ADD, 6, 2, 2));
    emit(ii(OP_SW, 6, 1, 260));
    emit(ii(OP_JR, 0, 31, 0));
    prog[jal_at] = jj(OP_JAL, (sub_at - (jal_at + 1)) * 4);
    if (pcw > 512 * t + CODE_WORDS) $fatal(1, "program too long");
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

  // ---------------- mechanism counters ----------------
  localparam int NMECH = 12;
  string mname [NMECH] = '{"two-thread fetch", "taken prediction", "queue full",
                           "station full", "ROB full", "multi-thread issue",
                           "operand wait", "commit past blocked thread",
                           "load broadcast", "store commit", "mispredict flush", "trap"};
  int mcnt [NMECH];
  int cycles = 0, total_commits = 0;

  always @(posedge clk) if (rst_n) begin
    logic multi;
    logic [NT-1:0] tseen;
    cycles++;
    total_commits += int'(commits);
    if (dut.u_fetch.sel_v == '1) mcnt[0]++;
    for (int i = 0; i < 8; i++) if (dut.fq[i].valid && dut.fq[i].pred_taken) mcnt[1]++;
    if (!dut.iq_take && dut.dq[0].valid) mcnt[2]++;
    for (int r = 0; r < 7; r++) if (dut.rs_free[r] == 0) mcnt[3]++;
    if (dut.rob_free == 0) mcnt[4]++;
    tseen = '0;
    for (int k = 0; k < 8; k++) if (dut.alloc[k].valid) tseen[dut.alloc[k].tid] = 1'b1;
    if ($countones(tseen) > 1) mcnt[5]++;
    for (int k = 0; k < 8; k++) if (dut.iss[k].valid && (!dut.iss[k].r1 || !dut.iss[k].r2)) mcnt[6]++;
    if (commits != 0 && dut.u_rob.used != 0 && !dut.u_rob.clr[dut.mfp]) mcnt[7]++;
    if (dut.ld_lane.valid) mcnt[8]++;
    if (dut.dm_we) mcnt[9]++;
    if ((dut.flush & ~dut.halt) != 0) mcnt[10]++;
    if (dut.halt != 0) mcnt[11]++;
  end

  // ---------------- stimulus ----------------
  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    void'($urandom(7));
    for (int i = 0; i < 4096; i++) begin prog[i] = 0; mem[i] = $urandom; end
    for (int t = 0; t < NT; t++) build(t);
    for (int t = 0; t < NT; t++) start_pc[t] = 32'h800 * t;
    for (int i = 0; i < NMECH; i++) mcnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      im_we = 1; im_waddr = 4 * i; im_wdata = prog[i];
      dm_ld_we = 1; dm_ld_addr = 4 * i; dm_ld_data = mem[i];
    end
    @(negedge clk);
    im_we = 0; dm_ld_we = 0;
    for (int t = 0; t < NT; t++) run_ref(t);
    cycles = 0; total_commits = 0;
    for (int i = 0; i < NMECH; i++) mcnt[i] = 0;
    start_mask = '1; start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    while (active != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    for (int t = 0; t < NT; t++)
      for (int r = 0; r < 32; r++) begin
        checks++;
        if (dut.u_rf.regs[t][r] !== regs[t][r]) begin
          failures++;
          if (failures < 10) $display("t%0d r%0d = %h, expected %h", t, r, dut.u_rf.regs[t][r], regs[t][r]);
        end
      end
    for (int i = 0; i < 4096; i++) begin
      checks++;
      if (dut.u_dmem.mem[i] !== mem[i]) begin
        failures++;
        if (failures < 10) $display("mem[%0d] = %h, expected %h", i, dut.u_dmem.mem[i], mem[i]);
      end
    end
    checks++;
    if (rob_chk_err || glob_chk_err != 0) begin
      failures++; $display("self-checker flags rob=%b global=%b", rob_chk_err, glob_chk_err);
    end
    for (int i = 0; i < NMECH; i++) begin
      checks++;
      $display("mechanism %-28s %0d", mname[i], mcnt[i]);
      if (mcnt[i] == 0) failures++;
    end
    $display("cycles=%0d committed=%0d IPC=%0.2f", cycles, total_commits, real'(total_commits) / cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
