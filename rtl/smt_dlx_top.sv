// smt_dlx_top: simultaneous multithreaded (SMT) DLX processor core.
//
// A superscalar Tomasulo machine with a reorder buffer, extended to run NT
// threads at once: every cycle instructions of several threads are fetched,
// issued, executed and committed side by side, so idle issue slots of one
// thread are filled by others. Apart from per-thread program counters, a
// per-thread flush/trap path and a register file NT times larger, all
// resources are shared by the threads.
//
// Pipeline: fetch_stage (8 instructions a cycle, 4 from each of 2 threads,
// threads chosen by fewest instructions in decode + queue; shared 512-entry
// 2-bit branch table bpred) -> decode_stage -> issue_stage (shared 32-entry
// instruction queue, renaming onto ROB entries, up to 8 issued a cycle) ->
// rsv_station x7 (8 entries each) -> function units (4 alu_unit,
// 2 ldst_unit, 1 branch_unit) -> complete_stage -> common data bus -> rob
// (64 entries, per-thread commit pointers, 8 commits a cycle; loads, stores,
// branch redirects and traps happen at commit) -> regfile. Two runtime
// self-checkers watch the pipeline: rob_checker (ROB pointer bounds) and
// global_checker (stage-to-stage protocol); their flags are outputs.
//
// Interface: load programs through the imem port and data through the dmem
// port while idle; pulse `start` with a thread mask and one start pc per
// thread. A thread runs until its TRAP commits; `active` shows the running
// threads. `commits` counts instructions committed in the current cycle.
// The instruction and data memories are flat, always-hit arrays: the cache
// hierarchy was not part of the built design.
module smt_dlx_top
  import smt_pkg::*;
#(
  parameter int NT         = 8,
  parameter int FT         = 2,
  parameter int FPT        = 4,
  parameter int IQ_N       = 32,
  parameter int ISSUE_W    = 8,
  parameter int N_ALU      = 4,
  parameter int N_LDST     = 2,
  parameter int N_BR       = 1,
  parameter int RS_DEPTH   = 8,
  parameter int ROB_N      = 64,
  parameter int COMMIT_W   = 8,
  parameter int BHT_N      = 512,
  parameter int IMEM_WORDS = 4096,
  parameter int DMEM_WORDS = 4096
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [NT-1:0]       start_mask,
  input  logic [NT-1:0][31:0] start_pc,
  input  logic                im_we,
  input  logic [31:0]         im_waddr,
  input  logic [31:0]         im_wdata,
  input  logic                dm_ld_we,
  input  logic [31:0]         dm_ld_addr,
  input  logic [31:0]         dm_ld_data,
  output logic [NT-1:0]       active,
  output logic [$clog2(COMMIT_W+1)-1:0] commits,
  output logic                rob_chk_err,
  output logic [4:0]          glob_chk_err
);
  localparam int FW   = FT * FPT;
  localparam int NFU  = N_ALU + N_LDST + N_BR;
  localparam int NCDB = NFU + 1;
  localparam int RBW  = $clog2(ROB_N);
  localparam int RSFW = $clog2(RS_DEPTH + 1);
  localparam int CNTW = $clog2(IQ_N + 1);
  localparam int CW   = CNTW + 1;
  localparam int NRD  = 2 * ISSUE_W;

  // fetch <-> memories
  logic [FW-1:0][31:0] im_addr, im_data, bp_pc;
  logic [FW-1:0]       bp_taken;
  fetch_t [FW-1:0]     fq;
  logic                f_take;
  // decode
  uop_t   [FW-1:0]     dq;
  logic                iq_take;
  logic [NT-1:0][3:0]  dcnt;
  logic [NT-1:0][CNTW-1:0] qcnt;
  logic [NT-1:0][CW-1:0]   icount;
  // issue
  rs_entry_t  [ISSUE_W-1:0] iss;
  rob_alloc_t [ISSUE_W-1:0] alloc;
  logic [NFU-1:0][RSFW-1:0] rs_free;
  logic [NRD-1:0][2:0]      rf_tid;
  logic [NRD-1:0][4:0]      rf_reg;
  logic [NRD-1:0][31:0]     rf_data;
  logic [NRD-1:0][RBW-1:0]  rob_rtag;
  logic [NRD-1:0]           rob_rok;
  logic [NRD-1:0][31:0]     rob_rval;
  // execution
  rs_entry_t [NFU-1:0]      disp;
  result_t   [NFU-1:0]      fu_res, cdb_fu;
  result_t   [NCDB-1:0]     cdb;
  result_t                  ld_lane;
  // reorder buffer
  logic [RBW-1:0]           mrp, mfp;
  logic [RBW:0]             rob_free;
  commit_t [COMMIT_W-1:0]   commit;
  logic [NT-1:0]            flush, halt;
  logic [NT-1:0][31:0]      redirect_pc;
  logic [31:0]              dm_raddr, dm_rdata, dm_waddr, dm_wdata;
  logic                     dm_we;
  logic [NT-1:0]            tfp_valid;
  logic [NT-1:0][RBW-1:0]   tfp;

  always_comb
    for (int t = 0; t < NT; t++) icount[t] = CW'(dcnt[t]) + CW'(qcnt[t]);

  imem #(.WORDS(IMEM_WORDS), .NRD(FW)) u_imem (
    .clk, .we(im_we), .waddr(im_waddr), .wdata(im_wdata), .raddr(im_addr), .rdata(im_data));

  logic [COMMIT_W-1:0]       bu_v, bu_tk;
  logic [COMMIT_W-1:0][31:0] bu_pc;
  always_comb
    for (int c = 0; c < COMMIT_W; c++) begin
      bu_v[c]  = commit[c].valid && commit[c].is_cond;
      bu_tk[c] = commit[c].taken;
      bu_pc[c] = commit[c].pc;
    end

  bpred #(.ENTRIES(BHT_N), .NRD(FW), .NUP(COMMIT_W)) u_bpred (
    .clk, .rst_n, .pc(bp_pc), .taken(bp_taken),
    .up_valid(bu_v), .up_pc(bu_pc), .up_taken(bu_tk));

  fetch_stage #(.NT(NT), .FT(FT), .FPT(FPT), .CW(CW)) u_fetch (
    .clk, .rst_n, .start, .start_mask, .start_pc, .flush, .redirect_pc, .halt,
    .icount, .im_addr, .im_data, .bp_pc, .bp_taken, .take(f_take), .fq, .active);

  decode_stage #(.NT(NT), .FW(FW)) u_decode (
    .clk, .rst_n, .fq, .take(f_take), .dq, .iq_take, .flush, .cnt(dcnt));

  issue_stage #(.NT(NT), .FW(FW), .IQ_N(IQ_N), .ISSUE_W(ISSUE_W), .N_ALU(N_ALU),
                .N_LDST(N_LDST), .N_BR(N_BR), .RS_DEPTH(RS_DEPTH), .ROB_N(ROB_N),
                .NCDB(NCDB), .COMMIT_W(COMMIT_W)) u_issue (
    .clk, .rst_n, .dq, .iq_take, .flush, .rs_free, .rob_free, .rob_rear(mrp), .cdb,
    .commit, .rf_tid, .rf_reg, .rf_data, .rob_rtag, .rob_rok, .rob_rval,
    .iss, .alloc, .cnt(qcnt));

  logic [COMMIT_W-1:0]       rf_we;
  logic [COMMIT_W-1:0][2:0]  rf_wtid;
  logic [COMMIT_W-1:0][4:0]  rf_wreg;
  logic [COMMIT_W-1:0][31:0] rf_wdata;
  always_comb
    for (int c = 0; c < COMMIT_W; c++) begin
      rf_we[c]    = commit[c].valid && commit[c].rd != 5'd0;
      rf_wtid[c]  = commit[c].tid;
      rf_wreg[c]  = commit[c].rd;
      rf_wdata[c] = commit[c].value;
    end

  regfile #(.NT(NT), .NRD(NRD), .NWR(COMMIT_W)) u_rf (
    .clk, .rst_n, .rd_tid(rf_tid), .rd_reg(rf_reg), .rd_data(rf_data),
    .wr_en(rf_we), .wr_tid(rf_wtid), .wr_reg(rf_wreg), .wr_data(rf_wdata));

  for (genvar f = 0; f < NFU; f++) begin : g_fu
    rsv_station #(.DEPTH(RS_DEPTH), .ID(f), .ISSUE_W(ISSUE_W), .NCDB(NCDB), .NT(NT)) u_rs (
      .clk, .rst_n, .iss, .cdb, .flush, .free(rs_free[f]), .disp(disp[f]));
    if (f < N_ALU) begin : g_alu
      alu_unit u_alu (.in(disp[f]), .out(fu_res[f]));
    end else if (f < N_ALU + N_LDST) begin : g_ldst
      ldst_unit u_ldst (.in(disp[f]), .out(fu_res[f]));
    end else begin : g_br
      branch_unit u_br (.in(disp[f]), .out(fu_res[f]));
    end
  end

  complete_stage #(.NFU(NFU), .NT(NT)) u_complete (
    .clk, .rst_n, .fu_res, .flush, .cdb(cdb_fu));

  assign cdb = {ld_lane, cdb_fu};

  rob #(.NT(NT), .ROB_N(ROB_N), .ISSUE_W(ISSUE_W), .COMMIT_W(COMMIT_W), .NFU(NFU),
        .NRD(NRD)) u_rob (
    .clk, .rst_n, .alloc, .mrp, .mfp, .free(rob_free), .res(cdb_fu),
    .rd_tag(rob_rtag), .rd_ok(rob_rok), .rd_val(rob_rval), .commit, .flush,
    .redirect_pc, .halt, .ld_lane, .dm_raddr, .dm_rdata, .dm_we, .dm_waddr, .dm_wdata,
    .tfp_valid, .tfp);

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .raddr(dm_raddr), .rdata(dm_rdata), .we(dm_we), .waddr(dm_waddr),
    .wdata(dm_wdata), .ld_we(dm_ld_we), .ld_addr(dm_ld_addr), .ld_data(dm_ld_data));

  always_comb begin
    commits = '0;
    for (int c = 0; c < COMMIT_W; c++) if (commit[c].valid) commits = commits + 1'b1;
  end

  rob_checker #(.NT(NT), .ROB_N(ROB_N)) u_rob_chk (
    .clk, .rst_n, .mfp, .mrp, .free(rob_free), .tfp_valid, .tfp, .err(rob_chk_err));

  global_checker #(.NT(NT), .FW(FW), .ISSUE_W(ISSUE_W), .NFU(NFU), .IQ_N(IQ_N),
                   .RSFW(RSFW), .RBW(RBW)) u_glob_chk (
    .clk, .rst_n, .fq, .dq, .iq_take, .iss, .alloc, .cdb(cdb_fu), .flush, .rs_free, .rob_free,
    .err(glob_chk_err));
endmodule
