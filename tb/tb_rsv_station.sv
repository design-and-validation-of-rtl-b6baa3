// tb_rsv_station: random traffic through one reservation station.
// Each cycle the bench issues entries (some for another station, which must
// be ignored), with operands either present or waiting on producer tags, and
// broadcasts results of pending producers on the CDB lanes. It checks that
// every entry dispatches exactly once, never before both operands were on the
// bus in an earlier cycle or before the cycle after its insertion, with the
// broadcast operand values; that `free` matches the occupancy; that a flushed
// thread's entries never dispatch; and that a lone ready entry dispatches in
// the very next cycle.
`timescale 1ns/1ps
module tb_rsv_station;
  import smt_pkg::*;
  localparam int DEPTH = 8, ID = 2, ISSUE_W = 4, NCDB = 3, NT = 4;
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0;
  rs_entry_t [ISSUE_W-1:0] iss;
  result_t [NCDB-1:0] cdb;
  logic [NT-1:0] flush;
  logic [$clog2(DEPTH+1)-1:0] free;
  rs_entry_t disp;
  rsv_station #(.DEPTH(DEPTH), .ID(ID), .ISSUE_W(ISSUE_W), .NCDB(NCDB), .NT(NT)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int occ = 0;
  int tag_done_cyc [64];          // -1 pending, else broadcast cycle
  logic [31:0] tag_val [64];
  logic [5:0] next_tag = 0;
  int ins_cyc [int];              // by iid
  rs_entry_t ins_e [int];
  int dispatched [int];
  int killed [int];               // entries removed by a flush
  int iid = 0;
  int lone_ok = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] opval(logic r, logic [5:0] q, logic [31:0] v);
    return r ? v : tag_val[q];
  endfunction

  // monitor dispatches
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (disp.valid) begin
      int i; i = int'(disp.iid);
      checks++;
      if (!ins_cyc.exists(i) || dispatched.exists(i) || killed.exists(i)) begin
        failures++; $display("bad dispatch of %0d", i);
      end else begin
        rs_entry_t e; int ready_at;
        e = ins_e[i];
        ready_at = ins_cyc[i] + 1;
        if (!e.r1 && tag_done_cyc[e.q1] + 1 > ready_at) ready_at = tag_done_cyc[e.q1] + 1;
        if (!e.r2 && tag_done_cyc[e.q2] + 1 > ready_at) ready_at = tag_done_cyc[e.q2] + 1;
        if ((!e.r1 && tag_done_cyc[e.q1] < 0) || (!e.r2 && tag_done_cyc[e.q2] < 0) || cyc < ready_at
            || disp.v1 !== opval(e.r1, e.q1, e.v1) || disp.v2 !== opval(e.r2, e.q2, e.v2)) begin
          failures++; $display("dispatch %0d too early or wrong operands", i);
        end
        dispatched[i] = cyc;
        occ--;
      end
    end
  end

  // a tag may be reused once no live entry waits on it and it is not pending
  function automatic bit tag_free(logic [5:0] t);
    if (tag_done_cyc[t] < 0) return 0;
    foreach (ins_e[i])
      if (!dispatched.exists(i) && !killed.exists(i)
          && ((!ins_e[i].r1 && ins_e[i].q1 == t) || (!ins_e[i].r2 && ins_e[i].q2 == t))) return 0;
    for (int k = 0; k < ISSUE_W; k++)
      if (iss[k].valid && ((!iss[k].r1 && iss[k].q1 == t) || (!iss[k].r2 && iss[k].q2 == t))) return 0;
    return 1;
  endfunction

  task automatic one_cycle(bit allow_issue, bit allow_flush);
    int n_new, room;
    @(negedge clk);
    checks++;
    if (int'(free) != DEPTH - occ) begin failures++; $display("free %0d occ %0d", free, occ); end
    iss = '0; cdb = '0; flush = '0;
    room = int'(free);
    n_new = allow_issue ? $urandom_range(0, ISSUE_W) : 0;
    for (int k = 0; k < n_new; k++) begin
      rs_entry_t e;
      e = '0;
      e.valid = 1'b1;
      e.tid = 3'($urandom_range(0, NT - 1));
      e.iid = iid;
      e.rs_id = ($urandom_range(0, 4) == 0) ? 3'(ID + 1) : 3'(ID);
      e.r1 = 1'b1; e.v1 = $urandom; e.r2 = 1'b1; e.v2 = $urandom;
      if ($urandom_range(0, 1) != 0 && tag_free(next_tag)) begin
        e.r1 = 1'b0; e.q1 = next_tag; tag_done_cyc[next_tag] = -1; next_tag++;
      end
      if ($urandom_range(0, 2) == 0 && tag_free(next_tag)) begin
        e.r2 = 1'b0; e.q2 = next_tag; tag_done_cyc[next_tag] = -1; next_tag++;
      end
      if (e.rs_id == 3'(ID)) begin
        if (room == 0) continue;
        room--;
      end
      iss[k] = e;
      iid++;
    end
    // broadcast some pending tags (from before this cycle's entries)
    for (int c = 0; c < NCDB; c++) begin
      int t;
      t = $urandom_range(0, 63);
      if (tag_done_cyc[t] == -1 && $urandom_range(0, 1) != 0) begin
        cdb[c].valid = 1'b1; cdb[c].has_val = 1'b1; cdb[c].tag = 6'(t);
        cdb[c].value = $urandom;
        tag_val[t] = cdb[c].value;
        tag_done_cyc[t] = -2;      // mark as "broadcast this cycle"
      end
    end
    if (allow_flush && $urandom_range(0, 60) == 0) flush[$urandom_range(0, NT - 1)] = 1'b1;
    @(posedge clk);
    #1;
    for (int t = 0; t < 64; t++) if (tag_done_cyc[t] == -2) tag_done_cyc[t] = cyc;
    for (int k = 0; k < ISSUE_W; k++)
      if (iss[k].valid && iss[k].rs_id == 3'(ID) && !flush[iss[k].tid[1:0]]) begin
        ins_cyc[int'(iss[k].iid)] = cyc;
        ins_e[int'(iss[k].iid)] = iss[k];
        occ++;
      end
    // entries of a flushed thread that had not dispatched are gone
    if (flush != 0) begin
      occ = 0;
      foreach (ins_cyc[i])
        if (!dispatched.exists(i) && !killed.exists(i)) begin
          if (flush[ins_e[i].tid[1:0]] && ins_cyc[i] < cyc) killed[i] = 1;
          else occ++;
        end
    end
  endtask

  initial begin
    iss = '0; cdb = '0; flush = '0;
    for (int t = 0; t < 64; t++) begin tag_done_cyc[t] = 0; tag_val[t] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    // lone ready entry: dispatch in the next cycle
    @(negedge clk);
    iss[0] = '0; iss[0].valid = 1; iss[0].rs_id = ID; iss[0].iid = 32'd1000000;
    iss[0].r1 = 1; iss[0].r2 = 1; iss[0].v1 = 32'h11; iss[0].v2 = 32'h22;
    @(posedge clk); #1;
    ins_cyc[1000000] = cyc; ins_e[1000000] = iss[0]; occ++;
    @(negedge clk);
    iss = '0;
    checks++;
    if (!(disp.valid && disp.iid == 32'd1000000 && disp.v1 == 32'h11)) begin
      failures++; $display("lone entry not dispatched one cycle after insertion");
    end
    @(negedge clk);
    cyc = 0;
    for (int n = 0; n < 400; n++) one_cycle(1, 0);
    for (int n = 0; n < 600; n++) one_cycle(1, 1);
    // drain: broadcast everything pending, never flush
    for (int n = 0; n < 200; n++) one_cycle(0, 0);
    foreach (ins_cyc[i]) begin
      checks++;
      if (!killed.exists(i) && !dispatched.exists(i)) begin
        failures++; $display("entry %0d never dispatched", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
