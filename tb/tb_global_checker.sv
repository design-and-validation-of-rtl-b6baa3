// tb_global_checker: for each rule of the global self-checker, a legal
// sequence that must leave the error flags clear and a violating one that
// must raise exactly that rule's flag.
`timescale 1ns/1ps
module tb_global_checker;
  import smt_pkg::*;
  localparam int NT = 4, FW = 4, ISSUE_W = 2, NFU = 3;
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0;
  fetch_t [FW-1:0] fq; uop_t [FW-1:0] dq; logic iq_take;
  rs_entry_t [ISSUE_W-1:0] iss; rob_alloc_t [ISSUE_W-1:0] alloc;
  result_t [NFU-1:0] cdb; logic [NT-1:0] flush; logic [4:0] err;
  logic [NFU-1:0][3:0] rs_free; logic [6:0] rob_free;
  int checks = 0, failures = 0;
  global_checker #(.NT(NT), .FW(FW), .ISSUE_W(ISSUE_W), .NFU(NFU), .IQ_N(8), .RSFW(4), .RBW(6)) dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic idle();
    fq = '0; dq = '0; iq_take = 1; iss = '0; alloc = '0; cdb = '0; flush = '0;
    rs_free = '1; rob_free = '0;   // no ROB room: the issue rule stays quiet
  endtask
  task automatic reset();
    @(negedge clk); idle(); rst_n = 0; @(negedge clk); rst_n = 1;
  endtask
  task automatic expect_err(logic [4:0] e, string what);
    @(negedge clk); @(negedge clk);
    checks++;
    if (err !== e) begin failures++; $display("%s: err %b expected %b", what, err, e); end
  endtask

  initial begin
    idle();
    for (int legal = 1; legal >= 0; legal--) begin
      // rule 0: flushed instruction reappears
      reset();
      fq[0].valid = 1; fq[0].tid = 1; fq[0].iid = 10;
      @(negedge clk); flush = 4'b0010; fq = '0;
      @(negedge clk); flush = '0;
      dq[0].valid = 1; dq[0].tid = 1; dq[0].iid = legal ? 11 : 10;
      @(negedge clk); dq = '0;
      expect_err(legal ? 5'b00000 : 5'b00001, "flushed instruction");
      // rule 1: issue order within a thread
      reset();
      alloc[0].valid = 1; alloc[0].tid = 2; alloc[0].iid = 5;
      @(negedge clk);
      alloc[0].iid = legal ? 6 : 4;
      alloc[1].valid = 1; alloc[1].tid = 3; alloc[1].iid = 2;
      @(negedge clk); alloc = '0;
      expect_err(legal ? 5'b00000 : 5'b00010, "issue order");
      // rule 2: held decode bundle must not change
      reset();
      dq[1].valid = 1; dq[1].tid = 0; dq[1].iid = 7; iq_take = 0;
      @(negedge clk);
      if (!legal) dq[1].iid = 8;
      iq_take = 1;
      @(negedge clk); idle();
      expect_err(legal ? 5'b00000 : 5'b00100, "held bundle");
      // rule 3: same instruction twice in a cycle
      reset();
      cdb[0].valid = 1; cdb[0].iid = 9; cdb[2].valid = 1; cdb[2].iid = legal ? 12 : 9;
      @(negedge clk); idle();
      expect_err(legal ? 5'b00000 : 5'b01000, "duplicate result");
      reset();
      iss[0].valid = 1; iss[0].iid = 3; iss[1].valid = 1; iss[1].iid = legal ? 4 : 3;
      alloc[0].valid = 1; alloc[0].iid = 3; alloc[1].valid = 1; alloc[1].iid = 4; alloc[1].tid = 1;
      @(negedge clk); idle();
      expect_err(legal ? 5'b00000 : 5'b01000, "duplicate issue");
      // rule 4: a queued instruction must issue while nothing is stalled
      reset();
      dq[0].valid = 1; dq[0].tid = 2; dq[0].iid = 20;
      dq[1].valid = 1; dq[1].tid = 3; dq[1].iid = 21;
      @(negedge clk); dq = '0;
      rob_free = 7'd5; rs_free = {4'd3, 4'd2, 4'd1};
      if (legal) begin
        alloc[0].valid = 1; alloc[0].tid = 2; alloc[0].iid = 20;
      end
      @(negedge clk); alloc = '0;
      if (legal) begin
        // a full station stalls issue legally; the thread-3 entry may wait
        rs_free[1] = 4'd0;
        @(negedge clk);
        // and an empty ROB stalls it too
        rs_free = '1; rob_free = '0;
        @(negedge clk);
        // a flush of the waiting thread empties its share of the queue
        flush = 4'b1000; rob_free = 7'd5;
        @(negedge clk); flush = '0;
        @(negedge clk);
      end
      idle();
      expect_err(legal ? 5'b00000 : 5'b10000, "issue stalled with room");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
