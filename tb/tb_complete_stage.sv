// tb_complete_stage: random function unit results must appear on the same
// CDB lane exactly one cycle later, unless their thread is flushed in the
// cycle they arrive.
`timescale 1ns/1ps
module tb_complete_stage;
  import smt_pkg::*;
  localparam int NFU = 7, NT = 8;
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0;
  result_t [NFU-1:0] fu_res, cdb, prev;
  logic [NT-1:0] flush, prev_flush;
  int checks = 0, failures = 0;
  complete_stage #(.NFU(NFU), .NT(NT)) dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    fu_res = '0; flush = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if (n > 0)
        for (int f = 0; f < NFU; f++) begin
          logic expv;
          expv = prev[f].valid && !prev_flush[prev[f].tid];
          checks++;
          if (cdb[f].valid !== expv || (expv && cdb[f] !== prev[f])) failures++;
        end
      for (int f = 0; f < NFU; f++) begin
        fu_res[f] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        fu_res[f].valid = $urandom_range(0, 1);
      end
      flush = '0;
      if ($urandom_range(0, 3) == 0) flush[$urandom_range(0, NT - 1)] = 1'b1;
      prev = fu_res; prev_flush = flush;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
