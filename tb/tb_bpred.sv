// tb_bpred: trains the 2-bit counters with random outcomes on a few branch
// addresses and compares every prediction with a counter model, including
// saturation, aliasing of addresses ENTRIES*4 apart and reset to weakly not
// taken.
`timescale 1ns/1ps
module tb_bpred;
  localparam int ENTRIES = 512, NRD = 8, NUP = 8;
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0;
  logic [NRD-1:0][31:0] pc;
  logic [NRD-1:0] taken;
  logic [NUP-1:0] up_valid, up_taken;
  logic [NUP-1:0][31:0] up_pc;
  int model [ENTRIES];
  int checks = 0, failures = 0;
  bpred #(.ENTRIES(ENTRIES), .NRD(NRD), .NUP(NUP)) dut (.*);
  initial begin : watchdog
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    up_valid = '0; up_pc = '0; up_taken = '0; pc = '0;
    for (int e = 0; e < ENTRIES; e++) model[e] = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NRD; p++) pc[p] = {$urandom_range(0, 15) * ((p % 2) ? 1 : ENTRIES + 1), 2'b00};
      #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (taken[p] !== (model[pc[p][10:2]] >= 2)) failures++;
      end
      // one update per distinct counter, in random ports
      up_valid = '0;
      for (int u = 0; u < NUP; u++) begin
        up_pc[u] = {u * 2 + (n % 2), 2'b00};
        up_taken[u] = ($urandom_range(0, 99) < 20 + 8 * u);
        up_valid[u] = $urandom_range(0, 1);
      end
      @(posedge clk);
      for (int u = 0; u < NUP; u++)
        if (up_valid[u]) begin
          int i; i = up_pc[u][10:2];
          if (up_taken[u] && model[i] < 3) model[i]++;
          else if (!up_taken[u] && model[i] > 0) model[i]--;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
