// tb_regfile: random per-thread writes on all write ports (distinct targets
// in a cycle) and reads on all read ports, against a model; register 0 of
// every thread must stay zero.
`timescale 1ns/1ps
module tb_regfile;
  localparam int NT = 8, NRD = 16, NWR = 8;
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0;
  logic [NRD-1:0][2:0] rd_tid; logic [NRD-1:0][4:0] rd_reg; logic [NRD-1:0][31:0] rd_data;
  logic [NWR-1:0] wr_en; logic [NWR-1:0][2:0] wr_tid; logic [NWR-1:0][4:0] wr_reg;
  logic [NWR-1:0][31:0] wr_data;
  logic [31:0] model [NT][32];
  int checks = 0, failures = 0;
  regfile #(.NT(NT), .NRD(NRD), .NWR(NWR)) dut (.*);
  initial begin : watchdog
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    wr_en = '0; rd_tid = '0; rd_reg = '0; wr_tid = '0; wr_reg = '0; wr_data = '0;
    for (int t = 0; t < NT; t++) for (int r = 0; r < 32; r++) model[t][r] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int w = 0; w < NWR; w++) begin
        wr_en[w] = $urandom_range(0, 1);
        wr_tid[w] = 3'(w);                       // distinct threads: no conflicts
        wr_reg[w] = 5'($urandom);
        wr_data[w] = $urandom;
      end
      for (int p = 0; p < NRD; p++) begin rd_tid[p] = 3'($urandom); rd_reg[p] = 5'($urandom); end
      #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rd_data[p] !== model[rd_tid[p]][rd_reg[p]]) failures++;
      end
      @(posedge clk);
      for (int w = 0; w < NWR; w++)
        if (wr_en[w] && wr_reg[w] != 0) model[wr_tid[w]][wr_reg[w]] = wr_data[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
