// tb_imem: fills the instruction memory through its write port and reads it
// back through all read ports at random addresses.
`timescale 1ns/1ps
module tb_imem;
  localparam int WORDS = 256, NRD = 8;
  logic clk = 0; always #5 clk = ~clk;
  logic we; logic [31:0] waddr, wdata;
  logic [NRD-1:0][31:0] raddr, rdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;
  imem #(.WORDS(WORDS), .NRD(NRD)) dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; raddr = '0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); we = 1; waddr = 4 * i; wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 200; n++) begin
      for (int p = 0; p < NRD; p++) raddr[p] = {$urandom_range(0, WORDS - 1), 2'($urandom)};
      #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p][9:2]]) failures++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
