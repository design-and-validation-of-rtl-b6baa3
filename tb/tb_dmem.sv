// tb_dmem: random mix of loader writes, commit-port writes and reads, checked
// against an array model; the commit port has priority over the loader.
`timescale 1ns/1ps
module tb_dmem;
  localparam int WORDS = 256;
  logic clk = 0; always #5 clk = ~clk;
  logic [31:0] raddr, rdata, waddr, wdata, ld_addr, ld_data;
  logic we, ld_we;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;
  dmem #(.WORDS(WORDS)) dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; ld_we = 0; raddr = 0; waddr = 0; ld_addr = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = 4 * i; ld_data = $urandom; model[i] = ld_data;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); ld_we = $urandom_range(0, 1);
      waddr = 4 * $urandom_range(0, WORDS - 1); wdata = $urandom;
      ld_addr = 4 * $urandom_range(0, WORDS - 1); ld_data = $urandom;
      raddr = 4 * $urandom_range(0, WORDS - 1);
      #1;
      checks++;
      if (rdata !== model[raddr[9:2]]) failures++;
      if (we) model[waddr[9:2]] = wdata;
      else if (ld_we) model[ld_addr[9:2]] = ld_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
