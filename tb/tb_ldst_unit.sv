// tb_ldst_unit: checks effective address (base + offset), store data and that
// no register value is claimed, for random inputs.
`timescale 1ns/1ps
module tb_ldst_unit;
  import smt_pkg::*;
  rs_entry_t in;
  result_t out;
  int checks = 0, failures = 0;
  ldst_unit dut (.in, .out);
  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 1000; i++) begin
      in = '0;
      in.valid = 1'b1;
      in.v1 = $urandom; in.v2 = $urandom;
      in.imm = {{16{1'b0}}, 16'($urandom)};
      if ($urandom_range(0, 1) != 0) in.imm = in.imm | 32'hffff0000;
      in.tag = 6'($urandom); in.iid = $urandom;
      #1;
      checks++;
      if (out.addr !== in.v1 + in.imm || out.value !== in.v2 || out.has_val !== 1'b0
          || !out.valid || out.tag !== in.tag) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
