// tb_branch_unit: random branches of every kind with right and wrong
// predictions; checks outcome, next pc, link value and the mispredict flag.
`timescale 1ns/1ps
module tb_branch_unit;
  import smt_pkg::*;
  rs_entry_t in;
  result_t out;
  int checks = 0, failures = 0;
  branch_unit dut (.in, .out);
  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic tk; logic [31:0] npc;
      in = '0;
      in.valid = 1'b1;
      in.bop = br_op_e'($urandom_range(0, 5));
      in.pc = {$urandom_range(0, 4095), 2'b00};
      in.v1 = ($urandom_range(0, 1) != 0) ? 32'd0 : {$urandom_range(1, 9999), 2'b00};
      in.imm = 32'($signed(16'($urandom_range(0, 65535))) & -4);
      case (in.bop)
        B_BEQZ: tk = (in.v1 == 0);
        B_BNEZ: tk = (in.v1 != 0);
        default: tk = 1'b1;
      endcase
      if (in.bop == B_JR || in.bop == B_JALR) npc = in.v1;
      else npc = tk ? in.pc + 4 + in.imm : in.pc + 4;
      in.pred_npc = ($urandom_range(0, 1) != 0) ? npc : npc + 8;
      #1;
      checks++;
      if (out.taken !== tk || out.npc !== npc || out.mispred !== (npc != in.pred_npc)
          || out.has_val !== (in.bop == B_JAL || in.bop == B_JALR)
          || (out.has_val && out.value !== in.pc + 4)) begin
        failures++;
        if (failures < 5) $display("%s pc=%h got npc %h exp %h", in.bop.name(), in.pc, out.npc, npc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
