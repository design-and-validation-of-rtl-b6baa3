// tb_alu_unit: random operands and operations for the ALU, compared with a
// reference written in this bench; also checks that ids and tags pass through.
`timescale 1ns/1ps
module tb_alu_unit;
  import smt_pkg::*;
  rs_entry_t in;
  result_t out;
  int checks = 0, failures = 0;
  alu_unit dut (.in, .out);

  function automatic logic [31:0] ref_alu(alu_op_e op, logic [31:0] a, logic [31:0] b);
    case (op)
      A_ADD: return a + b;   A_SUB: return a - b;   A_AND: return a & b;
      A_OR:  return a | b;   A_XOR: return a ^ b;
      A_SLL: return a << (b % 32);  A_SRL: return a >> (b % 32);
      A_SRA: return $signed(a) >>> (b % 32);
      A_SEQ: return (a == b) ? 1 : 0;  A_SNE: return (a != b) ? 1 : 0;
      A_SLT: return ($signed(a) < $signed(b)) ? 1 : 0;
      A_SGT: return ($signed(a) > $signed(b)) ? 1 : 0;
      A_SLE: return ($signed(a) <= $signed(b)) ? 1 : 0;
      A_SGE: return ($signed(a) >= $signed(b)) ? 1 : 0;
      A_LHI: return b;
      default: return 0;
    endcase
  endfunction

  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] b;
      in = '0;
      in.valid = 1'b1;
      in.aop = alu_op_e'($urandom_range(0, 14));
      in.v1 = ($urandom_range(0, 3) == 0) ? 32'($urandom_range(0, 3)) : $urandom;
      in.v2 = ($urandom_range(0, 3) == 0) ? in.v1 : $urandom;
      in.imm = $urandom;
      in.use_imm = $urandom_range(0, 1);
      in.tag = 6'($urandom);
      in.iid = $urandom;
      in.tid = 3'($urandom);
      #1;
      b = in.use_imm ? in.imm : in.v2;
      checks++;
      if (out.value !== ref_alu(in.aop, in.v1, b) || !out.valid || !out.has_val
          || out.tag !== in.tag || out.iid !== in.iid || out.tid !== in.tid) begin
        failures++;
        if (failures < 5) $display("op %s a=%h b=%h got %h", in.aop.name(), in.v1, b, out.value);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
