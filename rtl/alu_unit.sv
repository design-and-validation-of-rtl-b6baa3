// alu_unit: integer arithmetic/logic function unit of the SMT DLX core.
//
// Combinational: takes the instruction that its reservation station dispatches
// this cycle (both operands present) and returns its result, which the
// complete stage registers and broadcasts on the common data bus the next
// cycle, so an ALU operation takes one cycle. The second operand is the
// immediate when use_imm is set. Comparisons (SLT ...) are signed and give 0 or
// 1; shifts use the low 5 bits of the second operand; LHI arrives from decode
// with the immediate already in the upper half. Overflow is not trapped.
// The design fixes the number of ALUs (4) but not their insides.
module alu_unit
  import smt_pkg::*;
(
  input  rs_entry_t in,
  output result_t   out
);
  logic [31:0] a, b, y;
  always_comb begin
    a = in.v1;
    b = in.use_imm ? in.imm : in.v2;
    unique case (in.aop)
      A_ADD: y = a + b;
      A_SUB: y = a - b;
      A_AND: y = a & b;
      A_OR:  y = a | b;
      A_XOR: y = a ^ b;
      A_SLL: y = a << b[4:0];
      A_SRL: y = a >> b[4:0];
      A_SRA: y = 32'($signed(a) >>> b[4:0]);
      A_SEQ: y = {31'd0, a == b};
      A_SNE: y = {31'd0, a != b};
      A_SLT: y = {31'd0, $signed(a) <  $signed(b)};
      A_SGT: y = {31'd0, $signed(a) >  $signed(b)};
      A_SLE: y = {31'd0, $signed(a) <= $signed(b)};
      A_SGE: y = {31'd0, $signed(a) >= $signed(b)};
      A_LHI: y = b;
      default: y = '0;
    endcase
    out = '0;
    out.valid   = in.valid;
    out.tid     = in.tid;
    out.iid     = in.iid;
    out.tag     = in.tag;
    out.has_val = 1'b1;
    out.value   = y;
  end
endmodule
