// branch_unit: branch resolution unit of the SMT DLX core.
//
// Combinational, one cycle. It works out the actual next pc of BEQZ/BNEZ
// (operand 1 equal/not equal to zero, target pc+4+offset), J/JAL (pc+4+offset)
// and JR/JALR (operand 1), compares it with the next pc that fetch predicted
// and flags a misprediction. JAL and JALR also produce the link value pc+4 for
// r31 (has_val = 1). The program counter is redirected later, when the
// reorder buffer commits the branch, as the design prescribes.
// DLX without a branch delay slot and a link value of pc+4 are our reading.
module branch_unit
  import smt_pkg::*;
(
  input  rs_entry_t in,
  output result_t   out
);
  logic        tk;
  logic [31:0] tgt, seq;
  always_comb begin
    seq = in.pc + 32'd4;
    tk  = 1'b1;
    tgt = seq + in.imm;
    unique case (in.bop)
      B_BEQZ: tk = (in.v1 == 32'd0);
      B_BNEZ: tk = (in.v1 != 32'd0);
      B_JR, B_JALR: tgt = in.v1;
      default: ;
    endcase
    out = '0;
    out.valid   = in.valid;
    out.tid     = in.tid;
    out.iid     = in.iid;
    out.tag     = in.tag;
    out.has_val = (in.bop == B_JAL) || (in.bop == B_JALR);
    out.value   = seq;
    out.taken   = tk;
    out.npc     = tk ? tgt : seq;
    out.mispred = (out.npc != in.pred_npc);
  end
endmodule
