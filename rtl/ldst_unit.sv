// ldst_unit: load/store address calculation unit of the SMT DLX core.
//
// Combinational, one cycle like the ALU. It computes the effective address
// base (operand 1) + sign-extended offset and, for a store, passes the store
// data (operand 2) along. It does not touch memory: the reorder buffer carries
// out loads and stores when they commit, as the design prescribes, so the
// result carries no register value (has_val = 0) and is written only into the
// instruction's ROB entry.
module ldst_unit
  import smt_pkg::*;
(
  input  rs_entry_t in,
  output result_t   out
);
  always_comb begin
    out = '0;
    out.valid   = in.valid;
    out.tid     = in.tid;
    out.iid     = in.iid;
    out.tag     = in.tag;
    out.has_val = 1'b0;
    out.addr    = in.v1 + in.imm;
    out.value   = in.v2;
  end
endmodule
