// rsv_station: one reservation station queue of the SMT DLX core.
//
// Each function unit has its own queue of DEPTH entries (8 in the design),
// shared by all threads. An entry holds an issued instruction and its two
// operands; an operand that is not yet present is named by the ROB entry
// (tag) that will produce it and is captured when that tag appears with a
// register value on any common data bus (CDB) lane. Each cycle the queue
// dispatches one entry whose operands are both present to its function unit:
// the lowest-numbered ready entry (our choice; the design does not fix an
// order). New entries arrive from the issue stage on the ISSUE_W issue lanes;
// an entry is taken when its rs_id equals this station's ID, and goes into a
// free slot. The issue stage never sends more than `free` entries. Entries of
// a thread being flushed are dropped.
// Timing: an operand captured at a clock edge makes the entry eligible for
// dispatch in the following cycle.
module rsv_station
  import smt_pkg::*;
#(
  parameter int DEPTH   = 8,
  parameter int ID      = 0,
  parameter int ISSUE_W = 8,
  parameter int NCDB    = 8,
  parameter int NT      = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  rs_entry_t [ISSUE_W-1:0]    iss,
  input  result_t   [NCDB-1:0]       cdb,
  input  logic      [NT-1:0]         flush,
  output logic      [$clog2(DEPTH+1)-1:0] free,
  output rs_entry_t                  disp
);
  localparam int TW = (NT > 1) ? $clog2(NT) : 1;
  rs_entry_t q [DEPTH];
  rs_entry_t q_n [DEPTH];
  logic [DEPTH-1:0] taken;
  logic overflow;
  int unsigned nfree;
  int disp_idx;

  always_comb begin
    logic placed;
    placed = 1'b0;
    nfree = 0;
    for (int i = 0; i < DEPTH; i++) if (!q[i].valid) nfree++;
    free = ($clog2(DEPTH+1))'(nfree);

    disp = '0;
    disp_idx = -1;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (q[i].valid && q[i].r1 && q[i].r2) disp_idx = i;
    if (disp_idx >= 0) disp = q[disp_idx];

    for (int i = 0; i < DEPTH; i++) begin
      q_n[i] = q[i];
      if (i == disp_idx) q_n[i].valid = 1'b0;
      for (int c = 0; c < NCDB; c++)
        if (cdb[c].valid && cdb[c].has_val) begin
          if (!q_n[i].r1 && q_n[i].q1 == cdb[c].tag) begin
            q_n[i].r1 = 1'b1; q_n[i].v1 = cdb[c].value;
          end
          if (!q_n[i].r2 && q_n[i].q2 == cdb[c].tag) begin
            q_n[i].r2 = 1'b1; q_n[i].v2 = cdb[c].value;
          end
        end
      if (q_n[i].valid && flush[q_n[i].tid[TW-1:0]]) q_n[i].valid = 1'b0;
    end

    // place new entries into slots that were free at the start of the cycle
    taken = '0;
    overflow = 1'b0;
    for (int k = 0; k < ISSUE_W; k++)
      if (iss[k].valid && iss[k].rs_id == 3'(ID) && !flush[iss[k].tid[TW-1:0]]) begin
        placed = 1'b0;
        for (int i = 0; i < DEPTH; i++)
          if (!placed && !q[i].valid && !taken[i]) begin
            q_n[i] = iss[k];
            taken[i] = 1'b1;
            placed = 1'b1;
          end
        if (!placed) overflow = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    else        for (int i = 0; i < DEPTH; i++) q[i] <= q_n[i];

  // the issue stage must respect the free count
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n)
      !overflow;
  endproperty
  a_no_overflow: assert property (p_no_overflow);
endmodule
