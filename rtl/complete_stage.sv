// complete_stage: complete stage of the SMT DLX core.
//
// Collects the results the function units produce this cycle into a
// register, one lane per function unit, and drives them for one cycle as the
// common data bus (CDB) lanes. From the CDB the reservation stations capture
// operands, the issue stage bypasses values and the reorder buffer marks the
// instructions done. Results of a thread being flushed are dropped on the way
// in. Timing: a result produced in cycle n is on the CDB in cycle n+1.
// One CDB lane per function unit (so the bus never stalls a unit) is our
// choice; the design draws a single complete stage feeding the bus.
module complete_stage
  import smt_pkg::*;
#(
  parameter int NFU = 7,
  parameter int NT  = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  result_t [NFU-1:0]     fu_res,
  input  logic    [NT-1:0]      flush,
  output result_t [NFU-1:0]     cdb
);
  localparam int TW = (NT > 1) ? $clog2(NT) : 1;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cdb <= '0;
    else
      for (int f = 0; f < NFU; f++) begin
        cdb[f] <= fu_res[f];
        if (flush[fu_res[f].tid[TW-1:0]]) cdb[f].valid <= 1'b0;
      end
endmodule
