// rob_checker: local runtime self-checker of the reorder buffer pointers.
//
// Checks every cycle that each thread front pointer (tfp) lies between the
// main front pointer (mfp) and the main rear pointer (mrp), allowing for
// wrap-around, and that mrp + free entries = mfp (mod ROB_N):
//   mfp < mrp : mfp <= tfp <= mrp
//   mfp > mrp : tfp >= mfp or tfp <= mrp
//   mfp = mrp : the ROB is empty (no tfp may exist) or full (any tfp is fine)
// A pointer out of bounds would report wrong free entries to the issue stage.
// The conditions are the design's; the empty/full case and making `err` a
// sticky flag (cleared only by reset) are our additions. An immediate
// assertion also reports the failing cycle in simulation.
module rob_checker #(
  parameter int NT    = 8,
  parameter int ROB_N = 64,
  localparam int RBW = $clog2(ROB_N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [RBW-1:0]         mfp,
  input  logic [RBW-1:0]         mrp,
  input  logic [RBW:0]           free,
  input  logic [NT-1:0]          tfp_valid,
  input  logic [NT-1:0][RBW-1:0] tfp,
  output logic                   err
);
  logic bad;
  always_comb begin
    bad = ((mrp + free[RBW-1:0]) != mfp);
    for (int t = 0; t < NT; t++)
      if (tfp_valid[t]) begin
        if (mfp < mrp)      bad = bad | !(tfp[t] >= mfp && tfp[t] <= mrp);
        else if (mfp > mrp) bad = bad | !(tfp[t] >= mfp || tfp[t] <= mrp);
        else                bad = bad | (int'(free) == ROB_N);
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) err <= 1'b0;
    else if (bad) err <= 1'b1;

  always_ff @(posedge clk)
    if (rst_n) a_bounds: assert (!bad) else $warning("ROB pointer out of bounds");
endmodule
