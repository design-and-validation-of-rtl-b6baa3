// bpred: shared branch prediction buffer of the SMT DLX core.
//
// ENTRIES two-bit saturating counters, shared by all threads and indexed by
// pc[log2(ENTRIES)+1:2]. NRD combinational lookup ports serve the fetch slots;
// a counter value of 2 or 3 predicts taken. NUP update ports train the counters
// with the outcome of conditional branches as they commit; when two updates hit
// the same counter in one cycle the higher-numbered port wins.
// The 512 entries and the two-bit counters follow the design; the indexing,
// the reset value (1, weakly not taken) and training at commit are our choices.
module bpred #(
  parameter int ENTRIES = 512,
  parameter int NRD = 8,
  parameter int NUP = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NRD-1:0][31:0] pc,
  output logic [NRD-1:0]       taken,
  input  logic [NUP-1:0]       up_valid,
  input  logic [NUP-1:0][31:0] up_pc,
  input  logic [NUP-1:0]       up_taken
);
  localparam int IW = $clog2(ENTRIES);
  logic [1:0] ctr [ENTRIES];

  always_comb
    for (int i = 0; i < NRD; i++) taken[i] = ctr[pc[i][IW+1:2]][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) ctr[e] <= 2'd1;
    end else begin
      for (int u = 0; u < NUP; u++)
        if (up_valid[u]) begin
          logic [1:0] c;
          c = ctr[up_pc[u][IW+1:2]];
          if (up_taken[u] && c != 2'd3)       ctr[up_pc[u][IW+1:2]] <= c + 2'd1;
          else if (!up_taken[u] && c != 2'd0) ctr[up_pc[u][IW+1:2]] <= c - 2'd1;
        end
    end
  end
endmodule
