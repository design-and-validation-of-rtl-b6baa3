// regfile: architectural register file of the SMT DLX core.
//
// One set of 32 general registers per thread (NT sets), so the file is NT
// times the size of a single-threaded one, as the design requires. NRD
// combinational read ports serve the issue stage; NWR write ports are written
// by the reorder buffer when instructions commit. Register 0 of every thread
// reads as zero and ignores writes. Ports are addressed by {thread, register}.
// Reset clears all registers (our choice; the design does not say).
module regfile #(
  parameter int NT  = 8,
  parameter int NRD = 16,
  parameter int NWR = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NRD-1:0][2:0]  rd_tid,
  input  logic [NRD-1:0][4:0]  rd_reg,
  output logic [NRD-1:0][31:0] rd_data,
  input  logic [NWR-1:0]       wr_en,
  input  logic [NWR-1:0][2:0]  wr_tid,
  input  logic [NWR-1:0][4:0]  wr_reg,
  input  logic [NWR-1:0][31:0] wr_data
);
  localparam int TW = (NT > 1) ? $clog2(NT) : 1;
  logic [31:0] regs [NT][32];

  always_comb
    for (int i = 0; i < NRD; i++)
      rd_data[i] = (rd_reg[i] == 5'd0) ? 32'd0 : regs[rd_tid[i][TW-1:0]][rd_reg[i]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NT; t++)
        for (int r = 0; r < 32; r++) regs[t][r] <= '0;
    end else begin
      for (int w = 0; w < NWR; w++)
        if (wr_en[w] && wr_reg[w] != 5'd0) regs[wr_tid[w][TW-1:0]][wr_reg[w]] <= wr_data[w];
    end
  end
endmodule
