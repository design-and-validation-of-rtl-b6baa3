// dmem: data memory of the SMT DLX core.
//
// A word array with one combinational read port and one synchronous write
// port. Loads and stores are carried out by the reorder buffer at commit:
// a load reads in the cycle it commits, a store writes at the clock edge that
// ends its commit cycle. A second write port, used only while the core is idle,
// lets a test bench place data. Addresses are byte addresses, word aligned.
// The design only names the data memory; the flat, always-hit array and its
// size are our own choices (the cache hierarchy was modelled, not built).
module dmem #(
  parameter int WORDS = 4096
) (
  input  logic        clk,
  input  logic [31:0] raddr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata,
  input  logic        ld_we,       // loader port
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_data
);
  localparam int AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we)         mem[waddr[AW+1:2]]   <= wdata;
    else if (ld_we) mem[ld_addr[AW+1:2]] <= ld_data;
  end

  assign rdata = mem[raddr[AW+1:2]];
endmodule
