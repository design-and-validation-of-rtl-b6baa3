// imem: instruction memory of the SMT DLX core.
//
// A word array with NRD combinational read ports, one per fetch slot, and one
// synchronous write port through which a program is loaded. Addresses are DLX
// byte addresses; bits 1:0 are ignored. All threads share the memory and each
// runs from its own start address.
// The design names only an "instruction memory" (the cache hierarchy was not
// built, only its miss rates modelled); a flat, always-hit array and its size
// are our own choices.
module imem #(
  parameter int WORDS = 4096,
  parameter int NRD   = 8
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [31:0]             waddr,
  input  logic [31:0]             wdata,
  input  logic [NRD-1:0][31:0]    raddr,
  output logic [NRD-1:0][31:0]    rdata
);
  localparam int AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[waddr[AW+1:2]] <= wdata;

  always_comb
    for (int i = 0; i < NRD; i++) rdata[i] = mem[raddr[i][AW+1:2]];
endmodule
