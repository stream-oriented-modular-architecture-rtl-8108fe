// soma_imem: instruction memory of a kernel, shared by its dispatchers and its
// data stream manager.
//
// One write port loads the program (host side) and NR read ports deliver
// instructions combinationally, one port per instruction fetcher, so every
// fetch stage reads in the same cycle. Addresses are word addresses.
// Following the source design: one instruction memory per kernel, outside
// the dispatchers. Own choices: the size and the asynchronous read.
module soma_imem #(
  parameter int unsigned AW = 10,
  parameter int unsigned NR = 9
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [AW-1:0]         waddr,
  input  logic [31:0]           wdata,
  input  logic [NR-1:0][AW-1:0] raddr,
  output logic [NR-1:0][31:0]   rdata
);
  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;

  always_comb
    for (int i = 0; i < NR; i++) rdata[i] = mem[raddr[i]];
endmodule
