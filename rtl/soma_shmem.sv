// soma_shmem: shared stream-buffer memory between the kernels.
//
// NP independent ports, each with enable, write enable, word address and write
// data; a read returns its word one cycle after the enable (synchronous
// read). All ports may access the memory in the same cycle. If two ports
// write one word in the same cycle, the higher port index wins.
// Following the source design: one shared memory serving as the buffer of the
// input and output streams and of intermediate results of all kernels.
// Own choices: a port per kernel plus one host port, and the size.
module soma_shmem #(
  parameter int unsigned AW = 18,
  parameter int unsigned NP = 7
) (
  input  logic                  clk,
  input  logic [NP-1:0]         en,
  input  logic [NP-1:0]         we,
  input  logic [NP-1:0][AW-1:0] addr,
  input  logic [NP-1:0][31:0]   wdata,
  output logic [NP-1:0][31:0]   rdata
);
  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (en[p] && !we[p]) rdata[p] <= mem[addr[p]];
      if (en[p] && we[p])  mem[addr[p]] <= wdata[p];
    end
  end
endmodule
