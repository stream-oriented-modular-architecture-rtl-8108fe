// tb_soma_imem: checks the shared instruction memory: a program of random
// words is written through the write port, then all read ports read random
// addresses in the same cycle and must return the written words.
module tb_soma_imem;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int AW = 6, NR = 4;

  logic we;
  logic [AW-1:0] waddr;
  logic [31:0] wdata;
  logic [NR-1:0][AW-1:0] raddr;
  logic [NR-1:0][31:0] rdata;
  logic [31:0] ref_mem [2**AW];

  soma_imem #(.AW(AW), .NR(NR)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = '0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int p = 0; p < NR; p++) raddr[p] = AW'($urandom);
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== ref_mem[raddr[p]]) begin failures++; $display("port %0d mismatch", p); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
