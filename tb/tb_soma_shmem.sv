// tb_soma_shmem: checks the multi-port shared memory: all ports issue random
// reads and writes in the same cycles; every read must return, one cycle
// later, the value of a reference memory as it was before that cycle's
// writes, and same-cycle writes to one word must leave the higher port's data.
module tb_soma_shmem;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int AW = 5, NP = 3;

  logic [NP-1:0] en, we;
  logic [NP-1:0][AW-1:0] addr;
  logic [NP-1:0][31:0] wdata, rdata;
  logic [31:0] ref_mem [2**AW];
  logic [31:0] exp_rd [NP];
  logic        exp_v [NP];
  int collisions = 0;

  soma_shmem #(.AW(AW), .NP(NP)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = '0; wdata = '0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr[0] = AW'(i); wdata[0] = $urandom; ref_mem[i] = wdata[0];
    end
    @(negedge clk); en = 0; we = 0;
    for (int p = 0; p < NP; p++) exp_v[p] = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) if (exp_v[p]) begin
        checks++;
        if (rdata[p] !== exp_rd[p]) begin failures++; $display("port %0d read mismatch", p); end
      end
      for (int p = 0; p < NP; p++) begin
        en[p] = $urandom_range(1, 0); we[p] = $urandom_range(1, 0);
        addr[p] = AW'($urandom_range(7, 0)); wdata[p] = $urandom;
        exp_v[p] = en[p] && !we[p];
        if (exp_v[p]) exp_rd[p] = ref_mem[addr[p]];
      end
      for (int p = 0; p < NP; p++) begin
        for (int q = p + 1; q < NP; q++)
          if (en[p] && we[p] && en[q] && we[q] && addr[p] == addr[q]) collisions++;
        if (en[p] && we[p]) ref_mem[addr[p]] = wdata[p];
      end
    end
    checks++;
    if (collisions == 0) begin failures++; $display("no write collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
