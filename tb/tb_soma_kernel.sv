// tb_soma_kernel: the single-precision inner product on one kernel with its
// default configuration (8 dispatchers; integer multiplier, FP multiplier,
// FP adder and local memory as shared units).
// The data stream manager program splits two vectors into chunks of CH pairs
// and sends chunk after chunk to the dispatchers in turn with two-vector Load
// Patterns (interleaved x, y), each chunk one block, the last round marked
// end of stream. Every dispatcher loops over FMUL/FADD/branch until end of
// stream, writes its partial sum and a flag into the local memory; dispatcher
// 0 waits for the flags, adds the partial sums and outputs the total, which
// the DSM writes back with a Store Pattern.
// The expected total is computed here in the same order with exact double
// products and sums rounded to single precision. The test also counts the
// mechanisms involved: issues, RIT stalls, input bank swaps, write-back
// conflicts, load and store pattern transfers.
module tb_soma_kernel;
  import soma_pkg::*;
  import soma_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 8, CH = 4, C = 3, N = D * CH * C;
  localparam int XB = 'h100, YB = 'h400, RES = 'h80;

  logic start, busy, imem_we, mem_en, mem_we;
  logic [31:0] disp_pc, dsm_pc, imem_wdata, mem_wdata, mem_rdata;
  logic [9:0] imem_waddr;
  logic [17:0] mem_addr;

  soma_kernel dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] mem [4096];
  always_ff @(posedge clk) if (mem_en) begin
    if (mem_we) mem[mem_addr[11:0]] <= mem_wdata;
    else mem_rdata <= mem[mem_addr[11:0]];
  end

  logic [31:0] prog [1024];

  task automatic li(inout int pc, input int rd, input logic [31:0] v);
    prog[pc++] = addi(rd, 0, int'(v[31:16]));
    prog[pc++] = bslli(rd, rd, 16);
    prog[pc++] = ori(rd, rd, int'(v[15:0]));
  endtask

  int n_iss = 0, n_rit = 0, n_wbs = 0, n_ld = 0, n_st = 0, n_swap = 0;
  int d_iss [D];
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < D; d++) begin
      d_iss[d] += int'(dut.ev_iss[d]);
      n_rit += int'(dut.ev_rit[d]);
      n_wbs += int'(dut.ev_wbst[d]);
    end
    n_ld += int'(dut.ev_load);
    n_st += int'(dut.ev_store);
  end
  for (genvar d = 0; d < D; d++) begin : g_sw
    always @(posedge clk) if (rst_n && dut.g_disp[d].u_disp.u_srf.pop_last) n_swap++;
  end

  initial begin
    int p, loop, clr, poll, outer, inner, skip, hl;
    logic [31:0] x [N], y [N], part [D], total;
    for (int d = 0; d < D; d++) d_iss[d] = 0;
    for (int i = 0; i < 1024; i++) prog[i] = halt();
    for (int i = 0; i < 4096; i++) mem[i] = 0;
    for (int i = 0; i < N; i++) begin
      x[i] = rand_f(2) & 32'h7FFFFFFF; y[i] = rand_f(2) & 32'h7FFFFFFF;
      mem[XB + i] = x[i]; mem[YB + i] = y[i];
    end
    // reference, in the order the hardware adds
    for (int d = 0; d < D; d++) begin
      part[d] = 0;
      for (int c = 0; c < C; c++)
        for (int k = 0; k < CH; k++) begin
          int i;
          i = (c * D + d) * CH + k;
          part[d] = d2s(s2d(part[d]) + s2d(d2s(s2d(x[i]) * s2d(y[i]))));
        end
    end
    total = part[0];
    for (int d = 1; d < D; d++) total = d2s(s2d(total) + s2d(part[d]));

    // dispatcher program at 0
    p = 0;
    prog[p++] = addi(4, 0, 0);
    hl = p; prog[p++] = 0;                       // bnei r28, loop (patched)
    prog[p++] = addi(6, 0, D - 1);
    clr = p;
    prog[p++] = swi(0, 6, 16);
    prog[p++] = addi(6, 6, -1);
    prog[p] = bgti(6, (clr - p) * 4); p++;
    loop = p;
    prog[hl] = bnei(28, (loop - hl) * 4);
    prog[p++] = fmul(3, 30, 30);
    prog[p++] = fadd(4, 4, 3);
    prog[p] = beqi(29, (loop - p) * 4); p++;
    prog[p++] = swi(4, 28, 0);
    prog[p++] = addi(5, 0, 1);
    prog[p++] = swi(5, 28, 16);
    hl = p; prog[p++] = 0;                       // bnei r28, end (patched)
    prog[p++] = addi(6, 0, 1);
    poll = p;
    prog[p++] = lwi(7, 6, 16);
    prog[p] = beqi(7, (poll - p) * 4); p++;
    prog[p++] = lwi(8, 6, 0);
    prog[p++] = fadd(4, 4, 8);
    prog[p++] = addi(6, 6, 1);
    prog[p++] = rsubi(9, 6, D);
    prog[p] = bgti(9, (poll - p) * 4); p++;
    prog[p++] = or_(29, 4, 0);
    prog[hl] = bnei(28, (p - hl) * 4);
    prog[p++] = halt();

    // DSM program at 0x400 (word 256)
    p = 256;
    prog[p++] = addi(1, 0, XB);
    prog[p++] = addi(2, 0, YB);
    li(p, 12, pcfg(CH, 1, 0, 1, 1, 0));
    prog[p++] = addi(13, 0, 256);
    prog[p++] = bslli(13, 13, 16);
    prog[p++] = addi(14, 0, 16384);
    prog[p++] = bslli(14, 14, 16);
    prog[p++] = addi(11, 0, C);
    outer = p;
    prog[p++] = rsubi(17, 11, 1);
    skip = p; prog[p++] = 0;                     // bnei r17, +2
    prog[p++] = or_(12, 12, 14);
    prog[skip] = bnei(17, (p - skip) * 4);
    prog[p++] = addi(10, 0, 0);
    prog[p++] = or_(15, 12, 0);
    inner = p;
    prog[p++] = ldp(15, 1, 2);
    prog[p++] = addi(1, 1, CH);
    prog[p++] = addi(2, 2, CH);
    prog[p++] = add(15, 15, 13);
    prog[p++] = addi(10, 10, 1);
    prog[p++] = rsubi(16, 10, D);
    prog[p] = bgti(16, (inner - p) * 4); p++;
    prog[p++] = addi(11, 11, -1);
    prog[p] = bgti(11, (outer - p) * 4); p++;
    prog[p++] = addi(20, 0, RES);
    li(p, 21, pcfg(1, 1, 0, 0, 0, 0));
    prog[p++] = stp(21, 20);
    prog[p++] = halt();

    start = 0; imem_we = 0; imem_waddr = 0; imem_wdata = 0; disp_pc = 0; dsm_pc = 32'h400;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 10'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    while (busy) @(negedge clk);
    checks++;
    if (mem[RES] !== total) begin
      failures++; $display("inner product %h (%f), expected %h (%f)", mem[RES], s2d(mem[RES]), total, s2d(total));
    end else $display("inner product %f correct", s2d(total));
    for (int d = 0; d < D; d++) begin
      checks++;
      if (dut.g_fu[3].g_mem.u_fu.mem[d] !== part[d]) begin
        failures++; $display("partial sum %0d: %f expected %f", d, s2d(dut.g_fu[3].g_mem.u_fu.mem[d]), s2d(part[d]));
      end
    end
    for (int d = 0; d < D; d++) begin
      checks++;
      if (d_iss[d] < 2 * CH * C) begin failures++; $display("dispatcher %0d issued only %0d", d, d_iss[d]); end
    end
    checks++;
    if (n_ld != 2 * N || n_st != 1) begin failures++; $display("pattern transfers: %0d loads, %0d stores", n_ld, n_st); end
    checks++;
    if (n_swap != D * C) begin failures++; $display("bank swaps %0d, expected %0d", n_swap, D * C); end
    checks++;
    if (n_rit == 0) begin failures++; $display("no RIT stall"); end
    $display("RIT stalls %0d, write-back conflicts %0d, bank swaps %0d", n_rit, n_wbs, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
