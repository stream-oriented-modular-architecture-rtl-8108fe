// tb_soma_dot_scaling: the single-precision inner product of the same two
// vectors on one kernel with its default configuration, computed three times
// with 2, 4 and 8 active dispatchers (the unused ones halt at once).
// The data stream manager sends the vectors as chunks of CH interleaved
// pairs (two-vector Load Pattern, one chunk per block), dispatcher after
// dispatcher, the final round marked end of stream. Each active dispatcher
// loops over FMUL, FADD and a branch on the status register until end of
// stream, leaves its partial sum and a flag in the local memory, and
// dispatcher 0 adds the partial sums and outputs the total, which the manager
// stores with a Store Pattern.
// Checked: each total, bit for bit, against single-precision arithmetic done
// here in the same order, and that the run time falls as dispatchers are
// added (the processing rate grows with the number of dispatchers while the
// manager keeps them fed).
module tb_soma_dot_scaling;
  import soma_pkg::*;
  import soma_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 192, CH = 8;
  localparam int XB = 'h100, YB = 'h400, RES = 'h80;

  logic start, busy, imem_we, mem_en, mem_we;
  logic [31:0] disp_pc, dsm_pc, imem_wdata, mem_wdata, mem_rdata;
  logic [9:0] imem_waddr;
  logic [17:0] mem_addr;

  soma_kernel dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
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
  int p;
  task automatic emit(input logic [31:0] ins);
    prog[p] = ins;
    p++;
  endtask
  task automatic li(input int rd, input logic [31:0] v);
    emit(addi(rd, 0, int'(v[31:16])));
    emit(bslli(rd, rd, 16));
    emit(ori(rd, rd, int'(v[15:0])));
  endtask

  task automatic gen(input int D);
    int idle, hl, clr, loop, poll, outer, inner, skip, fin;
    for (int i = 0; i < 1024; i++) prog[i] = halt();
    // dispatchers, at word 0
    p = 0;
    emit(rsubi(9, 28, D - 1));
    idle = p; emit(0);                           // blti r9, halt
    emit(addi(4, 0, 0));
    hl = p; emit(0);                             // bnei r28, loop
    emit(addi(6, 0, D - 1));
    clr = p;
    emit(swi(0, 6, 16));
    emit(addi(6, 6, -1));
    emit(bgti(6, (clr - p) * 4));
    loop = p;
    prog[hl] = bnei(28, (loop - hl) * 4);
    emit(fmul(3, 30, 30));
    emit(fadd(4, 4, 3));
    emit(beqi(29, (loop - p) * 4));
    emit(swi(4, 28, 0));
    emit(addi(5, 0, 1));
    emit(swi(5, 28, 16));
    hl = p; emit(0);                             // bnei r28, halt
    emit(addi(6, 0, 1));
    poll = p;
    emit(lwi(7, 6, 16));
    emit(beqi(7, (poll - p) * 4));
    emit(lwi(8, 6, 0));
    emit(fadd(4, 4, 8));
    emit(addi(6, 6, 1));
    emit(rsubi(9, 6, D));
    emit(bgti(9, (poll - p) * 4));
    emit(or_(29, 4, 0));
    fin = p;
    prog[hl] = bnei(28, (fin - hl) * 4);
    prog[idle] = blti(9, (fin - idle) * 4);
    emit(halt());
    // data stream manager, at word 256
    p = 256;
    emit(addi(1, 0, XB));
    emit(addi(2, 0, YB));
    li(12, pcfg(CH, 1, 0, 1, 1, 0));
    emit(addi(13, 0, 256));
    emit(bslli(13, 13, 16));
    emit(addi(14, 0, 16384));
    emit(bslli(14, 14, 16));
    emit(addi(11, 0, N / (D * CH)));
    outer = p;
    emit(rsubi(17, 11, 1));
    skip = p; emit(0);                           // bnei r17, +2
    emit(or_(12, 12, 14));
    prog[skip] = bnei(17, (p - skip) * 4);
    emit(addi(10, 0, 0));
    emit(or_(15, 12, 0));
    inner = p;
    emit(ldp(15, 1, 2));
    emit(addi(1, 1, CH));
    emit(addi(2, 2, CH));
    emit(add(15, 15, 13));
    emit(addi(10, 10, 1));
    emit(rsubi(16, 10, D));
    emit(bgti(16, (inner - p) * 4));
    emit(addi(11, 11, -1));
    emit(bgti(11, (outer - p) * 4));
    emit(addi(20, 0, RES));
    li(21, pcfg(1, 1, 0, 0, 0, 0));
    emit(stp(21, 20));
    emit(halt());
  endtask

  initial begin
    logic [31:0] x [N], y [N], part [8], total;
    int cyc [3], dl [3];
    dl = '{2, 4, 8};
    for (int i = 0; i < 4096; i++) mem[i] = 0;
    for (int i = 0; i < N; i++) begin
      x[i] = rand_f(2) & 32'h7FFFFFFF; y[i] = rand_f(2) & 32'h7FFFFFFF;
      mem[XB + i] = x[i]; mem[YB + i] = y[i];
    end
    start = 0; imem_we = 0; imem_waddr = 0; imem_wdata = 0; disp_pc = 0; dsm_pc = 32'h400;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      int D;
      D = dl[r];
      for (int d = 0; d < D; d++) begin
        part[d] = 0;
        for (int c = 0; c < N / (D * CH); c++)
          for (int k = 0; k < CH; k++) begin
            int i;
            i = (c * D + d) * CH + k;
            part[d] = d2s(s2d(part[d]) + s2d(d2s(s2d(x[i]) * s2d(y[i]))));
          end
      end
      total = part[0];
      for (int d = 1; d < D; d++) total = d2s(s2d(total) + s2d(part[d]));
      gen(D);
      for (int i = 0; i < 1024; i++) begin
        @(negedge clk); imem_we = 1; imem_waddr = 10'(i); imem_wdata = prog[i];
      end
      @(negedge clk); imem_we = 0; mem[RES] = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc[r] = 1;
      repeat (3) begin @(negedge clk); cyc[r]++; end
      while (busy) begin @(negedge clk); cyc[r]++; end
      checks++;
      if (mem[RES] !== total) begin
        failures++; $display("%0d dispatchers: %h, expected %h", D, mem[RES], total);
      end
      $display("%0d dispatchers: %0d pairs in %0d cycles (%.2f cycles per pair)",
               D, N, cyc[r], real'(cyc[r]) / N);
    end
    checks++; if (!(cyc[1] < cyc[0])) begin failures++; $display("4 dispatchers not faster than 2"); end
    checks++; if (!(cyc[2] < cyc[1])) begin failures++; $display("8 dispatchers not faster than 4"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
