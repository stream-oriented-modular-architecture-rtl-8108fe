// tb_soma_conv2d: 2D image convolution with a 3x3 integer filter on one kernel
// with its default configuration (8 dispatchers, integer multiplier of
// latency 6 among the shared units), using the broadcast data layout of the
// image-convolution case study.
// The image (H = S*D + 2 rows, W columns, row-major) is processed in S
// horizontal strips of D output rows. For each strip the data stream manager
// broadcasts the image column by column: one Load Pattern of D+K-1 elements
// with a stride of W words, each column one block, the very last column
// marked end of stream. Dispatcher d keeps rows d..d+2 of the last three
// columns in nine registers (horizontal reuse), takes its three elements of
// each new column and drops the others (vertical reuse through the
// broadcast), and from the third column on computes one output with nine
// MULs and FU0 additions. The outputs of a strip form one output block
// (closed by writing r29), which the manager stores with one Store Pattern
// per dispatcher once it has sent the strip.
// Checked: every output pixel against a convolution computed here, the
// number of broadcast and store transfers, and that double buffering (bank
// swaps), RIT stalls and operations waiting for the shared multiplier all
// happened.
module tb_soma_conv2d;
  import soma_pkg::*;
  import soma_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 8, K = 3, S = 2, W = 16, H = S * D + K - 1, WO = W - K + 1;
  localparam int XB = 'h100, YB = 'h400;

  logic start, busy, imem_we, mem_en, mem_we;
  logic [31:0] disp_pc, dsm_pc, imem_wdata, mem_wdata, mem_rdata;
  logic [9:0] imem_waddr;
  logic [17:0] mem_addr;

  soma_kernel dut (.*);

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] mem [2048];
  always_ff @(posedge clk) if (mem_en) begin
    if (mem_we) mem[mem_addr[10:0]] <= mem_wdata;
    else mem_rdata <= mem[mem_addr[10:0]];
  end

  int n_bc = 0, n_st = 0, n_swap = 0, n_rit = 0, n_wait = 0;
  always @(posedge clk) if (rst_n) begin
    n_bc   += int'(dut.ev_bcast);
    n_st   += int'(dut.ev_store);
    n_rit  += $countones(dut.ev_rit);
    n_wait += $countones(dut.iss_v & ~dut.iss_r);
  end
  for (genvar d = 0; d < D; d++) begin : g_sw
    always @(posedge clk) if (rst_n && dut.g_disp[d].u_disp.u_srf.pop_last) n_swap++;
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

  // Registers of the dispatcher program: r1..r9 window (row i, column j at
  // 1+3i+j, j = 0 oldest), r10..r18 weights, r19 column, r20 scratch,
  // r21 sum, r22..r27 products.
  task automatic gen_disp(input int wt [K*K]);
    int strip, col, sk1, tk, sk2, dn, mid, nxt, b1, b2, b3;
    p = 0;
    for (int i = 0; i < K * K; i++) emit(addi(10 + i, 0, wt[i]));
    strip = p;
    emit(addi(19, 0, 0));
    col = p;
    emit(or_(20, 28, 0));
    sk1 = p;
    emit(0);                                   // beqi r20, tk
    emit(add(0, 30, 0));
    emit(addi(20, 20, -1));
    emit(bri((sk1 - p) * 4));
    tk = p;
    prog[sk1] = beqi(20, (tk - sk1) * 4);
    for (int i = 0; i < K; i++) begin
      emit(add(1 + 3 * i, 2 + 3 * i, 0));
      emit(add(2 + 3 * i, 3 + 3 * i, 0));
      emit(add(3 + 3 * i, 30, 0));
    end
    emit(rsubi(20, 28, D - 1));
    sk2 = p;
    emit(0);                                   // beqi r20, dn
    emit(add(0, 30, 0));
    emit(addi(20, 20, -1));
    emit(bri((sk2 - p) * 4));
    dn = p;
    prog[sk2] = beqi(20, (dn - sk2) * 4);
    emit(rsubi(20, 19, K - 1));
    b1 = p;
    emit(0);                                   // bgti r20, nxt
    for (int i = 0; i < 6; i++) emit(mul(22 + i, 1 + i, 10 + i));
    emit(add(21, 22, 23));
    emit(add(21, 21, 24));
    for (int i = 0; i < 3; i++) emit(mul(22 + i, 7 + i, 16 + i));
    emit(add(21, 21, 25));
    emit(add(21, 21, 26));
    emit(add(21, 21, 27));
    emit(add(21, 21, 22));
    emit(add(21, 21, 23));
    emit(rsubi(20, 19, W - 1));
    b2 = p;
    emit(0);                                   // bnei r20, mid
    emit(add(29, 21, 24));                     // last output of the strip: close the block
    b3 = p;
    emit(0);                                   // bri nxt
    mid = p;
    prog[b2] = bnei(20, (mid - b2) * 4);
    emit(add(31, 21, 24));
    nxt = p;
    prog[b1] = bgti(20, (nxt - b1) * 4);
    prog[b3] = bri((nxt - b3) * 4);
    emit(addi(19, 19, 1));
    emit(rsubi(20, 19, W));
    emit(bgti(20, (col - p) * 4));
    emit(beqi(29, (strip - p) * 4));
    emit(halt());
  endtask

  // Manager program at word 256: r1 strip base, r2 output base, r3 column
  // address, r10 column, r11 strip.
  task automatic gen_dsm();
    int strip, col, noe, st;
    p = 256;
    li(1, XB);
    li(2, YB);
    li(12, pcfg(D + K - 1, W, 15, 0, 1, 0));
    li(14, 32'h4000_0000);                    // end-of-stream bit
    li(13, 32'h0100_0000);                    // +1 in the dispatcher field
    li(18, pcfg(WO, 1, 0, 0, 0, 0));
    emit(addi(11, 0, 0));
    strip = p;
    emit(or_(3, 1, 0));
    emit(addi(10, 0, 0));
    col = p;
    emit(rsubi(16, 11, S - 1));
    emit(rsubi(17, 10, W - 1));
    emit(or_(16, 16, 17));
    emit(or_(15, 12, 0));
    noe = p;
    emit(0);                                   // bnei r16, +2
    emit(or_(15, 15, 14));
    prog[noe] = bnei(16, (p - noe) * 4);
    emit(ldp(15, 3, 0));
    emit(addi(3, 3, 1));
    emit(addi(10, 10, 1));
    emit(rsubi(16, 10, W));
    emit(bgti(16, (col - p) * 4));
    emit(or_(15, 18, 0));
    emit(addi(10, 0, 0));
    st = p;
    emit(stp(15, 2));
    emit(addi(2, 2, WO));
    emit(add(15, 15, 13));
    emit(addi(10, 10, 1));
    emit(rsubi(16, 10, D));
    emit(bgti(16, (st - p) * 4));
    emit(addi(1, 1, D * W));
    emit(addi(11, 11, 1));
    emit(rsubi(16, 11, S));
    emit(bgti(16, (strip - p) * 4));
    emit(halt());
  endtask

  initial begin
    int wt [K*K];
    logic [31:0] x [H][W], y;
    for (int i = 0; i < 1024; i++) prog[i] = halt();
    for (int i = 0; i < 2048; i++) mem[i] = 0;
    for (int i = 0; i < K * K; i++) wt[i] = int'($urandom_range(14, 0)) - 7;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        x[r][c] = $urandom_range(255, 0);
        mem[XB + r * W + c] = x[r][c];
      end
    gen_disp(wt);
    gen_dsm();

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

    for (int r = 0; r < S * D; r++)
      for (int c = 0; c < WO; c++) begin
        y = 0;
        for (int i = 0; i < K; i++)
          for (int j = 0; j < K; j++) y += x[r + i][c + j] * wt[i * K + j];
        checks++;
        if (mem[YB + r * WO + c] !== y) begin
          failures++;
          $display("y[%0d][%0d] = %0d, expected %0d", r, c, $signed(mem[YB + r * WO + c]), $signed(y));
        end
      end
    $display("broadcast elements %0d, stored %0d, bank swaps %0d, RIT stalls %0d, issue waits %0d",
             n_bc, n_st, n_swap, n_rit, n_wait);
    checks++;
    if (n_bc != S * W * (D + K - 1) || n_st != S * D * WO) begin failures++; $display("wrong transfer counts"); end
    checks++; if (n_swap != S * W * D) begin failures++; $display("wrong number of bank swaps"); end
    checks++; if (n_rit == 0)  begin failures++; $display("no RIT stall"); end
    checks++; if (n_wait == 0) begin failures++; $display("no operation waited for the multiplier"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
