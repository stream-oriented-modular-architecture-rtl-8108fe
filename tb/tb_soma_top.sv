// tb_soma_top: end-to-end run of the multi-kernel processor with its default
// configuration (six kernels with 4, 2, 8, 2, 2 and 8 dispatchers around the
// shared memory). All six kernels run, chained through the shared memory in
// the manner of the layer pipeline of a small neural network:
//  * kernel 0 (4 dispatchers) runs a convolution with a 3-tap integer filter
//    in the data layout of the image-convolution case study: the DSM
//    broadcasts windows of D+K-1 input elements to all dispatchers, each
//    dispatcher uses its own K elements and drops the rest, and the DSM
//    stores each dispatcher's output with Store Patterns;
//  * kernel 1 (2 dispatchers) max-pools kernel 0's output by pairs;
//  * kernel 3 (2 dispatchers) adds a second map to that, element by element,
//    from two-vector Load Patterns;
//  * kernel 4 (2 dispatchers) max-pools the sum by pairs;
//  * kernel 5 (8 dispatchers) computes the integer inner product of the
//    pooled map with a weight vector (reduction through its local memory);
//  * kernel 2 (8 dispatchers) computes, at the same time as the chain, a
//    single-precision inner product (two-vector Load Patterns, FMUL/FADD).
// The host (this testbench) writes the data and programs, starts each kernel
// of the chain when its producer has finished, and reads the results back.
// Every intermediate map and both inner products are compared with values
// computed here. The test counts the mechanisms of the design and fails if
// one never happened: broadcast loads, two-vector loads, store patterns,
// input bank swaps (double buffering), output bank swaps, end of stream, RIT
// stalls, write-back conflict stalls, empty-stream stalls, operations
// waiting in an issue FIFO for a busy unit, and two kernels running at the
// same time.
module tb_soma_top;
  import soma_pkg::*;
  import soma_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NK = 6;
  logic host_en, host_we;
  logic [17:0] host_addr;
  logic [31:0] host_wdata, host_rdata, imem_wdata;
  logic [NK-1:0] imem_we, start, busy;
  logic [9:0] imem_waddr;
  logic [NK-1:0][31:0] disp_pc, dsm_pc;

  soma_top dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_bcast = 0, n_two = 0, n_store = 0, n_inswap = 0, n_outswap = 0, n_eos = 0;
  int n_rit = 0, n_wbc = 0, n_sst = 0, n_iqwait = 0, n_overlap = 0;
  localparam int NDK [NK] = '{4, 2, 8, 2, 2, 8};
  for (genvar k = 0; k < NK; k++) begin : g_cnt
    always @(posedge clk) if (rst_n) begin
      n_bcast += int'(dut.g_k[k].u_kernel.ev_bcast);
      n_two   += int'(dut.g_k[k].u_kernel.ev_load && dut.g_k[k].u_kernel.u_dsm.pat_two);
      n_store += int'(dut.g_k[k].u_kernel.ev_store);
      n_iqwait += $countones(dut.g_k[k].u_kernel.iss_v & ~dut.g_k[k].u_kernel.iss_r);
      n_rit   += $countones(dut.g_k[k].u_kernel.ev_rit);
      n_wbc   += $countones(dut.g_k[k].u_kernel.ev_wbst);
      n_sst   += $countones(dut.g_k[k].u_kernel.ev_sst);
    end
    for (genvar d = 0; d < NDK[k]; d++) begin : g_d
      always @(posedge clk) if (rst_n) begin
        n_inswap  += int'(dut.g_k[k].u_kernel.g_disp[d].u_disp.u_srf.pop_last);
        n_outswap += int'(dut.g_k[k].u_kernel.g_disp[d].u_disp.sout_push &&
                          dut.g_k[k].u_kernel.g_disp[d].u_disp.sout_w.last);
        n_eos     += int'(!dut.g_k[k].u_kernel.g_disp[d].u_disp.u_srf.eos_seen &&
                          dut.g_k[k].u_kernel.g_disp[d].u_disp.u_srf.pop_eos);
      end
    end
  end
  always @(posedge clk) if (rst_n && $countones(busy) > 1) n_overlap++;

  // ---------------- program images ----------------
  logic [31:0] prog [NK][1024];

  task automatic emit(input int k, inout int p, input logic [31:0] ins);
    prog[k][p] = ins;
    p++;
  endtask
  task automatic li(input int k, inout int p, input int rd, input logic [31:0] v);
    emit(k, p, addi(rd, 0, int'(v[31:16])));
    emit(k, p, bslli(rd, rd, 16));
    emit(k, p, ori(rd, rd, int'(v[15:0])));
  endtask

  // inner product on D dispatchers, FP or integer; dispatcher code at 0
  task automatic gen_dot_disp(input int k, input int D, input bit fp);
    int p, clr, loop, poll, hl, hl2;
    p = 0;
    emit(k, p, addi(4, 0, 0));
    hl = p; emit(k, p, 0);
    emit(k, p, addi(6, 0, D - 1));
    clr = p;
    emit(k, p, swi(0, 6, 16));
    emit(k, p, addi(6, 6, -1));
    emit(k, p, bgti(6, (clr - p) * 4));
    loop = p;
    prog[k][hl] = bnei(28, (loop - hl) * 4);
    emit(k, p, fp ? fmul(3, 30, 30) : mul(3, 30, 30));
    emit(k, p, fp ? fadd(4, 4, 3) : add(4, 4, 3));
    emit(k, p, beqi(29, (loop - p) * 4));
    emit(k, p, swi(4, 28, 0));
    emit(k, p, addi(5, 0, 1));
    emit(k, p, swi(5, 28, 16));
    hl2 = p; emit(k, p, 0);
    emit(k, p, addi(6, 0, 1));
    poll = p;
    emit(k, p, lwi(7, 6, 16));
    emit(k, p, beqi(7, (poll - p) * 4));
    emit(k, p, lwi(8, 6, 0));
    emit(k, p, fp ? fadd(4, 4, 8) : add(4, 4, 8));
    emit(k, p, addi(6, 6, 1));
    emit(k, p, rsubi(9, 6, D));
    emit(k, p, bgti(9, (poll - p) * 4));
    emit(k, p, or_(29, 4, 0));
    prog[k][hl2] = bnei(28, (p - hl2) * 4);
    emit(k, p, halt());
  endtask

  // DSM code at word 256: C rounds of CH pairs to each dispatcher, store total
  task automatic gen_dot_dsm(input int k, input int D, input int CH, input int C,
                             input int XB, input int YB, input int RES);
    int p, outer, inner, skip;
    p = 256;
    li(k, p, 1, XB);
    li(k, p, 2, YB);
    li(k, p, 12, pcfg(CH, 1, 0, 1, 1, 0));
    emit(k, p, addi(13, 0, 256));
    emit(k, p, bslli(13, 13, 16));
    emit(k, p, addi(14, 0, 16384));
    emit(k, p, bslli(14, 14, 16));
    emit(k, p, addi(11, 0, C));
    outer = p;
    emit(k, p, rsubi(17, 11, 1));
    skip = p; emit(k, p, 0);
    emit(k, p, or_(12, 12, 14));
    prog[k][skip] = bnei(17, (p - skip) * 4);
    emit(k, p, addi(10, 0, 0));
    emit(k, p, or_(15, 12, 0));
    inner = p;
    emit(k, p, ldp(15, 1, 2));
    emit(k, p, addi(1, 1, CH));
    emit(k, p, addi(2, 2, CH));
    emit(k, p, add(15, 15, 13));
    emit(k, p, addi(10, 10, 1));
    emit(k, p, rsubi(16, 10, D));
    emit(k, p, bgti(16, (inner - p) * 4));
    emit(k, p, addi(11, 11, -1));
    emit(k, p, bgti(11, (outer - p) * 4));
    li(k, p, 20, RES);
    li(k, p, 21, pcfg(1, 1, 0, 0, 0, 0));
    emit(k, p, stp(21, 20));
    emit(k, p, halt());
  endtask

  // convolution, dispatcher code at 0: window of D+K-1 (K = 3) broadcast elements
  task automatic gen_conv_disp(input int k, input int D, input int w0, input int w1, input int w2);
    int p, win, skip, take, skip2, done;
    p = 0;
    emit(k, p, addi(20, 0, w0));
    emit(k, p, addi(21, 0, w1));
    emit(k, p, addi(22, 0, w2));
    win = p;
    emit(k, p, or_(5, 28, 0));
    skip = p;
    emit(k, p, 0);                                // beqi r5, take (patched)
    emit(k, p, add(0, 30, 0));
    emit(k, p, addi(5, 5, -1));
    emit(k, p, bri((skip - p) * 4));
    take = p;
    prog[k][skip] = beqi(5, (take - skip) * 4);
    emit(k, p, mul(11, 30, 20));
    emit(k, p, mul(12, 30, 21));
    emit(k, p, mul(13, 30, 22));
    emit(k, p, rsubi(5, 28, D - 1));
    skip2 = p;
    emit(k, p, 0);                                // beqi r5, done (patched)
    emit(k, p, add(0, 30, 0));
    emit(k, p, addi(5, 5, -1));
    emit(k, p, bri((skip2 - p) * 4));
    done = p;
    prog[k][skip2] = beqi(5, (done - skip2) * 4);
    emit(k, p, add(14, 11, 12));
    emit(k, p, add(14, 14, 13));
    emit(k, p, or_(29, 14, 0));
    emit(k, p, beqi(29, (win - p) * 4));
    emit(k, p, halt());
  endtask

  // convolution, DSM code at word 256: T windows; results of window t are
  // stored after window t+1 has been sent, so loading and computing overlap
  task automatic gen_conv_dsm(input int k, input int D, input int T, input int XB, input int YB);
    int p, lp, sd, last, skip, nost;
    p = 256;
    li(k, p, 1, XB);                              // window base
    li(k, p, 2, YB);                              // output base of the window to store
    li(k, p, 12, pcfg(D + 2, 1, 15, 0, 1, 0));
    emit(k, p, addi(14, 0, 16384));
    emit(k, p, bslli(14, 14, 16));                // eos bit
    emit(k, p, addi(13, 0, 256));
    emit(k, p, bslli(13, 13, 16));                // +1 dispatcher
    li(k, p, 18, pcfg(1, 1, 0, 0, 0, 0));
    emit(k, p, addi(11, 0, 0));                   // t
    lp = p;
    emit(k, p, rsubi(17, 11, T - 1));
    skip = p; emit(k, p, 0);                      // bnei r17, +2 (patched)
    emit(k, p, or_(12, 12, 14));
    prog[k][skip] = bnei(17, (p - skip) * 4);
    emit(k, p, ldp(12, 1, 0));
    emit(k, p, addi(1, 1, D));
    nost = p; emit(k, p, 0);                      // beqi r11, after stores (patched)
    emit(k, p, or_(15, 18, 0));
    emit(k, p, addi(10, 0, 0));
    sd = p;
    emit(k, p, add(19, 2, 10));
    emit(k, p, stp(15, 19));
    emit(k, p, add(15, 15, 13));
    emit(k, p, addi(10, 10, 1));
    emit(k, p, rsubi(16, 10, D));
    emit(k, p, bgti(16, (sd - p) * 4));
    emit(k, p, addi(2, 2, D));
    prog[k][nost] = beqi(11, (p - nost) * 4);
    emit(k, p, addi(11, 11, 1));
    emit(k, p, rsubi(17, 11, T));
    emit(k, p, bgti(17, (lp - p) * 4));
    // stores of the last window
    emit(k, p, or_(15, 18, 0));
    emit(k, p, addi(10, 0, 0));
    last = p;
    emit(k, p, add(19, 2, 10));
    emit(k, p, stp(15, 19));
    emit(k, p, add(15, 15, 13));
    emit(k, p, addi(10, 10, 1));
    emit(k, p, rsubi(16, 10, D));
    emit(k, p, bgti(16, (last - p) * 4));
    emit(k, p, halt());
  endtask

  // element-wise kernels (pooling by pairs or sum of two vectors), dispatcher
  // code at 0: chunks of CH results, each chunk one output block
  task automatic gen_map_disp(input int k, input int CH, input bit pool);
    int p, top, item, lb, lo, last;
    p = 0;
    top = p;
    emit(k, p, addi(5, 0, CH - 1));
    item = p;
    if (pool) begin
      emit(k, p, add(1, 30, 0));
      emit(k, p, add(2, 30, 0));
      emit(k, p, rsub(3, 1, 2));
      lb = p; emit(k, p, 0);                      // bgti r3, take r2
      emit(k, p, or_(4, 1, 0));
      lo = p; emit(k, p, 0);                      // bri out
      prog[k][lb] = bgti(3, (p - lb) * 4);
      emit(k, p, or_(4, 2, 0));
      prog[k][lo] = bri((p - lo) * 4);
    end else begin
      emit(k, p, add(4, 30, 30));
    end
    last = p; emit(k, p, 0);                      // beqi r5, last item
    emit(k, p, or_(31, 4, 0));
    emit(k, p, addi(5, 5, -1));
    emit(k, p, bri((item - p) * 4));
    prog[k][last] = beqi(5, (p - last) * 4);
    emit(k, p, or_(29, 4, 0));
    emit(k, p, beqi(29, (top - p) * 4));
    emit(k, p, halt());
  endtask

  // DSM code at word 256 for the element-wise kernels: R rounds; in each,
  // one chunk to every dispatcher (2*CH elements of XB, or CH pairs of XB and
  // YB), then one Store Pattern of CH results from every dispatcher to OB
  task automatic gen_map_dsm(input int k, input int D, input int CH, input int R, input bit pool,
                             input int XB, input int YB, input int OB);
    int p, outer, ld, st, skip;
    p = 256;
    li(k, p, 1, XB);
    li(k, p, 2, YB);
    li(k, p, 3, OB);
    li(k, p, 12, pool ? pcfg(2 * CH, 1, 0, 0, 1, 0) : pcfg(CH, 1, 0, 1, 1, 0));
    li(k, p, 18, pcfg(CH, 1, 0, 0, 0, 0));
    emit(k, p, addi(13, 0, 256));
    emit(k, p, bslli(13, 13, 16));                // +1 dispatcher
    emit(k, p, addi(14, 0, 16384));
    emit(k, p, bslli(14, 14, 16));                // eos bit
    emit(k, p, addi(11, 0, 0));
    outer = p;
    emit(k, p, rsubi(17, 11, R - 1));
    emit(k, p, or_(15, 12, 0));
    skip = p; emit(k, p, 0);                      // bnei r17, +2
    emit(k, p, or_(15, 15, 14));
    prog[k][skip] = bnei(17, (p - skip) * 4);
    emit(k, p, addi(10, 0, 0));
    ld = p;
    emit(k, p, ldp(15, 1, 2));
    emit(k, p, addi(1, 1, pool ? 2 * CH : CH));
    emit(k, p, addi(2, 2, CH));
    emit(k, p, add(15, 15, 13));
    emit(k, p, addi(10, 10, 1));
    emit(k, p, rsubi(16, 10, D));
    emit(k, p, bgti(16, (ld - p) * 4));
    emit(k, p, or_(15, 18, 0));
    emit(k, p, addi(10, 0, 0));
    st = p;
    emit(k, p, stp(15, 3));
    emit(k, p, addi(3, 3, CH));
    emit(k, p, add(15, 15, 13));
    emit(k, p, addi(10, 10, 1));
    emit(k, p, rsubi(16, 10, D));
    emit(k, p, bgti(16, (st - p) * 4));
    emit(k, p, addi(11, 11, 1));
    emit(k, p, rsubi(17, 11, R));
    emit(k, p, bgti(17, (outer - p) * 4));
    emit(k, p, halt());
  endtask

  // ---------------- host port ----------------
  task automatic hwrite(input int a, input logic [31:0] v);
    @(negedge clk);
    host_en = 1; host_we = 1; host_addr = 18'(a); host_wdata = v;
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask
  task automatic hread(input int a, output logic [31:0] v);
    @(negedge clk);
    host_en = 1; host_we = 0; host_addr = 18'(a);
    @(negedge clk);
    host_en = 0;
    v = host_rdata;
  endtask
  task automatic load_prog(input int k);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      imem_we = '0; imem_we[k] = 1'b1; imem_waddr = 10'(i); imem_wdata = prog[k][i];
    end
    @(negedge clk); imem_we = '0;
  endtask

  // ---------------- scenario ----------------
  localparam int CD = 4, T = 16, L = CD * T;                 // convolution
  localparam int CX = 'h1000, CY = 'h2000, W2 = 'h3000, IRES = 'h3800;
  localparam int FD = 8, FCH = 4, FC = 2, FN = FD * FCH * FC; // FP inner product
  localparam int FX = 'h20000, FY = 'h30000, FRES = 'h3FFFF;
  localparam int MCH = 4;                                     // element-wise kernels
  localparam int P1 = 'h2400, V2 = 'h2600, A2 = 'h2800, P2 = 'h2A00;
  localparam int L1 = L / 2, L2 = L1 / 2;                      // pooled sizes
  localparam int ID = 8, ICH = L2 / ID, IC = 1;               // integer inner product

  task automatic run_kernel(input int k);
    @(negedge clk); start[k] = 1;
    @(negedge clk); start = '0;
    repeat (3) @(negedge clk);
    while (busy[k]) @(negedge clk);
  endtask
  task automatic check_map(input string name, input int base, input int n, input logic [31:0] exp []);
    logic [31:0] v;
    for (int j = 0; j < n; j++) begin
      hread(base + j, v);
      checks++;
      if (v !== exp[j]) begin failures++; $display("%s[%0d] = %0d, expected %0d", name, j, $signed(v), $signed(exp[j])); end
    end
  endtask

  initial begin
    logic [31:0] p1 [], v2 [], a2 [], p2 [];
    logic [31:0] cx [L + 2], cy [L], w2 [L], fx [FN], fy [FN], fpart [FD], ftot, itot, v;
    int w [3];
    host_en = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    imem_we = '0; imem_waddr = 0; imem_wdata = 0; start = '0;
    for (int k = 0; k < NK; k++) begin
      disp_pc[k] = 0; dsm_pc[k] = 32'h400;
      for (int i = 0; i < 1024; i++) prog[k][i] = halt();
    end
    w = '{3, -2, 5};
    for (int i = 0; i < L + 2; i++) cx[i] = $urandom_range(1000, 0);
    for (int j = 0; j < L; j++) begin
      cy[j] = cx[j] * w[0] + cx[j + 1] * w[1] + cx[j + 2] * w[2];
      w2[j] = $urandom_range(50, 0);
    end
    p1 = new[L1]; v2 = new[L1]; a2 = new[L1]; p2 = new[L2];
    for (int j = 0; j < L1; j++) begin
      p1[j] = ($signed(cy[2 * j + 1]) > $signed(cy[2 * j])) ? cy[2 * j + 1] : cy[2 * j];
      v2[j] = $urandom_range(3000, 0) - 1500;
      a2[j] = p1[j] + v2[j];
    end
    for (int j = 0; j < L2; j++)
      p2[j] = ($signed(a2[2 * j + 1]) > $signed(a2[2 * j])) ? a2[2 * j + 1] : a2[2 * j];
    itot = 0;
    for (int j = 0; j < L2; j++) itot += p2[j] * w2[j];
    for (int i = 0; i < FN; i++) begin
      fx[i] = rand_f(2) & 32'h7FFFFFFF; fy[i] = rand_f(2) & 32'h7FFFFFFF;
    end
    for (int d = 0; d < FD; d++) begin
      fpart[d] = 0;
      for (int c = 0; c < FC; c++)
        for (int q = 0; q < FCH; q++) begin
          int i;
          i = (c * FD + d) * FCH + q;
          fpart[d] = d2s(s2d(fpart[d]) + s2d(d2s(s2d(fx[i]) * s2d(fy[i]))));
        end
    end
    ftot = fpart[0];
    for (int d = 1; d < FD; d++) ftot = d2s(s2d(ftot) + s2d(fpart[d]));

    gen_conv_disp(0, CD, w[0], w[1], w[2]);
    gen_conv_dsm(0, CD, T, CX, CY);
    gen_dot_disp(2, FD, 1);
    gen_dot_dsm(2, FD, FCH, FC, FX, FY, FRES);
    gen_dot_disp(5, ID, 0);
    gen_dot_dsm(5, ID, ICH, IC, P2, W2, IRES);
    gen_map_disp(1, MCH, 1);
    gen_map_dsm(1, 2, MCH, L1 / (2 * MCH), 1, CY, 0, P1);
    gen_map_disp(3, MCH, 0);
    gen_map_dsm(3, 2, MCH, L1 / (2 * MCH), 0, P1, V2, A2);
    gen_map_disp(4, MCH, 1);
    gen_map_dsm(4, 2, MCH, L2 / (2 * MCH), 1, A2, 0, P2);

    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < L + 2; i++) hwrite(CX + i, cx[i]);
    for (int i = 0; i < L; i++) hwrite(W2 + i, w2[i]);
    for (int i = 0; i < L1; i++) hwrite(V2 + i, v2[i]);
    for (int i = 0; i < FN; i++) begin
      hwrite(FX + i, fx[i]); hwrite(FY + i, fy[i]);
    end
    for (int k = 0; k < NK; k++) load_prog(k);

    @(negedge clk); start[2] = 1;                 // FP inner product, alongside the chain
    @(negedge clk); start = '0;
    run_kernel(0);
    run_kernel(1);
    run_kernel(3);
    run_kernel(4);
    run_kernel(5);
    while (|busy) @(negedge clk);

    for (int j = 0; j < L; j++) begin
      hread(CY + j, v);
      checks++;
      if (v !== cy[j]) begin failures++; $display("conv[%0d] = %0d, expected %0d", j, $signed(v), $signed(cy[j])); end
    end
    check_map("pool1", P1, L1, p1);
    check_map("sum", A2, L1, a2);
    check_map("pool2", P2, L2, p2);
    hread(IRES, v);
    checks++;
    if (v !== itot) begin failures++; $display("integer inner product %0d, expected %0d", v, itot); end
    else $display("integer inner product %0d correct", v);
    hread(FRES, v);
    checks++;
    if (v !== ftot) begin failures++; $display("FP inner product %h, expected %h", v, ftot); end
    else $display("FP inner product %f correct", s2d(v));

    $display("broadcast loads %0d, two-vector loads %0d, stores %0d", n_bcast, n_two, n_store);
    $display("input bank swaps %0d, output bank swaps %0d, end of stream %0d", n_inswap, n_outswap, n_eos);
    $display("RIT stalls %0d, WB conflicts %0d, empty-stream stalls %0d, issue waits %0d, overlap %0d",
             n_rit, n_wbc, n_sst, n_iqwait, n_overlap);
    checks++; if (n_bcast == 0)   begin failures++; $display("no broadcast"); end
    checks++; if (n_two == 0)     begin failures++; $display("no two-vector load"); end
    checks++; if (n_store == 0)   begin failures++; $display("no store pattern"); end
    checks++; if (n_inswap == 0)  begin failures++; $display("no input bank swap"); end
    checks++; if (n_outswap == 0) begin failures++; $display("no output bank swap"); end
    checks++; if (n_eos == 0)     begin failures++; $display("no end of stream"); end
    checks++; if (n_rit == 0)     begin failures++; $display("no RIT stall"); end
    checks++; if (n_wbc == 0)     begin failures++; $display("no write-back conflict"); end
    checks++; if (n_sst == 0)     begin failures++; $display("no empty-stream stall"); end
    checks++; if (n_iqwait == 0)  begin failures++; $display("no operation waited in an issue FIFO"); end
    checks++; if (n_overlap == 0) begin failures++; $display("kernels never ran concurrently"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
