// tb_soma_dsm: runs a data stream manager program against a memory model and
// a model of the interconnect, and checks every transfer.
// The program builds pattern configurations with internal instructions, then
//  1. loads two interleaved vectors (5 elements each, stride 2) to dispatcher 3,
//     marking the end of the block: with the destination always ready, the
//     ten elements must leave in ten consecutive cycles;
//  2. broadcasts 4 elements with stride -1, the last one marked end of stream,
//     while destinations are ready only at random times;
//  3. stores 3 elements popped from dispatcher 2's output bank to address 300;
//  4. runs a counted loop of three 2-element loads to dispatcher 1, exercising
//     branches.
// Expected sequences come from the memory model and the program's intent.
module tb_soma_dsm;
  import soma_pkg::*;
  import soma_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, mem_en, mem_we, ld_ready, ld_valid, st_valid, st_pop;
  logic ev_load, ev_bcast, ev_store, ev_wait;
  logic [31:0] start_pc, imem_data, mem_wdata, mem_rdata;
  logic [9:0]  imem_addr;
  logic [11:0] mem_addr;
  logic [DID_W-1:0] ld_req_dest, ld_dest, st_src;
  stream_t ld_elem, st_elem;

  soma_dsm #(.IMEM_AW(10), .SMEM_AW(12)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [1024];
  logic [31:0] mem [4096];
  assign imem_data = prog[imem_addr];
  always_ff @(posedge clk) if (mem_en) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    else mem_rdata <= mem[mem_addr];
  end

  // interconnect model
  bit rand_ready = 0;
  always @(negedge clk) ld_ready = rand_ready ? ($urandom_range(2, 0) == 0) : 1'b1;
  logic [31:0] st_q [3];
  int st_idx = 0;
  assign st_valid = st_idx < 3 && st_src == 4'd2;
  assign st_elem  = '{last: st_idx == 2, eos: 1'b0, data: st_idx < 3 ? st_q[st_idx] : 32'h0};
  always @(posedge clk) if (st_pop) st_idx <= st_idx + 1;

  typedef struct { int dest; logic [31:0] data; bit last; bit eos; } xfer_t;
  xfer_t exp_q [$];
  int nrecv = 0, first_cyc = -1, last_cyc = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && ld_valid) begin
      xfer_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected transfer"); end
      else begin
        e = exp_q.pop_front();
        if (int'(ld_dest) != e.dest || ld_elem.data !== e.data || ld_elem.last != e.last ||
            ld_elem.eos != e.eos) begin
          failures++;
          $display("transfer %0d: dest %0d data %h l%0d e%0d, expected dest %0d data %h l%0d e%0d",
                   nrecv, ld_dest, ld_elem.data, ld_elem.last, ld_elem.eos, e.dest, e.data, e.last, e.eos);
        end
      end
      if (nrecv == 0) first_cyc = cyc;
      if (nrecv == 9) last_cyc = cyc;
      nrecv++;
    end
  end

  task automatic li(inout int pc, input int rd, input logic [31:0] v);
    prog[pc++] = addi(rd, 0, int'(v[31:16]));
    prog[pc++] = bslli(rd, rd, 16);
    prog[pc++] = ori(rd, rd, int'(v[15:0]));
  endtask

  initial begin
    int pc = 0;
    int loop_pc;
    for (int i = 0; i < 1024; i++) prog[i] = halt();
    for (int i = 0; i < 4096; i++) mem[i] = $urandom;
    // 1. two vectors X at 100, Y at 200, stride 2, 5 each, to dispatcher 3
    prog[pc++] = addi(1, 0, 100);
    prog[pc++] = addi(2, 0, 200);
    li(pc, 3, pcfg(5, 2, 3, 1, 1, 0));
    prog[pc++] = ldp(3, 1, 2);
    // 2. broadcast from 50 down, stride -1, 4 elements, end of stream
    prog[pc++] = addi(1, 0, 50);
    li(pc, 4, pcfg(4, -1, 15, 0, 1, 1));
    prog[pc++] = ldp(4, 1, 0);
    // 3. store 3 elements from dispatcher 2 to 300
    prog[pc++] = addi(5, 0, 300);
    li(pc, 6, pcfg(3, 1, 2, 0, 0, 0));
    prog[pc++] = stp(6, 5);
    // 4. loop: three loads of 2 elements to dispatcher 1 from 400, 410, 420
    prog[pc++] = addi(7, 0, 3);
    prog[pc++] = addi(8, 0, 400);
    li(pc, 9, pcfg(2, 1, 1, 0, 0, 0));
    loop_pc = pc;
    prog[pc++] = ldp(9, 8, 0);
    prog[pc++] = addi(8, 8, 10);
    prog[pc++] = addi(7, 7, -1);
    prog[pc] = bnei(7, (loop_pc - pc) * 4); pc++;
    prog[pc++] = halt();

    for (int i = 0; i < 5; i++) begin
      exp_q.push_back('{3, mem[100 + 2 * i], 0, 0});
      exp_q.push_back('{3, mem[200 + 2 * i], i == 4, 0});
    end
    for (int i = 0; i < 4; i++) exp_q.push_back('{15, mem[50 - i], i == 3, i == 3});
    for (int l = 0; l < 3; l++)
      for (int i = 0; i < 2; i++) exp_q.push_back('{1, mem[400 + 10 * l + i], 0, 0});
    st_q = '{32'hA0, 32'hA1, 32'hA2};

    start = 0; start_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    // random readiness from the broadcast on
    wait (nrecv == 10);
    rand_ready = 1;
    wait (nrecv >= 14);
    rand_ready = 0;
    @(negedge clk);
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d transfers missing", exp_q.size()); end
    checks++;
    if (last_cyc - first_cyc != 9) begin
      failures++; $display("two-vector pattern took %0d cycles for 10 elements", last_cyc - first_cyc + 1);
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (mem[300 + i] !== 32'hA0 + i) begin failures++; $display("store %0d wrong: %h", i, mem[300 + i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
