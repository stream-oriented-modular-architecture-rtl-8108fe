// tb_soma_dispatcher: runs a program on one dispatcher (ID 5) and checks its
// output stream. The shared units are modelled here: operations are accepted
// at random, multiplies and memory loads return after a random delay of 1 to
// 10 cycles, in order, so results often reach write back together with an
// FU0 result. The input stream arrives in blocks of four at random times, the
// last block marked end of stream.
// The program covers: FU0 arithmetic, compare and logic, the ID register, an
// external multiply followed by a dependent instruction (RIT stall), a store
// and load through the memory unit, call and return (brlid/rtsd), an
// unconditional branch over dead code, a loop that pops two stream operands
// per instruction until the status register shows end of stream, a barrel
// shift, and a final output that closes the output block; then "bri 0".
// Checked: every output value in order, the block mark on the last one,
// that the RIT stall, the write-back conflict stall and the empty-stream
// stall each happened, and that the dispatcher goes idle.
module tb_soma_dispatcher;
  import soma_pkg::*;
  import soma_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, iss_valid, iss_ready, wb_valid, sin_valid, sin_ready, sout_valid, sout_pop;
  logic ev_rit_stall, ev_wb_stall, ev_stream_stall, ev_issue;
  logic [31:0] start_pc, imem_data;
  logic [9:0] imem_addr;
  logic [FUID_W-1:0] iss_fu;
  issue_t iss_pkt;
  wb_t wb_pkt;
  stream_t sin_elem, sout_elem;

  soma_dispatcher #(.DID(5), .NFU(4), .FU_KIND('{FU_IMUL, FU_FMUL, FU_FADD, FU_MEM}),
                    .IQ_DEPTH(4), .SRF_DEPTH(16), .IMEM_AW(10)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [1024];
  assign imem_data = prog[imem_addr];

  // shared unit model
  typedef struct { int due; wb_t p; } ret_t;
  ret_t ret_q [$];
  logic [31:0] lmem [256];
  int cyc = 0;
  always @(negedge clk) iss_ready = $urandom_range(1, 0);
  always @(posedge clk) begin
    cyc++;
    if (rst_n && iss_valid && iss_ready) begin
      int due;
      due = cyc + $urandom_range(10, 1);
      if (ret_q.size() != 0 && ret_q[$].due >= due) due = ret_q[$].due + 1;
      case (iss_pkt.op)
        XOP_MUL: begin
          checks++;
          if (iss_fu != 0) begin failures++; $display("MUL sent to unit %0d", iss_fu); end
          ret_q.push_back('{due, '{data: iss_pkt.a * iss_pkt.b, dr: iss_pkt.dr, did: iss_pkt.did, fuid: 0}});
        end
        XOP_LOAD:
          ret_q.push_back('{due, '{data: lmem[iss_pkt.b[7:0]], dr: iss_pkt.dr, did: iss_pkt.did, fuid: 3}});
        XOP_STORE: lmem[iss_pkt.b[7:0]] = iss_pkt.a;
        default: begin failures++; $display("unexpected operation"); end
      endcase
    end
  end
  initial wb_valid = 0;
  always @(negedge clk) begin
    wb_valid = 0;
    if (ret_q.size() != 0 && ret_q[0].due <= cyc) begin
      wb_valid = 1; wb_pkt = ret_q[0].p;
    end
  end
  always @(posedge clk) if (rst_n && wb_valid) void'(ret_q.pop_front());

  // input stream
  localparam int NBLK = 6;
  logic [31:0] in_data [NBLK * 4];
  initial begin
    sin_valid = 0; sin_elem = '0;
    @(posedge start);
    for (int i = 0; i < NBLK * 4; i++) begin
      @(negedge clk);
      sin_valid = 0;
      repeat ($urandom_range(12, 0)) @(negedge clk);
      while (!sin_ready) @(negedge clk);
      sin_valid = 1;
      sin_elem = '{last: (i % 4) == 3, eos: i == NBLK * 4 - 1, data: in_data[i]};
    end
    @(negedge clk); sin_valid = 0;
  end

  // output stream
  logic [31:0] exp_out [$];
  int nout = 0, last_idx = -1;
  always @(negedge clk) sout_pop = rst_n && sout_valid && $urandom_range(1, 0);
  always @(posedge clk) if (rst_n && sout_pop) begin
    checks++;
    if (nout >= exp_out.size() || sout_elem.data !== exp_out[nout]) begin
      failures++; $display("output %0d: %h expected %h", nout, sout_elem.data,
                           nout < exp_out.size() ? exp_out[nout] : 0);
    end
    if (sout_elem.last) last_idx = nout;
    nout++;
  end

  int n_rit = 0, n_wb = 0, n_sst = 0;
  always @(posedge clk) begin
    n_rit += ev_rit_stall; n_wb += ev_wb_stall; n_sst += ev_stream_stall;
  end

  initial begin
    int p = 0;
    for (int i = 0; i < 1024; i++) prog[i] = halt();
    prog[0]  = addi(1, 0, 7);
    prog[1]  = addi(2, 0, -3);
    prog[2]  = add(31, 1, 2);
    prog[3]  = cmp(3, 2, 1);
    prog[4]  = or_(31, 3, 28);
    prog[5]  = mul(4, 1, 2);
    prog[6]  = addi(31, 4, 1);
    prog[7]  = swi(4, 28, 3);
    prog[8]  = lwi(5, 28, 3);
    prog[9]  = xor_(31, 5, 1);
    prog[10] = brlid(15, 12);
    prog[11] = bri(16);
    prog[12] = addi(31, 0, 999);
    prog[13] = addi(31, 0, 77);
    prog[14] = rtsd(15, 4);
    prog[15] = mul(31, 30, 30);
    prog[16] = add(31, 30, 30);
    prog[17] = beqi(29, -8);
    prog[18] = bsrli(31, 2, 28);
    // independent multiplies whose results return while FU0 results are in WB
    p = 19;
    for (int k = 0; k < 4; k++) begin
      prog[p++] = mul(6 + k, 1, 1);
      for (int j = 0; j < 4; j++) prog[p++] = addi(16 + j, 16 + j, 1);
    end
    prog[p++] = add(31, 6, 9);
    prog[p++] = addi(29, 0, 5);
    prog[p++] = halt();
    for (int i = 0; i < NBLK * 4; i++) in_data[i] = $urandom_range(100000, 0);
    exp_out = '{32'd4, 32'd15, -32'sd20, (-32'sd21) ^ 32'd7, 32'd77};
    for (int b = 0; b < NBLK; b++) begin
      exp_out.push_back(in_data[4 * b] * in_data[4 * b + 1]);
      exp_out.push_back(in_data[4 * b + 2] + in_data[4 * b + 3]);
    end
    exp_out.push_back(32'h0000000F);
    exp_out.push_back(32'd98);
    exp_out.push_back(32'd5);

    start = 0; start_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    while (busy) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (nout != exp_out.size()) begin failures++; $display("%0d outputs, expected %0d", nout, exp_out.size()); end
    checks++;
    if (last_idx != exp_out.size() - 1) begin failures++; $display("block mark at %0d", last_idx); end
    checks++;
    if (n_rit == 0) begin failures++; $display("no RIT stall"); end
    checks++;
    if (n_wb == 0) begin failures++; $display("no write-back conflict"); end
    checks++;
    if (n_sst == 0) begin failures++; $display("no empty-stream stall"); end
    $display("stalls: RIT %0d, write-back %0d, stream %0d", n_rit, n_wb, n_sst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
