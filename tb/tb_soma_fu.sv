// tb_soma_fu: checks the polymorphic functional unit in its three kinds
// (integer multiplier, latency 6; FP multiplier, latency 8; FP adder with
// FADD and FRSUB, latency 11). Random operations from random dispatchers are
// offered whenever the unit is ready while the write-back side accepts at
// random, so the output FIFO fills and the credit check holds operations off.
// Results are compared with an independent model (exact double arithmetic
// rounded to single precision for the FP kinds); packets must keep their
// dispatcher ID, destination register and FU ID and come out in order; with
// the output always accepted, the first result must appear exactly LAT cycles
// after its operation was accepted.
module tb_soma_fu;
  import soma_pkg::*;
  import soma_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid [3], in_ready [3], out_valid [3], out_ready [3], busy [3];
  issue_t in_pkt [3];
  wb_t out_pkt [3];

  soma_fu #(.KIND(FU_IMUL), .LAT(6),  .FUID(1), .FIFO_DEPTH(16)) u_imul (
    .clk, .rst_n, .in_valid(in_valid[0]), .in_pkt(in_pkt[0]), .in_ready(in_ready[0]),
    .out_valid(out_valid[0]), .out_pkt(out_pkt[0]), .out_ready(out_ready[0]), .busy(busy[0]));
  soma_fu #(.KIND(FU_FMUL), .LAT(8),  .FUID(2), .FIFO_DEPTH(16)) u_fmul (
    .clk, .rst_n, .in_valid(in_valid[1]), .in_pkt(in_pkt[1]), .in_ready(in_ready[1]),
    .out_valid(out_valid[1]), .out_pkt(out_pkt[1]), .out_ready(out_ready[1]), .busy(busy[1]));
  soma_fu #(.KIND(FU_FADD), .LAT(11), .FUID(3), .FIFO_DEPTH(16)) u_fadd (
    .clk, .rst_n, .in_valid(in_valid[2]), .in_pkt(in_pkt[2]), .in_ready(in_ready[2]),
    .out_valid(out_valid[2]), .out_pkt(out_pkt[2]), .out_ready(out_ready[2]), .busy(busy[2]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  wb_t exp_q [3][$];
  int lat [3] = '{6, 8, 11};
  int fuid [3] = '{1, 2, 3};
  int full_seen = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic issue_t mkop(input int k);
    issue_t p;
    p.did = DID_W'($urandom);
    p.dr  = 5'($urandom);
    if (k == 0) begin
      p.op = XOP_MUL; p.a = $urandom; p.b = $urandom;
    end else if (k == 1) begin
      p.op = XOP_FMUL; p.a = rand_f(8); p.b = rand_f(8);
    end else begin
      p.op = $urandom_range(1, 0) ? XOP_FADD : XOP_FRSUB;
      p.a = rand_f(6); p.b = rand_f(6);
    end
    return p;
  endfunction

  function automatic logic [31:0] model(input int k, input issue_t p);
    if (k == 0) return p.a * p.b;
    if (k == 1) return d2s(s2d(p.a) * s2d(p.b));
    if (p.op == XOP_FADD) return d2s(s2d(p.a) + s2d(p.b));
    return d2s(s2d(p.b) - s2d(p.a));
  endfunction

  for (genvar k = 0; k < 3; k++) begin : g_k
    // driver
    initial begin
      in_valid[k] = 0; in_pkt[k] = '0;
      @(posedge rst_n);
      // latency probe: one operation with the output always accepted
      @(negedge clk);
      in_pkt[k] = mkop(k); in_valid[k] = 1;
      exp_q[k].push_back('{data: model(k, in_pkt[k]), dr: in_pkt[k].dr, did: in_pkt[k].did,
                          fuid: FUID_W'(fuid[k])});
      @(posedge clk);
      begin
        int n = 0;
        #1 in_valid[k] = 0;
        do begin @(negedge clk); n++; end while (!out_valid[k]);
        checks++;
        if (n - 1 != lat[k]) begin
          failures++; $display("FU%0d latency %0d, expected %0d", k, n - 1, lat[k]);
        end
      end
      repeat (5) @(negedge clk);
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        if (!in_ready[k]) full_seen++;
        while (!in_ready[k]) @(negedge clk);
        in_pkt[k] = mkop(k); in_valid[k] = 1;
        exp_q[k].push_back('{data: model(k, in_pkt[k]), dr: in_pkt[k].dr, did: in_pkt[k].did,
                            fuid: FUID_W'(fuid[k])});
        @(posedge clk); #1 in_valid[k] = 0;
      end
    end
    // checker
    always @(posedge clk) if (rst_n && out_valid[k] && out_ready[k]) begin
      wb_t e;
      checks++;
      if (exp_q[k].size() == 0) begin failures++; $display("FU%0d spurious result", k); end
      else begin
        e = exp_q[k].pop_front();
        if (out_pkt[k] !== e) begin
          failures++;
          $display("FU%0d got %h/%0d/%0d/%0d expected %h/%0d/%0d/%0d", k, out_pkt[k].data,
                   out_pkt[k].dr, out_pkt[k].did, out_pkt[k].fuid, e.data, e.dr, e.did, e.fuid);
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < 3; k++) out_ready[k] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (40) @(negedge clk);
    // random back pressure, with slow periods that fill the output FIFO
    repeat (3000) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) out_ready[k] = ($urandom_range(9, 0) < 3);
    end
    for (int k = 0; k < 3; k++) out_ready[k] = 1;
    repeat (100) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (exp_q[k].size() != 0 || busy[k]) begin failures++; $display("FU%0d left %0d", k, exp_q[k].size()); end
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("credit limit never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
