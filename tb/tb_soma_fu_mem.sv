// tb_soma_fu_mem: checks the intra-kernel memory unit. Random loads and
// stores from random dispatchers are issued through its FU interface; loads
// must return the value of a reference memory (stores earlier in the stream
// included), with the issuer's dispatcher ID, destination register and the
// unit's FU ID, in order and one cycle after acceptance; stores return nothing.
module tb_soma_fu_mem;
  import soma_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   in_valid, in_ready, out_valid, out_ready, busy;
  issue_t in_pkt;
  wb_t    out_pkt;

  soma_fu_mem #(.AW(6), .FUID(5), .FIFO_DEPTH(8)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ref_mem [64];
  wb_t exp_q [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    wb_t e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("spurious result"); end
    else begin
      e = exp_q.pop_front();
      if (out_pkt !== e) begin
        failures++; $display("load got %h dr%0d d%0d f%0d exp %h dr%0d d%0d", out_pkt.data,
                             out_pkt.dr, out_pkt.did, out_pkt.fuid, e.data, e.dr, e.did);
      end
    end
  end

  initial begin
    in_valid = 0; in_pkt = '0; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill the memory
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      in_valid = 1; in_pkt = '{op: XOP_STORE, a: $urandom, b: 32'(i), did: '0, dr: '0};
      ref_mem[i] = in_pkt.a;
    end
    @(negedge clk); in_valid = 0;
    // latency of one load
    @(negedge clk);
    in_valid = 1; in_pkt = '{op: XOP_LOAD, a: 0, b: 32'd7, did: 4'd3, dr: 5'd9};
    exp_q.push_back('{data: ref_mem[7], dr: 5'd9, did: 4'd3, fuid: 4'd5});
    @(posedge clk);
    begin
      int n = 0;
      #1 in_valid = 0;
      do begin @(negedge clk); n++; end while (!out_valid);
      checks++;
      if (n - 1 != 1) begin failures++; $display("load latency %0d", n - 1); end
    end
    // random traffic with back pressure
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      out_ready = $urandom_range(1, 0);
      if (!in_ready) begin in_valid = 0; continue; end
      in_valid = $urandom_range(3, 0) != 0;
      in_pkt.op  = $urandom_range(1, 0) ? XOP_LOAD : XOP_STORE;
      in_pkt.a   = $urandom;
      in_pkt.b   = 32'($urandom_range(63, 0));
      in_pkt.did = DID_W'($urandom);
      in_pkt.dr  = 5'($urandom);
      if (in_valid) begin
        if (in_pkt.op == XOP_STORE) ref_mem[in_pkt.b] = in_pkt.a;
        else exp_q.push_back('{data: ref_mem[in_pkt.b], dr: in_pkt.dr, did: in_pkt.did, fuid: 4'd5});
      end
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (30) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || busy) begin failures++; $display("%0d loads missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
