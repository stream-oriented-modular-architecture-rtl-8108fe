// tb_soma_srf: checks the Stream Register File.
// General-purpose bank: random writes and two-port reads against a model.
// Input banks: a producer writes blocks of random length (the last element of
// each block marked last, the final one eos) whenever in_ready is high; a
// consumer pops one or two elements at random times. The popped sequence must
// equal the written sequence, the active bank must alternate after every
// block (double buffering), and eos_seen must rise after the final element.
// Output banks: blocks pushed by the dispatcher side must come out in order
// on the stream side and the drained bank must alternate per block.
module tb_soma_srf;
  import soma_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clear;
  logic [4:0]  ra_adr, rb_adr, gpr_wadr;
  logic [31:0] ra_data, rb_data, gpr_wdata;
  logic        gpr_we, in_valid, in_ready, sout_push, out_valid, out_pop, eos_seen, in_rsel, out_wsel;
  stream_t     in_elem, sin_head0, sin_head1, sout_elem, out_elem;
  logic [1:0]  sin_avail, sin_pop;
  logic [4:0]  sout_used;

  soma_srf #(.DEPTH(16)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] gref [32];
  logic [31:0] q_in [$], q_out [$];
  int n_toggle_in = 0, n_blocks_in = 0, n_toggle_out = 0;

  initial begin
    clear = 0; gpr_we = 0; in_valid = 0; sin_pop = 0; sout_push = 0; out_pop = 0;
    ra_adr = 0; rb_adr = 0; gpr_wadr = 0; gpr_wdata = 0; in_elem = '0; sout_elem = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // GPR bank
    for (int i = 0; i < 32; i++) gref[i] = 0;
    for (int i = 1; i < 28; i++) begin
      @(negedge clk);
      gpr_we = 1; gpr_wadr = 5'(i); gpr_wdata = $urandom; gref[i] = gpr_wdata;
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      gpr_we = 1; gpr_wadr = 5'($urandom_range(27, 1)); gpr_wdata = $urandom;
      gref[gpr_wadr] = gpr_wdata;
      @(negedge clk);
      gpr_we = 0;
      ra_adr = 5'($urandom_range(27, 0)); rb_adr = 5'($urandom_range(27, 0));
      if (ra_adr == 0) gref[0] = 0;
      #1 checks++;
      if (ra_data !== gref[ra_adr] || rb_data !== gref[rb_adr]) begin
        failures++; $display("gpr mismatch r%0d r%0d", ra_adr, rb_adr);
      end
    end
    // Input banks: producer and consumer in parallel
    fork
      begin : producer
        int nblk = 12;
        for (int b = 0; b < nblk; b++) begin
          int len;
          len = 2 * $urandom_range(6, 1);
          for (int i = 0; i < len; i++) begin
            @(negedge clk);
            while (!in_ready) @(negedge clk);
            in_valid = 1;
            in_elem.data = $urandom;
            in_elem.last = (i == len - 1);
            in_elem.eos  = (b == nblk - 1) && (i == len - 1);
            q_in.push_back(in_elem.data);
            @(posedge clk);
            #1 in_valid = 0;
          end
          n_blocks_in++;
        end
      end
      begin : consumer
        logic prev_sel;
        int got = 0;
        bit done = 0;
        while (!done) begin
          @(negedge clk);
          sin_pop = 0;
          if ($urandom_range(2, 0) != 0 && sin_avail != 0) begin
            sin_pop = (sin_avail == 2 && $urandom_range(1, 0)) ? 2'd2 : 2'd1;
            // keep pairs: pop two only at even positions within a block
            if (got % 2 == 1) sin_pop = 2'd1;
            else if (sin_avail == 2) sin_pop = 2'd2;
            else sin_pop = 2'd0;
          end
          if (sin_pop != 0) begin
            checks++;
            if (q_in.size() < sin_pop || sin_head0.data !== q_in[0] ||
                (sin_pop == 2 && sin_head1.data !== q_in[1])) begin
              failures++; $display("stream input order mismatch");
            end
            prev_sel = in_rsel;
            if (sin_head0.eos || (sin_pop == 2 && sin_head1.eos)) done = 1;
            void'(q_in.pop_front());
            if (sin_pop == 2) void'(q_in.pop_front());
            got += sin_pop;
            @(posedge clk);
            #1 sin_pop = 0;
            if (in_rsel != prev_sel) n_toggle_in++;
          end
        end
      end
    join
    @(negedge clk);
    checks++;
    if (!eos_seen) begin failures++; $display("eos not seen"); end
    checks++;
    if (n_toggle_in != 12) begin failures++; $display("input bank toggles %0d, expected 12", n_toggle_in); end
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (eos_seen) begin failures++; $display("eos not cleared"); end
    // Output banks
    fork
      begin
        for (int b = 0; b < 6; b++) begin
          int len;
          len = $urandom_range(8, 1);
          for (int i = 0; i < len; i++) begin
            @(negedge clk);
            while (sout_used >= 15) @(negedge clk);
            sout_push = 1; sout_elem.data = $urandom; sout_elem.last = (i == len - 1); sout_elem.eos = 0;
            q_out.push_back(sout_elem.data);
            @(posedge clk); #1 sout_push = 0;
          end
        end
      end
      begin
        int n = 0;
        logic prev;
        repeat (40) @(negedge clk);
        while (q_out.size() != 0 || n == 0) begin
          @(negedge clk);
          if (out_valid) begin
            checks++;
            if (out_elem.data !== q_out[0]) begin failures++; $display("stream output order mismatch"); end
            void'(q_out.pop_front());
            n++;
            out_pop = 1; prev = out_wsel;
            if (out_elem.last) n_toggle_out++;
            @(posedge clk); #1 out_pop = 0;
          end
        end
      end
    join
    checks++;
    if (n_toggle_out != 6) begin failures++; $display("output blocks %0d", n_toggle_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
