// tb_soma_stream_icn: checks the stream manager interconnect with four
// dispatchers: readiness for individual and broadcast destinations, delivery
// to exactly the addressed input bank(s), and the store path (selected
// output bank head returned, pop sent to that dispatcher only).
module tb_soma_stream_icn;
  import soma_pkg::*;
  int checks = 0, failures = 0;
  localparam int ND = 4;

  logic [DID_W-1:0] ld_req_dest, ld_dest, st_src;
  logic ld_ready, ld_valid, st_valid, st_pop;
  stream_t ld_elem, st_elem, d_in_elem;
  logic [ND-1:0] d_in_ready, d_in_valid, d_out_valid, d_out_pop;
  stream_t d_out_elem [ND];

  soma_stream_icn #(.ND(ND)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int dst, src;
      logic exp_ready;
      d_in_ready  = ND'($urandom);
      d_out_valid = ND'($urandom);
      for (int i = 0; i < ND; i++) d_out_elem[i] = '{last: 1'($urandom), eos: 1'b0, data: $urandom};
      dst = ($urandom_range(4, 0) == 0) ? 15 : $urandom_range(ND - 1, 0);
      src = $urandom_range(ND - 1, 0);
      ld_req_dest = DID_W'(dst);
      ld_dest     = DID_W'(dst);
      ld_valid    = $urandom_range(1, 0);
      ld_elem     = '{last: 1'b0, eos: 1'b1, data: $urandom};
      st_src      = DID_W'(src);
      st_pop      = $urandom_range(1, 0);
      #1;
      exp_ready = (dst == 15) ? (&d_in_ready) : d_in_ready[dst];
      checks++;
      if (ld_ready !== exp_ready) begin failures++; $display("ld_ready wrong dst=%0d", dst); end
      for (int i = 0; i < ND; i++) begin
        checks++;
        if (d_in_valid[i] !== (ld_valid && (dst == 15 || dst == i))) begin
          failures++; $display("delivery wrong dst=%0d i=%0d", dst, i);
        end
        checks++;
        if (d_out_pop[i] !== (st_pop && src == i)) begin failures++; $display("pop wrong"); end
      end
      checks++;
      if (d_in_elem !== ld_elem || st_valid !== d_out_valid[src] || st_elem !== d_out_elem[src]) begin
        failures++; $display("data path wrong");
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
