// tb_soma_rit: checks the Register Invalidation Table against a reference
// array of valid bits: random issues (invalidate) and write backs (validate),
// and random source/destination lookups whose stall answer must match the
// reference; registers 0 and the stream registers must never stall.
module tb_soma_rit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic use_a, use_b, use_d, we_id, we_wb, stall;
  logic [4:0] adr_a, adr_b, adr_d, adr_wb;
  bit ref_valid [32];

  soma_rit #(.NREG(28)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit inv(input logic [4:0] r);
    return r != 0 && r < 28 && !ref_valid[r];
  endfunction

  initial begin
    foreach (ref_valid[i]) ref_valid[i] = 1;
    {use_a, use_b, use_d, we_id, we_wb} = '0;
    {adr_a, adr_b, adr_d, adr_wb} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      use_a = $urandom_range(1, 0); use_b = $urandom_range(1, 0); use_d = $urandom_range(1, 0);
      adr_a = 5'($urandom); adr_b = 5'($urandom); adr_d = 5'($urandom); adr_wb = 5'($urandom);
      we_wb = $urandom_range(1, 0);
      #1;
      checks++;
      if (stall !== ((use_a && inv(adr_a)) || (use_b && inv(adr_b)) || (use_d && inv(adr_d)))) begin
        failures++;
        $display("stall mismatch t=%0d a=%0d b=%0d d=%0d", t, adr_a, adr_b, adr_d);
      end
      we_id = use_d && !stall && $urandom_range(1, 0);
      @(posedge clk);
      if (we_wb && adr_wb != 0 && adr_wb < 28) ref_valid[adr_wb] = 1;
      if (we_id && adr_d != 0 && adr_d < 28) ref_valid[adr_d] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
