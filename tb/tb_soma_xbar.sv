// tb_soma_xbar: checks the crossbar switch with 5 masters and 3 slaves.
// Each master sends a numbered sequence of packets to random slaves; slaves
// accept at random. Every packet must arrive exactly once, at its own slave,
// with the reported source, and packets of one master to one slave in order.
// It also checks that two transfers to different slaves happen in one cycle
// and that a slave with permanent requests from several masters serves them
// all (round robin, no starvation).
module tb_soma_xbar;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NM = 5, NS = 3, W = 16;

  logic [NM-1:0] m_valid, m_ready;
  logic [NM-1:0][1:0] m_dest;
  logic [NM-1:0][W-1:0] m_data;
  logic [NS-1:0] s_valid, s_ready;
  logic [NS-1:0][W-1:0] s_data;
  logic [NS-1:0][2:0] s_src;

  soma_xbar #(.NM(NM), .NS(NS), .W(W)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent [NM], expect_seq [NM][NS], parallel = 0, recv = 0;
  int served [NM];
  localparam int NPKT = 200;

  // payload: {master[2:0], dest[1:0], seq[10:0]}
  always @(posedge clk) if (rst_n) begin
    int nx;
    nx = 0;
    for (int s = 0; s < NS; s++) if (s_valid[s] && s_ready[s]) begin
      int m, d, q;
      nx++;
      m = s_data[s][15:13]; d = s_data[s][12:11]; q = s_data[s][10:0];
      checks++;
      if (m != s_src[s] || d != s || q != expect_seq[m][s]) begin
        failures++; $display("bad packet at slave %0d: m=%0d src=%0d d=%0d q=%0d exp=%0d", s, m, s_src[s], d, q, expect_seq[m][s]);
      end
      expect_seq[m][s] = q + 1;
      recv++;
      served[m]++;
    end
    if (nx > 1) parallel++;
  end

  for (genvar m = 0; m < NM; m++) begin : g_m
    initial begin
      int seq [NS];
      for (int s = 0; s < NS; s++) seq[s] = 0;
      m_valid[m] = 0; m_dest[m] = 0; m_data[m] = 0;
      @(posedge rst_n);
      for (int i = 0; i < NPKT; i++) begin
        int d;
        @(negedge clk);
        d = $urandom_range(NS - 1, 0);
        m_valid[m] = 1; m_dest[m] = 2'(d); m_data[m] = {3'(m), 2'(d), 11'(seq[d])};
        seq[d]++;
        do @(posedge clk); while (!m_ready[m]);
        #1 m_valid[m] = 0;
      end
      sent[m] = NPKT;
    end
  end

  initial begin
    for (int m = 0; m < NM; m++) begin
      served[m] = 0;
      for (int s = 0; s < NS; s++) expect_seq[m][s] = 0;
    end
    s_ready = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (recv < NM * NPKT) begin
      @(negedge clk);
      s_ready = NS'($urandom);
    end
    checks++;
    if (parallel == 0) begin failures++; $display("never two transfers in one cycle"); end
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (served[m] != NPKT) begin failures++; $display("master %0d served %0d", m, served[m]); end
    end
    $display("parallel transfer cycles: %0d", parallel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
