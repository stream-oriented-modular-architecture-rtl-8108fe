// soma_xbar: low-latency crossbar switch of the kernel's local interconnect.
//
// Used twice in a kernel: as the ISSUE network (masters are the dispatchers'
// issue FIFOs, slaves the shared functional units) and as the WB network
// (masters are the FU output FIFOs, slaves the dispatchers' write-back ports).
// Each master presents a packet with the index of its destination slave.
// Every slave has its own round-robin arbiter, so packets from different
// masters travel in the same cycle whenever their slaves differ.
// Timing: fully combinational from m_valid/m_dest/m_data to s_valid/s_data and
// from s_ready to m_ready; a transfer happens in a cycle where the master's
// m_valid and m_ready are both high. The arbiter pointer moves past the
// winner after each transfer. s_src tells the slave which master won.
// Following the source design: two unidirectional crossbar networks with a
// generic number of masters and slaves. Own choice: round-robin arbitration.
module soma_xbar #(
  parameter int unsigned NM = 8,   // masters
  parameter int unsigned NS = 4,   // slaves
  parameter int unsigned W  = 32   // packet width
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic [NM-1:0]                           m_valid,
  input  logic [NM-1:0][((NS > 1) ? $clog2(NS) : 1)-1:0] m_dest,
  input  logic [NM-1:0][W-1:0]                    m_data,
  output logic [NM-1:0]                           m_ready,
  output logic [NS-1:0]                           s_valid,
  output logic [NS-1:0][W-1:0]                    s_data,
  output logic [NS-1:0][((NM > 1) ? $clog2(NM) : 1)-1:0] s_src,
  input  logic [NS-1:0]                           s_ready
);
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;

  logic [NS-1:0][MW-1:0] ptr;

  always_comb begin
    m_ready = '0;
    for (int s = 0; s < NS; s++) begin
      s_valid[s] = 1'b0;
      s_src[s]   = '0;
      for (int k = NM - 1; k >= 0; k--) begin
        int m;
        m = (int'(ptr[s]) + k) % NM;
        if (m_valid[m] && int'(m_dest[m]) == s) begin
          s_valid[s] = 1'b1;
          s_src[s]   = MW'(m);
        end
      end
      s_data[s] = m_data[s_src[s]];
      if (s_valid[s] && s_ready[s]) m_ready[s_src[s]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else
      for (int s = 0; s < NS; s++)
        if (s_valid[s] && s_ready[s])
          ptr[s] <= (int'(s_src[s]) == NM - 1) ? '0 : s_src[s] + 1'b1;
  end
endmodule
