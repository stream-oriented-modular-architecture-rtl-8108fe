// soma_top: multi-kernel stream processor.
//
// NK kernels, each with its own number of dispatchers (NDISP[k]), work around
// one shared stream-buffer memory. The input data stream and the results
// travel through that memory: a host writes the input through the host port,
// kernels read their operand streams from it and write their output streams
// into it for the next kernel, and the host reads the final results back.
// Each kernel has its own port on the shared memory, so kernels run
// concurrently. The host loads each kernel's instruction memory
// (imem_we[k] with the shared address/data bus), sets the start addresses and
// pulses start[k]; busy[k] falls when kernel k has finished. Sequencing
// between kernels (start one when its producer has finished) is the host's.
// Following the source design: kernels around a shared memory, and the
// default configuration of the six-kernel neural-network system (4, 2, 8, 2,
// 2 and 8 dispatchers). Own choices: the host port, the memory size, and one
// unit set for every kernel.
module soma_top import soma_pkg::*; #(
  parameter int unsigned NK         = 6,
  parameter int unsigned NDISP [NK] = '{4, 2, 8, 2, 2, 8},
  parameter int unsigned IMEM_AW    = 10,
  parameter int unsigned SMEM_AW    = 18
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host access to the shared memory (synchronous read)
  input  logic                       host_en,
  input  logic                       host_we,
  input  logic [SMEM_AW-1:0]         host_addr,
  input  logic [31:0]                host_wdata,
  output logic [31:0]                host_rdata,
  // program loading and control
  input  logic [NK-1:0]              imem_we,
  input  logic [IMEM_AW-1:0]         imem_waddr,
  input  logic [31:0]                imem_wdata,
  input  logic [NK-1:0]              start,
  input  logic [NK-1:0][31:0]        disp_pc,
  input  logic [NK-1:0][31:0]        dsm_pc,
  output logic [NK-1:0]              busy
);
  logic [NK:0]              m_en, m_we;
  logic [NK:0][SMEM_AW-1:0] m_addr;
  logic [NK:0][31:0]        m_wdata, m_rdata;

  for (genvar k = 0; k < NK; k++) begin : g_k
    soma_kernel #(.NDISP(NDISP[k]), .IMEM_AW(IMEM_AW), .SMEM_AW(SMEM_AW)) u_kernel (
      .clk, .rst_n, .start(start[k]), .disp_pc(disp_pc[k]), .dsm_pc(dsm_pc[k]), .busy(busy[k]),
      .imem_we(imem_we[k]), .imem_waddr, .imem_wdata,
      .mem_en(m_en[k]), .mem_we(m_we[k]), .mem_addr(m_addr[k]), .mem_wdata(m_wdata[k]),
      .mem_rdata(m_rdata[k])
    );
  end

  assign m_en[NK]    = host_en;
  assign m_we[NK]    = host_we;
  assign m_addr[NK]  = host_addr;
  assign m_wdata[NK] = host_wdata;
  assign host_rdata  = m_rdata[NK];

  soma_shmem #(.AW(SMEM_AW), .NP(NK + 1)) u_shmem (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );
endmodule
