// soma_kernel: one programmable kernel of the stream architecture.
//
// NDISP dispatchers run their programs from a shared instruction memory and
// share NFU polymorphic functional units. Each dispatcher sends operations to
// the units through the ISSUE crossbar and receives results through the WB
// crossbar, so different dispatchers reach different units in the same
// cycle. One data stream manager (DSM), with its own program in the same
// instruction memory, loads operand streams from the shared memory into the
// dispatchers' stream register files and stores their output streams back,
// through the stream manager interconnect. The set of units is chosen by
// FU_KIND/FU_LAT; FU_MEM is the intra-kernel local memory.
// Interface: a host loads the instruction memory (imem_we/waddr/wdata), then
// pulses start; dispatchers begin at disp_pc and the DSM at dsm_pc (byte
// addresses). busy stays high until all programs have halted and every queue,
// unit and bank is empty. The DSM owns one port of the shared memory
// (synchronous read, one cycle).
// Following the source design: the block structure of the kernel (dispatchers
// with SRF and FU0, shared units, DSM, the two local networks, the stream
// manager interconnect and the instruction memory) and the FU latencies of
// the case studies. Own choices: the default unit set (the union of the
// units the case studies use) and the sizes of memories and queues.
module soma_kernel import soma_pkg::*; #(
  parameter int unsigned NDISP      = 8,
  parameter int unsigned NFU        = 4,
  parameter fu_kind_e    FU_KIND [NFU] = '{FU_IMUL, FU_FMUL, FU_FADD, FU_MEM},
  parameter int unsigned FU_LAT  [NFU] = '{6, 8, 11, 1},
  parameter int unsigned IMEM_AW    = 10,
  parameter int unsigned SMEM_AW    = 18,
  parameter int unsigned LMEM_AW    = 8,
  parameter int unsigned SRF_DEPTH  = 16,
  parameter int unsigned IQ_DEPTH   = 4,
  parameter int unsigned FU_FIFO    = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        disp_pc,
  input  logic [31:0]        dsm_pc,
  output logic               busy,
  input  logic               imem_we,
  input  logic [IMEM_AW-1:0] imem_waddr,
  input  logic [31:0]        imem_wdata,
  output logic               mem_en,
  output logic               mem_we,
  output logic [SMEM_AW-1:0] mem_addr,
  output logic [31:0]        mem_wdata,
  input  logic [31:0]        mem_rdata
);
  localparam int unsigned DW = (NDISP > 1) ? $clog2(NDISP) : 1;
  localparam int unsigned FW = (NFU > 1) ? $clog2(NFU) : 1;
  localparam int unsigned IW = $bits(issue_t);
  localparam int unsigned WW = $bits(wb_t);

  // instruction memory: port 0..NDISP-1 dispatchers, port NDISP the DSM
  logic [NDISP:0][IMEM_AW-1:0] im_addr;
  logic [NDISP:0][31:0]        im_data;
  soma_imem #(.AW(IMEM_AW), .NR(NDISP + 1)) u_imem (
    .clk, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .raddr(im_addr), .rdata(im_data)
  );

  // dispatcher-side signals
  logic [NDISP-1:0]            d_busy, iss_v, iss_r, wb_v;
  logic [NDISP-1:0][FW-1:0]    iss_dest;
  logic [NDISP-1:0][IW-1:0]    iss_data;
  logic [NDISP-1:0][WW-1:0]    wb_data;
  logic [NDISP-1:0]            sin_v, sin_r, sout_v, sout_pop;
  stream_t                     sin_e;
  stream_t                     sout_e [NDISP];
  logic [NDISP-1:0]            ev_rit, ev_wbst, ev_sst, ev_iss;

  for (genvar d = 0; d < NDISP; d++) begin : g_disp
    logic [FUID_W-1:0] fu_sel;
    issue_t            pkt;
    wb_t               wpkt;
    assign iss_dest[d] = FW'(fu_sel);
    assign iss_data[d] = pkt;
    assign wpkt        = wb_data[d];
    soma_dispatcher #(
      .DID(d), .NFU(NFU), .FU_KIND(FU_KIND), .IQ_DEPTH(IQ_DEPTH),
      .SRF_DEPTH(SRF_DEPTH), .IMEM_AW(IMEM_AW)
    ) u_disp (
      .clk, .rst_n, .start, .start_pc(disp_pc), .busy(d_busy[d]),
      .imem_addr(im_addr[d]), .imem_data(im_data[d]),
      .iss_valid(iss_v[d]), .iss_fu(fu_sel), .iss_pkt(pkt), .iss_ready(iss_r[d]),
      .wb_valid(wb_v[d]), .wb_pkt(wpkt),
      .sin_valid(sin_v[d]), .sin_elem(sin_e), .sin_ready(sin_r[d]),
      .sout_valid(sout_v[d]), .sout_elem(sout_e[d]), .sout_pop(sout_pop[d]),
      .ev_rit_stall(ev_rit[d]), .ev_wb_stall(ev_wbst[d]), .ev_stream_stall(ev_sst[d]),
      .ev_issue(ev_iss[d])
    );
  end

  // ISSUE network: dispatchers -> units
  logic [NFU-1:0]          fu_in_v, fu_in_r, fu_out_v, fu_out_r, fu_busy;
  logic [NFU-1:0][IW-1:0]  fu_in_d;
  logic [NFU-1:0][DW-1:0]  fu_out_dest;
  logic [NFU-1:0][WW-1:0]  fu_out_d;
  logic [NFU-1:0][DW-1:0]  unused_src_i;
  logic [NDISP-1:0][FW-1:0] unused_src_w;

  soma_xbar #(.NM(NDISP), .NS(NFU), .W(IW)) u_issue_net (
    .clk, .rst_n,
    .m_valid(iss_v), .m_dest(iss_dest), .m_data(iss_data), .m_ready(iss_r),
    .s_valid(fu_in_v), .s_data(fu_in_d), .s_src(unused_src_i), .s_ready(fu_in_r)
  );

  for (genvar f = 0; f < NFU; f++) begin : g_fu
    issue_t ipkt;
    wb_t    opkt;
    assign ipkt           = fu_in_d[f];
    assign fu_out_d[f]    = opkt;
    assign fu_out_dest[f] = DW'(opkt.did);
    if (FU_KIND[f] == FU_MEM) begin : g_mem
      soma_fu_mem #(.AW(LMEM_AW), .FUID(f), .FIFO_DEPTH(FU_FIFO)) u_fu (
        .clk, .rst_n, .in_valid(fu_in_v[f]), .in_pkt(ipkt), .in_ready(fu_in_r[f]),
        .out_valid(fu_out_v[f]), .out_pkt(opkt), .out_ready(fu_out_r[f]), .busy(fu_busy[f])
      );
    end else begin : g_ou
      soma_fu #(.KIND(FU_KIND[f]), .LAT(FU_LAT[f]), .FUID(f), .FIFO_DEPTH(FU_FIFO)) u_fu (
        .clk, .rst_n, .in_valid(fu_in_v[f]), .in_pkt(ipkt), .in_ready(fu_in_r[f]),
        .out_valid(fu_out_v[f]), .out_pkt(opkt), .out_ready(fu_out_r[f]), .busy(fu_busy[f])
      );
    end
  end

  // WB network: units -> dispatchers (a dispatcher always accepts)
  soma_xbar #(.NM(NFU), .NS(NDISP), .W(WW)) u_wb_net (
    .clk, .rst_n,
    .m_valid(fu_out_v), .m_dest(fu_out_dest), .m_data(fu_out_d), .m_ready(fu_out_r),
    .s_valid(wb_v), .s_data(wb_data), .s_src(unused_src_w), .s_ready('1)
  );

  // data stream manager and its interconnect
  logic [DID_W-1:0] ld_req_dest, ld_dest, st_src;
  logic             ld_ready, ld_valid, st_valid, st_pop, dsm_busy;
  logic             ev_load, ev_bcast, ev_store, ev_wait;
  stream_t          ld_elem, st_elem;

  soma_dsm #(.IMEM_AW(IMEM_AW), .SMEM_AW(SMEM_AW)) u_dsm (
    .clk, .rst_n, .start, .start_pc(dsm_pc), .busy(dsm_busy),
    .imem_addr(im_addr[NDISP]), .imem_data(im_data[NDISP]),
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .ld_req_dest, .ld_ready, .ld_valid, .ld_dest, .ld_elem,
    .st_src, .st_valid, .st_elem, .st_pop,
    .ev_load, .ev_bcast, .ev_store, .ev_wait
  );

  soma_stream_icn #(.ND(NDISP)) u_sicn (
    .ld_req_dest, .ld_ready, .ld_valid, .ld_dest, .ld_elem,
    .st_src, .st_valid, .st_elem, .st_pop,
    .d_in_ready(sin_r), .d_in_valid(sin_v), .d_in_elem(sin_e),
    .d_out_valid(sout_v), .d_out_elem(sout_e), .d_out_pop(sout_pop)
  );

  assign busy = (|d_busy) || (|fu_busy) || (|iss_v) || dsm_busy;
endmodule
