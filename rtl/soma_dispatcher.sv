// soma_dispatcher: one instruction dispatcher of a programmable kernel.
//
// A four-stage in-order core running a subset of the MicroBlaze instruction
// set: IF (fetch from the kernel's shared instruction memory), ID&OF (decode,
// operand fetch from the Stream Register File, hazard check in the Register
// Invalidation Table, branch resolution), EX (the internal unit FU0: add,
// subtract, compare, logic, shifts) and WB (write into the SRF).
// Operations for the shared units (MUL/MULI, FADD/FRSUB/FMUL, LWI/SWI) leave
// ID&OF into the issue FIFO with their two operands, this dispatcher's ID and
// the destination register; the FIFO feeds the ISSUE network, so the
// dispatcher goes on while a unit is busy and queued operations still leave
// while the dispatcher stalls. Their results come back on the WB network and
// have priority in WB: if one arrives while an FU0 result waits in WB, the
// whole pipeline stalls for a cycle and the external result is written first.
// Registers: r0..r27 general purpose (r0 = 0); r28 reads this dispatcher's
// ID; r29 reads the stream status (bit 0: end of stream seen) and, as a
// destination, pushes to the output stream and closes the output block; r30
// as a source pops the active input bank (named twice, it pops two elements,
// one per operand); r31 as a destination pushes to the output stream.
// ID&OF stalls while a source or the destination is invalid in the RIT, the
// input bank holds fewer elements than needed, the issue FIFO is full, or the
// output banks have no room reserved for the result. Writes to the output
// stream leave in program order: one that would take a different path (FU0 or
// another shared unit) than writes still in flight waits for them.
// Branches (BR/BRI/Bcc/BccI/RTSD) are resolved in ID&OF; a taken branch
// discards the fetched instruction (no delay slots). "bri 0" halts the
// dispatcher. The link value of a branch-and-link is written back through EX.
// Following the source design: the four stages, SRF/RIT in ID&OF, FU0 in EX,
// the issue FIFO, the WB priority rule and stall-on-dependency (no
// forwarding). Own choices: the register map above, the branch stage, no
// carry or IMM prefix, and memory operations only in the LWI/SWI forms.
module soma_dispatcher import soma_pkg::*; #(
  parameter int unsigned DID       = 0,
  parameter int unsigned NFU       = 4,
  parameter fu_kind_e    FU_KIND [NFU] = '{FU_IMUL, FU_FMUL, FU_FADD, FU_MEM},
  parameter int unsigned IQ_DEPTH  = 4,
  parameter int unsigned SRF_DEPTH = 16,
  parameter int unsigned IMEM_AW   = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,      // pulse: begin at start_pc
  input  logic [31:0]        start_pc,   // byte address
  output logic               busy,
  // instruction memory read port (word address)
  output logic [IMEM_AW-1:0] imem_addr,
  input  logic [31:0]        imem_data,
  // ISSUE network
  output logic               iss_valid,
  output logic [FUID_W-1:0]  iss_fu,
  output issue_t             iss_pkt,
  input  logic               iss_ready,
  // WB network (always accepted)
  input  logic               wb_valid,
  input  wb_t                wb_pkt,
  // stream side of the SRF
  input  logic               sin_valid,
  input  stream_t            sin_elem,
  output logic               sin_ready,
  output logic               sout_valid,
  output stream_t            sout_elem,
  input  logic               sout_pop,
  // events, for observation
  output logic               ev_rit_stall,
  output logic               ev_wb_stall,
  output logic               ev_stream_stall,
  output logic               ev_issue
);
  localparam int unsigned SCW = $clog2(SRF_DEPTH + 1);

  // ---------------- state ----------------
  logic        running;
  logic [31:0] pc;
  logic        ifid_v;
  logic [31:0] ifid_ir, ifid_pc;
  logic        idex_v, idex_link;
  logic [31:0] idex_ir, idex_a, idex_b, idex_pc;
  logic [4:0]  idex_dst;
  logic        exwb_v;
  logic [4:0]  exwb_dst;
  logic [31:0] exwb_data;
  logic [7:0]  ext_pending;   // issued operations that will write back
  logic [SCW:0] out_resv;     // in-flight results bound for the output stream

  // ---------------- decode ----------------
  logic [31:0] ir, simm;
  logic [5:0]  op;
  logic [4:0]  rdf, raf, rbf;
  logic        is_b, c_alu, c_ext, c_br, c_halt;
  xop_e        xop;
  fu_kind_e    need_kind;
  logic        use_a, use_b, has_dst;
  logic [4:0]  reg_a, reg_b;

  assign ir   = ifid_ir;
  assign op   = ir[31:26];
  assign rdf  = ir[25:21];
  assign raf  = ir[20:16];
  assign rbf  = ir[15:11];
  assign is_b = op[3];
  assign simm = {{16{ir[15]}}, ir[15:0]};

  always_comb begin
    c_alu = is_fu0_op(ir);
    c_br  = is_branch(ir);
    c_halt = is_halt(ir);
    c_ext = 1'b0;
    xop   = XOP_MUL;
    need_kind = FU_NONE;
    if (op == OP_MUL || op == OP_MULI) begin
      c_ext = 1'b1; xop = XOP_MUL; need_kind = FU_IMUL;
    end else if (op == OP_FPU) begin
      case (ir[10:7])
        4'd0: begin c_ext = 1'b1; xop = XOP_FADD;  need_kind = FU_FADD; end
        4'd1: begin c_ext = 1'b1; xop = XOP_FRSUB; need_kind = FU_FADD; end
        4'd2: begin c_ext = 1'b1; xop = XOP_FMUL;  need_kind = FU_FMUL; end
        default: ;
      endcase
    end else if (op == OP_LWI) begin
      c_ext = 1'b1; xop = XOP_LOAD; need_kind = FU_MEM;
    end else if (op == OP_SWI) begin
      c_ext = 1'b1; xop = XOP_STORE; need_kind = FU_MEM;
    end
    // operand ports
    reg_a = (op == OP_SWI) ? rdf : raf;
    reg_b = (op == OP_SWI) ? raf : rbf;
    use_a = c_alu || (c_ext && xop != XOP_LOAD) || (c_br && !(op == OP_BR || op == OP_BRI)) ||
            (op == OP_LWI);
    use_b = (!is_b && (c_alu || c_ext || c_br)) || (op == OP_SWI);
    if (op == OP_LWI) begin reg_b = raf; use_b = 1'b1; use_a = 1'b0; end
    has_dst = c_alu || (c_ext && xop != XOP_STORE) ||
              ((op == OP_BR || op == OP_BRI) && ir[18]);
  end

  // target functional unit: the first one of the needed kind
  logic [FUID_W-1:0] tgt_fu;
  logic              tgt_ok;
  always_comb begin
    tgt_fu = '0;
    tgt_ok = 1'b0;
    for (int i = NFU - 1; i >= 0; i--)
      if (FU_KIND[i] == need_kind) begin
        tgt_fu = FUID_W'(i);
        tgt_ok = 1'b1;
      end
  end

  // ---------------- SRF ----------------
  logic [31:0] gpr_a, gpr_b;
  logic        gpr_we;
  logic [4:0]  gpr_wadr;
  logic [31:0] gpr_wdata;
  logic [1:0]  sin_avail, sin_pop;
  stream_t     sin_h0, sin_h1;
  logic        sout_push, eos_seen, in_rsel, out_wsel;
  stream_t     sout_w;
  logic [SCW-1:0] sout_used;

  soma_srf #(.DEPTH(SRF_DEPTH)) u_srf (
    .clk, .rst_n, .clear(start),
    .ra_adr(reg_a), .ra_data(gpr_a), .rb_adr(reg_b), .rb_data(gpr_b),
    .gpr_we, .gpr_wadr, .gpr_wdata,
    .in_valid(sin_valid), .in_elem(sin_elem), .in_ready(sin_ready),
    .sin_avail, .sin_head0(sin_h0), .sin_head1(sin_h1), .sin_pop,
    .sout_push, .sout_elem(sout_w), .sout_used,
    .out_valid(sout_valid), .out_elem(sout_elem), .out_pop(sout_pop),
    .eos_seen, .in_rsel, .out_wsel
  );

  // operand values
  logic        a_sin, b_sin;
  logic [31:0] va, vb;
  logic [1:0]  n_sin;
  always_comb begin
    a_sin = use_a && reg_a == R_SIN;
    b_sin = use_b && reg_b == R_SIN;
    n_sin = 2'(a_sin) + 2'(b_sin);
    case (reg_a)
      R_DID:   va = 32'(DID);
      R_STAT:  va = {31'b0, eos_seen};
      R_SIN:   va = sin_h0.data;
      default: va = gpr_a;
    endcase
    case (reg_b)
      R_DID:   vb = 32'(DID);
      R_STAT:  vb = {31'b0, eos_seen};
      R_SIN:   vb = a_sin ? sin_h1.data : sin_h0.data;
      default: vb = gpr_b;
    endcase
    if (is_b && op != OP_SWI && op != OP_LWI) vb = simm;
  end

  // ---------------- hazards ----------------
  logic rit_stall, iq_full, iq_empty, out_stall, sin_stall, stall_id, stall_wb, id_fire;
  logic dst_out;
  assign dst_out   = has_dst && (rdf == R_SOUT || rdf == R_STAT);
  assign sin_stall = n_sin > sin_avail;
  // Output-stream writes keep program order: a write may be in flight with
  // earlier ones only if it takes the same path (FU0, or the same shared unit).
  logic [FUID_W:0] out_path, cur_path;
  assign cur_path  = c_ext ? {1'b0, tgt_fu} : {1'b1, {FUID_W{1'b0}}};
  assign out_stall = dst_out && (((out_resv + (SCW+1)'(sout_used)) >= (SCW+1)'(SRF_DEPTH)) ||
                                 (out_resv != '0 && out_path != cur_path));
  assign stall_wb  = exwb_v && wb_valid;
  assign stall_id  = rit_stall || sin_stall || out_stall || (c_ext && iq_full) ||
                     (ext_pending == 8'hFF);
  assign id_fire   = running && ifid_v && !stall_id && !stall_wb;

  soma_rit #(.NREG(NGPR)) u_rit (
    .clk, .rst_n,
    .use_a(use_a && ifid_v), .adr_a(reg_a), .use_b(use_b && ifid_v), .adr_b(reg_b),
    .use_d(has_dst && ifid_v), .adr_d(rdf),
    .we_id(id_fire && has_dst),
    .we_wb(gpr_we), .adr_wb(gpr_wadr),
    .stall(rit_stall)
  );

  assign sin_pop = id_fire ? n_sin : 2'd0;

  // ---------------- branch ----------------
  logic        br_taken;
  logic [31:0] br_tgt;
  always_comb br_taken = c_br && br_eval(ir, va, vb, ifid_pc, br_tgt);

  // ---------------- issue FIFO ----------------
  typedef struct packed {
    logic [FUID_W-1:0] fu;
    issue_t            pkt;
  } iq_t;
  iq_t iq_in, iq_out;
  logic [$clog2(IQ_DEPTH+1)-1:0] iq_cnt;
  assign iq_in = '{fu: tgt_fu,
                   pkt: '{op: xop,
                          a: va,
                          b: (op == OP_LWI || op == OP_SWI) ? vb + simm : vb,
                          did: DID_W'(DID), dr: rdf}};
  soma_fifo #(.W($bits(iq_t)), .DEPTH(IQ_DEPTH)) u_iq (
    .clk, .rst_n,
    .push(id_fire && c_ext && tgt_ok), .wdata(iq_in),
    .pop(iss_valid && iss_ready), .rdata(iq_out),
    .empty(iq_empty), .full(iq_full), .count(iq_cnt)
  );
  assign iss_valid = !iq_empty;
  assign iss_fu    = iq_out.fu;
  assign iss_pkt   = iq_out.pkt;

  // ---------------- write back ----------------
  logic [4:0]  wb_dst;
  logic [31:0] wb_data;
  logic        wb_do;
  always_comb begin
    wb_do   = wb_valid || exwb_v;
    wb_dst  = wb_valid ? wb_pkt.dr   : exwb_dst;
    wb_data = wb_valid ? wb_pkt.data : exwb_data;
    gpr_we    = wb_do && wb_dst != 5'd0 && int'(wb_dst) < NGPR;
    gpr_wadr  = wb_dst;
    gpr_wdata = wb_data;
    sout_push = wb_do && (wb_dst == R_SOUT || wb_dst == R_STAT);
    sout_w    = '{last: wb_dst == R_STAT, eos: 1'b0, data: wb_data};
  end

  // ---------------- pipeline ----------------
  assign imem_addr = pc[IMEM_AW+1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      pc      <= '0;
      ifid_v  <= 1'b0;
      idex_v  <= 1'b0;
      exwb_v  <= 1'b0;
      ext_pending <= '0;
      out_resv    <= '0;
      idex_a      <= '0;
      idex_b      <= '0;
      idex_pc     <= '0;
    end else begin
      ext_pending <= ext_pending + 8'(id_fire && c_ext && tgt_ok && xop != XOP_STORE)
                                 - 8'(wb_valid);
      out_resv <= out_resv + (SCW+1)'(id_fire && dst_out) - (SCW+1)'(sout_push);
      if (id_fire && dst_out) out_path <= cur_path;
      if (start) begin
        running <= 1'b1;
        pc      <= start_pc;
        ifid_v  <= 1'b0;
        idex_v  <= 1'b0;
      end else if (!stall_wb) begin
        // EX -> WB
        exwb_v    <= idex_v;
        exwb_dst  <= idex_dst;
        exwb_data <= idex_link ? idex_pc : fu0_exec(idex_ir, idex_a, idex_b);
        // ID -> EX: only FU0 operations and links go down the internal path
        idex_v    <= id_fire && has_dst && !c_ext;
        idex_ir   <= ir;
        idex_a    <= va;
        idex_b    <= vb;
        idex_pc   <= ifid_pc;
        idex_dst  <= rdf;
        idex_link <= c_br;
        // IF -> ID
        if (id_fire && c_halt) begin
          running <= 1'b0;
          ifid_v  <= 1'b0;
        end else if (id_fire && br_taken) begin
          pc     <= br_tgt;
          ifid_v <= 1'b0;
        end else if (running && (!ifid_v || id_fire)) begin
          ifid_v  <= 1'b1;
          ifid_ir <= imem_data;
          ifid_pc <= pc;
          pc      <= pc + 32'd4;
        end
      end
    end
  end

  assign busy = running || ifid_v || idex_v || exwb_v || !iq_empty || (ext_pending != '0) ||
                (out_resv != '0) || sout_valid;

  assign ev_rit_stall    = running && ifid_v && rit_stall;
  assign ev_wb_stall     = stall_wb;
  assign ev_stream_stall = running && ifid_v && sin_stall;
  assign ev_issue        = id_fire && c_ext;

  a_wb_for_me: assert property (@(posedge clk) disable iff (!rst_n)
                                wb_valid |-> wb_pkt.did == DID_W'(DID));
  a_known_unit: assert property (@(posedge clk) disable iff (!rst_n)
                                 (id_fire && c_ext) |-> tgt_ok);
endmodule
