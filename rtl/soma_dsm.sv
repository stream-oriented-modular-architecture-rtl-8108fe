// soma_dsm: Data Stream Manager of a kernel.
//
// A small programmable core, with the same MicroBlaze-style encoding as the
// dispatchers, that moves data between the shared memory and the dispatchers'
// stream register files. Internal instructions (add/sub/compare, logic,
// shifts, branches) take two stages: IF, then ID/OF/EX with the result written
// to the local register file (r0..r31, r0 = 0). External instructions use a
// third stage, the memory access, whose read data goes to the stream manager
// interconnect.
// Load Pattern   "ldp rd, ra, rb" (opcode 110011): fetches count elements
//   from address ra with a word stride, and, in two-vector mode, interleaves
//   them with count elements from address rb (x0, y0, x1, y1, ...). One element
//   leaves per cycle, without any further instruction.
// Store Pattern  "stp rd, ra, rb" (opcode 110111): pops count elements from a
//   dispatcher's output banks and writes them from address ra with the stride.
// The configuration register rd holds: [15:0] count, [23:16] stride (signed
//   words), [27:24] dispatcher ID (15 = broadcast, loads only), [28] two
//   vectors, [29] mark the final element as the end of a block, [30] mark the
//   final element as the end of the stream.
// A pattern runs in the ID/OF stage, which adds the stride to the addresses
// each cycle; it waits while its destination bank has no room (or, for a
// broadcast, while any dispatcher's bank has none) and while the source bank
// of a store is empty. Branches are resolved in ID/OF and cancel the fetched
// instruction. "bri 0" halts.
// Timing: memory reads are synchronous; an element fetched in cycle t reaches
// the SRF at the end of cycle t+1.
// The data of a loaded element is the memory read data as it arrives, and the
// write data of a store is the popped element's data: both pass straight
// through the memory stage.
// Following the source design: the two/three-stage pipeline, the local RF,
// the address adder in ID/OF, and Load/Store Pattern with stride and count
// and up to two vectors. Own choices: the opcodes and the field layout of the
// configuration register, and the block and stream marks.
module soma_dsm import soma_pkg::*; #(
  parameter int unsigned IMEM_AW = 10,
  parameter int unsigned SMEM_AW = 18
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        start_pc,
  output logic               busy,
  output logic [IMEM_AW-1:0] imem_addr,
  input  logic [31:0]        imem_data,
  // shared memory port
  output logic               mem_en,
  output logic               mem_we,
  output logic [SMEM_AW-1:0] mem_addr,
  output logic [31:0]        mem_wdata,
  input  logic [31:0]        mem_rdata,
  // stream manager interconnect, load side
  output logic [DID_W-1:0]   ld_req_dest,
  input  logic               ld_ready,
  output logic               ld_valid,
  output logic [DID_W-1:0]   ld_dest,
  output stream_t            ld_elem,
  // stream manager interconnect, store side
  output logic [DID_W-1:0]   st_src,
  input  logic               st_valid,
  input  stream_t            st_elem,
  output logic               st_pop,
  // events
  output logic               ev_load,
  output logic               ev_bcast,
  output logic               ev_store,
  output logic               ev_wait
);
  logic        running;
  logic [31:0] pc;
  logic        ifid_v;
  logic [31:0] ifid_ir, ifid_pc;
  logic [31:0] rf [1:31];

  // pattern state
  logic             pat_act, pat_ld, pat_two, pat_sel, pat_blk, pat_eos;
  logic [15:0]      pat_cnt;
  logic [31:0]      pat_a0, pat_a1, pat_stride;
  logic [DID_W-1:0] pat_did;

  // stage 3 (memory access) tags for the element being read
  logic             s3_v, s3_last, s3_eos;
  logic [DID_W-1:0] s3_dest;

  // decode
  logic [31:0] ir, simm, va, vb, vd, res, br_tgt;
  logic [5:0]  op;
  logic [4:0]  rdf, raf, rbf;
  logic        br_taken, exec;

  assign ir   = ifid_ir;
  assign op   = ir[31:26];
  assign rdf  = ir[25:21];
  assign raf  = ir[20:16];
  assign rbf  = ir[15:11];
  assign simm = {{16{ir[15]}}, ir[15:0]};
  assign va   = (raf == 5'd0) ? 32'h0 : rf[raf];
  assign vd   = (rdf == 5'd0) ? 32'h0 : rf[rdf];
  assign vb   = op[3] ? simm : ((rbf == 5'd0) ? 32'h0 : rf[rbf]);
  assign res  = fu0_exec(ir, va, vb);
  always_comb br_taken = is_branch(ir) && br_eval(ir, va, vb, ifid_pc, br_tgt);

  // the ID/OF stage executes a new instruction when no pattern is running
  assign exec = running && ifid_v && !pat_act;

  // pattern step
  logic ld_step, st_step, fin;
  assign ld_req_dest = pat_did;
  assign st_src      = pat_did;
  assign ld_step = pat_act && pat_ld && ld_ready;
  assign st_step = pat_act && !pat_ld && st_valid;
  assign fin     = (pat_cnt == 16'd1) && (!pat_two || pat_sel || !pat_ld);

  always_comb begin
    mem_en    = ld_step || st_step;
    mem_we    = st_step;
    mem_addr  = SMEM_AW'((pat_ld && pat_sel) ? pat_a1 : pat_a0);
    mem_wdata = st_elem.data;
    st_pop    = st_step;
  end

  assign imem_addr = pc[IMEM_AW+1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      pc      <= '0;
      ifid_v  <= 1'b0;
      pat_act <= 1'b0;
      s3_v    <= 1'b0;
      ifid_ir <= '0;
      ifid_pc <= '0;
      pat_ld  <= 1'b0;
      pat_two <= 1'b0;
      pat_sel <= 1'b0;
      pat_blk <= 1'b0;
      pat_eos <= 1'b0;
      s3_dest <= '0;
      s3_last <= 1'b0;
      s3_eos  <= 1'b0;
    end else begin
      s3_v    <= ld_step;
      s3_dest <= pat_did;
      s3_last <= fin && pat_blk;
      s3_eos  <= fin && pat_eos;
      if (start) begin
        running <= 1'b1;
        pc      <= start_pc;
        ifid_v  <= 1'b0;
        pat_act <= 1'b0;
      end else begin
        // running pattern
        if (ld_step || st_step) begin
          if (pat_ld && pat_two && !pat_sel) pat_sel <= 1'b1;
          else begin
            pat_sel <= 1'b0;
            pat_a0  <= pat_a0 + pat_stride;
            pat_a1  <= pat_a1 + pat_stride;
            pat_cnt <= pat_cnt - 16'd1;
            if (pat_cnt == 16'd1) pat_act <= 1'b0;
          end
        end
        // new instruction
        if (exec) begin
          if (op == OP_LDP || op == OP_STP) begin
            pat_act    <= vd[15:0] != 16'd0;
            pat_ld     <= (op == OP_LDP);
            pat_cnt    <= vd[15:0];
            pat_stride <= {{24{vd[23]}}, vd[23:16]};
            pat_did    <= vd[27:24];
            pat_two    <= vd[28] && (op == OP_LDP);
            pat_blk    <= vd[29];
            pat_eos    <= vd[30];
            pat_sel    <= 1'b0;
            pat_a0     <= va;
            pat_a1     <= (rbf == 5'd0) ? 32'h0 : rf[rbf];
          end else if (is_fu0_op(ir) && rdf != 5'd0) begin
            rf[rdf] <= res;
          end else if ((op == OP_BR || op == OP_BRI) && ir[18] && rdf != 5'd0) begin
            rf[rdf] <= ifid_pc;
          end
        end
        // fetch
        if (exec && is_halt(ir)) begin
          running <= 1'b0;
          ifid_v  <= 1'b0;
        end else if (exec && br_taken) begin
          pc     <= br_tgt;
          ifid_v <= 1'b0;
        end else if (running && (!ifid_v || exec)) begin
          ifid_v  <= 1'b1;
          ifid_ir <= imem_data;
          ifid_pc <= pc;
          pc      <= pc + 32'd4;
        end
      end
    end
  end

  assign ld_valid = s3_v;
  assign ld_dest  = s3_dest;
  assign ld_elem  = '{last: s3_last, eos: s3_eos, data: mem_rdata};

  assign busy     = running || pat_act || s3_v;
  assign ev_load  = ld_step;
  assign ev_bcast = ld_step && pat_did == DID_BCAST;
  assign ev_store = st_step;
  assign ev_wait  = pat_act && !ld_step && !st_step;

  a_no_store_bcast: assert property (@(posedge clk) disable iff (!rst_n)
                                     st_step |-> pat_did != DID_BCAST);
endmodule
