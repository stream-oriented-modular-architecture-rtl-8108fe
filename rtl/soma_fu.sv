// soma_fu: polymorphic shared functional unit.
//
// An operation arriving from the ISSUE network is split into operands, which
// go to the operational unit (OU), and control (dispatcher ID, destination
// register), which goes to a control block of the same depth. After LAT
// stages the result and its stream control data are joined into a write-back
// packet and written into the output FIFO, which the WB network drains. The
// kind of OU is a parameter: integer multiplier (MUL), single-precision
// multiplier (FMUL) or single-precision adder (FADD/FRSUB).
// The pipeline never stops: in_ready is credit based and is high while the
// output FIFO has room for every operation already in the pipeline plus one,
// so a full FIFO holds off new operations instead of stalling the OU.
// Timing: one operation per cycle; a result enters the FIFO LAT cycles after
// it was accepted and is offered to the WB network the cycle after that.
// Following the source design: OU + control block + output FIFO, with the
// case-study latencies (integer multiplier 6, FP multiplier 8, FP adder 11).
// Own choice: the OU computes in its first stage and the remaining stages
// only carry the result, which gives the same latency and throughput.
module soma_fu import soma_pkg::*; #(
  parameter fu_kind_e    KIND  = FU_FMUL,
  parameter int unsigned LAT   = 8,
  parameter int unsigned FUID  = 0,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  issue_t in_pkt,
  output logic   in_ready,
  output logic   out_valid,
  output wb_t    out_pkt,
  input  logic   out_ready,
  output logic   busy
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + LAT + 2);

  logic            pv [LAT];
  wb_t             pd [LAT];
  logic [31:0]     ou_res;
  logic [CW-1:0]   inflight;
  logic            fifo_empty, fifo_full;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_cnt;
  logic            acc;

  // Operational unit
  always_comb begin
    unique case (KIND)
      FU_IMUL: ou_res = in_pkt.a * in_pkt.b;
      FU_FMUL: ou_res = fp_mul(in_pkt.a, in_pkt.b);
      FU_FADD: ou_res = (in_pkt.op == XOP_FRSUB) ? fp_add(in_pkt.b, {~in_pkt.a[31], in_pkt.a[30:0]})
                                                 : fp_add(in_pkt.a, in_pkt.b);
      default: ou_res = in_pkt.a;
    endcase
  end

  assign in_ready = (CW'(fifo_cnt) + inflight) < CW'(FIFO_DEPTH);
  assign acc      = in_valid && in_ready;

  // Operational unit and control block pipelines
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) pv[i] <= 1'b0;
    end else begin
      pv[0] <= acc;
      for (int i = 1; i < LAT; i++) pv[i] <= pv[i-1];
    end
  end

  always_ff @(posedge clk) begin
    pd[0] <= '{data: ou_res, dr: in_pkt.dr, did: in_pkt.did, fuid: FUID_W'(FUID)};
    for (int i = 1; i < LAT; i++) pd[i] <= pd[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + CW'(acc) - CW'(pv[LAT-1]);
  end

  soma_fifo #(.W($bits(wb_t)), .DEPTH(FIFO_DEPTH)) u_ofifo (
    .clk, .rst_n,
    .push(pv[LAT-1]), .wdata(pd[LAT-1]),
    .pop(out_valid && out_ready), .rdata(out_pkt),
    .empty(fifo_empty), .full(fifo_full), .count(fifo_cnt)
  );

  assign out_valid = !fifo_empty;
  assign busy      = !fifo_empty || (inflight != '0);

  a_op_kind: assert property (@(posedge clk) disable iff (!rst_n)
    acc |-> (KIND == FU_IMUL && in_pkt.op == XOP_MUL) || (KIND == FU_FMUL && in_pkt.op == XOP_FMUL)
         || (KIND == FU_FADD && (in_pkt.op == XOP_FADD || in_pkt.op == XOP_FRSUB)));
  a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n) !(pv[LAT-1] && fifo_full));
endmodule
