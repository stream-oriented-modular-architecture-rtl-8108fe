// soma_fu_mem: intra-kernel local memory, seen by the dispatchers as one more
// shared functional unit.
//
// It takes the same ISSUE packets as any FU: a load (operand B is the word
// address) returns the stored word as a write-back packet to the issuing
// dispatcher's destination register; a store (operand A is the data, operand B
// the address) writes the word and returns nothing. Operations from all
// dispatchers are served one per cycle in arrival order, so a store followed
// by a load from the same dispatcher sees the stored value.
// Timing: synchronous memory, the load result enters the output FIFO one cycle
// after the operation was accepted. in_ready is credit based as in soma_fu.
// Following the source design: a small memory shared by the dispatchers for
// partial results and constants, with the interface of a generic FU.
// Own choices: word addressing, the size (AW address bits) and contents
// starting undefined.
module soma_fu_mem import soma_pkg::*; #(
  parameter int unsigned AW   = 8,
  parameter int unsigned FUID = 0,
  parameter int unsigned FIFO_DEPTH = 8
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
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 2);

  logic [31:0] mem [2**AW];
  logic        rv;
  wb_t         rpkt;
  logic        acc, fifo_empty, fifo_full;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_cnt;

  assign in_ready = (CW'(fifo_cnt) + CW'(rv)) < CW'(FIFO_DEPTH);
  assign acc      = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (acc && in_pkt.op == XOP_STORE) mem[in_pkt.b[AW-1:0]] <= in_pkt.a;
    rpkt <= '{data: mem[in_pkt.b[AW-1:0]], dr: in_pkt.dr, did: in_pkt.did, fuid: FUID_W'(FUID)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rv <= 1'b0;
    else rv <= acc && in_pkt.op == XOP_LOAD;
  end

  soma_fifo #(.W($bits(wb_t)), .DEPTH(FIFO_DEPTH)) u_ofifo (
    .clk, .rst_n,
    .push(rv), .wdata(rpkt),
    .pop(out_valid && out_ready), .rdata(out_pkt),
    .empty(fifo_empty), .full(fifo_full), .count(fifo_cnt)
  );

  assign out_valid = !fifo_empty;
  assign busy      = !fifo_empty || rv;

  a_op_kind: assert property (@(posedge clk) disable iff (!rst_n)
    acc |-> (in_pkt.op == XOP_LOAD || in_pkt.op == XOP_STORE));
endmodule
