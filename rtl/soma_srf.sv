// soma_srf: Stream Register File of one dispatcher.
//
// Five banks. A bank of general-purpose registers (r1..r27, r0 reads zero)
// with two read ports (operands A and B, read in ID&OF) and one write port
// (write back). Two FIFO input banks, A and B, filled by the data stream
// manager, and two FIFO output banks, DA and DB, drained by it.
// Double buffering: the stream side writes into one input bank and moves to
// the other after an element marked last (end of a block); the dispatcher reads
// from its own active input bank and also moves on after popping a last
// element. The output pair works the same way: a push marked last moves the
// dispatcher to the other output bank, and the stream side drains the banks
// in the same order. Blocks therefore alternate between A and B (and DA/DB)
// and the stream order is kept while loading and processing overlap.
// The dispatcher may pop up to two elements per cycle (the two read ports A
// and B of an input bank), which must lie in one block. Popping an element
// marked eos sets the sticky eos flag, read by the program through the status
// register; start clears it.
// Timing: all reads are combinational; writes and pops take effect at the
// clock edge. in_ready is high when the bank being filled has room for two
// more elements, since the stream side commits an element one cycle before it
// arrives.
module soma_srf import soma_pkg::*; #(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,       // start of a program: clear eos flag
  // general-purpose bank
  input  logic [4:0]  ra_adr,
  output logic [31:0] ra_data,
  input  logic [4:0]  rb_adr,
  output logic [31:0] rb_data,
  input  logic        gpr_we,
  input  logic [4:0]  gpr_wadr,
  input  logic [31:0] gpr_wdata,
  // input banks, stream side
  input  logic        in_valid,
  input  stream_t     in_elem,
  output logic        in_ready,
  // input banks, dispatcher side
  output logic [1:0]  sin_avail,   // elements available in the active bank, capped at 2
  output stream_t     sin_head0,
  output stream_t     sin_head1,
  input  logic [1:0]  sin_pop,
  // output banks, dispatcher side
  input  logic        sout_push,
  input  stream_t     sout_elem,
  output logic [$clog2(DEPTH+1)-1:0] sout_used, // fuller of the two output banks
  // output banks, stream side
  output logic        out_valid,
  output stream_t     out_elem,
  input  logic        out_pop,
  // status
  output logic        eos_seen,
  output logic        in_rsel,     // active input bank (0 = A, 1 = B)
  output logic        out_wsel     // active output bank (0 = DA, 1 = DB)
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [31:0]   gpr [1:NGPR-1];
  stream_t       in_mem  [2][DEPTH];
  stream_t       out_mem [2][DEPTH];
  logic [AW-1:0] in_wp [2], in_rp [2], out_wp [2], out_rp [2];
  logic [CW-1:0] in_cnt [2], out_cnt [2];
  logic          in_wsel, out_rsel;

  assign ra_data = (ra_adr == 5'd0 || int'(ra_adr) >= NGPR) ? 32'h0 : gpr[ra_adr];
  assign rb_data = (rb_adr == 5'd0 || int'(rb_adr) >= NGPR) ? 32'h0 : gpr[rb_adr];

  always_ff @(posedge clk)
    if (gpr_we && gpr_wadr != 5'd0 && int'(gpr_wadr) < NGPR) gpr[gpr_wadr] <= gpr_wdata;

  // Input banks
  assign in_ready  = (CW'(DEPTH) - in_cnt[in_wsel]) >= CW'(2);
  assign sin_avail = (in_cnt[in_rsel] >= CW'(2)) ? 2'd2 : 2'(in_cnt[in_rsel]);
  assign sin_head0 = in_mem[in_rsel][in_rp[in_rsel]];
  assign sin_head1 = in_mem[in_rsel][AW'(in_rp[in_rsel] + 1'b1)];

  logic pop_last, pop_eos;
  always_comb begin
    pop_last = 1'b0;
    pop_eos  = 1'b0;
    if (sin_pop >= 2'd1) begin pop_last = sin_head0.last; pop_eos = sin_head0.eos; end
    if (sin_pop == 2'd2) begin pop_last |= sin_head1.last; pop_eos |= sin_head1.eos; end
  end

  // per-bank write and read strobes
  logic [1:0] in_wr, in_rd, out_wr, out_rd;
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      in_wr[b]  = in_valid && (in_wsel == b[0]);
      in_rd[b]  = (sin_pop != 2'd0) && (in_rsel == b[0]);
      out_wr[b] = sout_push && (out_wsel == b[0]);
      out_rd[b] = out_pop && (out_rsel == b[0]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++) begin
        in_wp[b] <= '0; in_rp[b] <= '0; in_cnt[b] <= '0;
      end
      in_wsel  <= 1'b0;
      in_rsel  <= 1'b0;
      eos_seen <= 1'b0;
    end else begin
      for (int b = 0; b < 2; b++) begin
        if (in_wr[b]) in_wp[b] <= in_wp[b] + 1'b1;
        if (in_rd[b]) in_rp[b] <= in_rp[b] + AW'(sin_pop);
        in_cnt[b] <= in_cnt[b] + (in_wr[b] ? CW'(1) : CW'(0)) - (in_rd[b] ? CW'(sin_pop) : CW'(0));
      end
      if (in_valid && in_elem.last) in_wsel <= ~in_wsel;
      if (pop_last) in_rsel <= ~in_rsel;
      if (clear) eos_seen <= 1'b0;
      else if (pop_eos) eos_seen <= 1'b1;
    end
  end

  always_ff @(posedge clk) if (in_valid) in_mem[in_wsel][in_wp[in_wsel]] <= in_elem;

  // Output banks
  assign sout_used = (out_cnt[0] > out_cnt[1]) ? out_cnt[0] : out_cnt[1];
  assign out_valid = out_cnt[out_rsel] != '0;
  assign out_elem  = out_mem[out_rsel][out_rp[out_rsel]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++) begin
        out_wp[b] <= '0; out_rp[b] <= '0; out_cnt[b] <= '0;
      end
      out_wsel <= 1'b0;
      out_rsel <= 1'b0;
    end else begin
      for (int b = 0; b < 2; b++) begin
        if (out_wr[b]) out_wp[b] <= out_wp[b] + 1'b1;
        if (out_rd[b]) out_rp[b] <= out_rp[b] + 1'b1;
        out_cnt[b] <= out_cnt[b] + (out_wr[b] ? CW'(1) : CW'(0)) - (out_rd[b] ? CW'(1) : CW'(0));
      end
      if (sout_push && sout_elem.last) out_wsel <= ~out_wsel;
      if (out_pop && out_elem.last) out_rsel <= ~out_rsel;
    end
  end

  always_ff @(posedge clk) if (sout_push) out_mem[out_wsel][out_wp[out_wsel]] <= sout_elem;

  a_in_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                      !(in_valid && in_cnt[in_wsel] == CW'(DEPTH)));
  a_in_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                      !(CW'(sin_pop) > in_cnt[in_rsel]));
  a_out_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                      !(sout_push && out_cnt[out_wsel] == CW'(DEPTH)));
  a_out_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(out_pop && !out_valid));
endmodule
