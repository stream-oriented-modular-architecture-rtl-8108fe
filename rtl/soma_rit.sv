// soma_rit: Register Invalidation Table of a dispatcher.
//
// One valid bit per general-purpose register. When the ID&OF stage issues an
// operation that writes register rd, the bit of rd is cleared (invalidated);
// when write back stores the result of that register, the bit is set again.
// The ID&OF stage presents its two source registers and its destination; the
// table answers with stall while any of them is still invalid (read-after-write
// on the sources, and write-after-write on the destination, which keeps a
// register from having two results in flight). Register 0 and registers at or
// above NREG (the stream registers) are never tracked.
// Following the source design: set on issue, validated on write back, stall on
// an invalid operand. Own choice: the destination check and the absence of a
// same-cycle bypass (a value written back is seen by ID&OF one cycle later).
module soma_rit #(
  parameter int unsigned NREG = 28
) (
  input  logic       clk,
  input  logic       rst_n,
  // ID&OF side
  input  logic       use_a,
  input  logic [4:0] adr_a,
  input  logic       use_b,
  input  logic [4:0] adr_b,
  input  logic       use_d,
  input  logic [4:0] adr_d,
  input  logic       we_id,    // operation issued: invalidate adr_d
  // write-back side
  input  logic       we_wb,
  input  logic [4:0] adr_wb,
  output logic       stall
);
  logic [NREG-1:0] valid;

  function automatic logic tracked(input logic [4:0] r);
    return (r != 5'd0) && (int'(r) < NREG);
  endfunction

  always_comb begin
    stall = 1'b0;
    if (use_a && tracked(adr_a) && !valid[adr_a]) stall = 1'b1;
    if (use_b && tracked(adr_b) && !valid[adr_b]) stall = 1'b1;
    if (use_d && tracked(adr_d) && !valid[adr_d]) stall = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '1;
    else begin
      if (we_wb && tracked(adr_wb)) valid[adr_wb] <= 1'b1;
      if (we_id && tracked(adr_d))  valid[adr_d]  <= 1'b0;
    end
  end

  a_no_issue_on_stall: assert property (@(posedge clk) disable iff (!rst_n) !(we_id && stall));
endmodule
