// soma_pkg: types, constants and shared arithmetic for the stream-oriented
// modular architecture (kernels of dispatchers sharing polymorphic FUs).
//
// It holds the packets that travel on the two local networks (ISSUE from a
// dispatcher to a functional unit, WB from a functional unit back to a
// dispatcher), the element format of the stream banks, the register map of
// the stream register file, and three pure functions: the internal FU0
// (simple integer/logic MicroBlaze operations), the branch evaluation used by
// both dispatchers and the data stream manager, and single-precision
// floating-point add and multiply for the shared FP units.
//
// Following the source architecture: dispatchers and the DSM use the
// MicroBlaze instruction encoding; an issued operation carries two operands,
// the dispatcher ID and the destination register; a write-back carries the
// result, the destination register, the dispatcher ID and the FU ID.
// Own choices: the register numbers of the stream registers, the FP rounding
// (round to nearest even, denormals flushed to zero, no NaN payloads), and
// the absence of MSR carry and delay slots.
package soma_pkg;

  localparam int unsigned XLEN   = 32;
  localparam int unsigned DID_W  = 4;   // dispatcher ID width (up to 15 + broadcast)
  localparam int unsigned FUID_W = 4;   // functional unit ID width

  // Stream register file map: r0..r27 are general purpose (r0 reads 0).
  localparam logic [4:0] R_DID  = 5'd28; // read: dispatcher ID
  localparam logic [4:0] R_STAT = 5'd29; // read: stream status, write: output push closing a block
  localparam logic [4:0] R_SIN  = 5'd30; // read: pop from the active input bank
  localparam logic [4:0] R_SOUT = 5'd31; // write: push to the active output bank
  localparam int unsigned NGPR  = 28;

  // Broadcast destination of a DSM load pattern.
  localparam logic [DID_W-1:0] DID_BCAST = '1;

  // Kinds of shared functional unit.
  typedef enum logic [2:0] {
    FU_NONE = 3'd0,
    FU_IMUL = 3'd1,
    FU_FMUL = 3'd2,
    FU_FADD = 3'd3,
    FU_MEM  = 3'd4
  } fu_kind_e;

  // Operation carried on the ISSUE network.
  typedef enum logic [2:0] {
    XOP_MUL   = 3'd0,
    XOP_FADD  = 3'd1,
    XOP_FRSUB = 3'd2,
    XOP_FMUL  = 3'd3,
    XOP_LOAD  = 3'd4,
    XOP_STORE = 3'd5
  } xop_e;

  typedef struct packed {
    xop_e             op;
    logic [31:0]      a;    // operand A (store data for XOP_STORE)
    logic [31:0]      b;    // operand B (address for memory operations)
    logic [DID_W-1:0] did;  // sender dispatcher
    logic [4:0]       dr;   // destination register in the sender's SRF
  } issue_t;

  typedef struct packed {
    logic [31:0]       data;
    logic [4:0]        dr;
    logic [DID_W-1:0]  did;
    logic [FUID_W-1:0] fuid;
  } wb_t;

  // One element of a stream bank.
  typedef struct packed {
    logic        last;  // closes a block: the bank pair is swapped after it
    logic        eos;   // end of the whole stream
    logic [31:0] data;
  } stream_t;

  // MicroBlaze major opcodes used here.
  localparam logic [5:0] OP_MUL   = 6'b010000;
  localparam logic [5:0] OP_MULI  = 6'b011000;
  localparam logic [5:0] OP_FPU   = 6'b010110;
  localparam logic [5:0] OP_BR    = 6'b100110;
  localparam logic [5:0] OP_BRI   = 6'b101110;
  localparam logic [5:0] OP_BCC   = 6'b100111;
  localparam logic [5:0] OP_BCCI  = 6'b101111;
  localparam logic [5:0] OP_RTSD  = 6'b101101;
  localparam logic [5:0] OP_LWI   = 6'b111010;
  localparam logic [5:0] OP_SWI   = 6'b111110;
  // Data stream manager pattern instructions (own encoding in unused slots).
  localparam logic [5:0] OP_LDP   = 6'b110011;
  localparam logic [5:0] OP_STP   = 6'b110111;

  // True for an instruction FU0 executes (add/sub/compare, logic, shifts).
  function automatic logic is_fu0_op(input logic [31:0] ir);
    logic [5:0] op;
    op = ir[31:26];
    return (op[5:4] == 2'b00) || (op[5:4] == 2'b10 && op[2] == 1'b0)
        || (op == 6'b100100) || (op[5:4] == 2'b01 && op[2:0] == 3'b001);
  endfunction

  // FU0: a is the rA value, b the rB value or the sign-extended immediate.
  function automatic logic [31:0] fu0_exec(input logic [31:0] ir, input logic [31:0] a,
                                           input logic [31:0] b);
    logic [5:0]  op;
    logic [31:0] r;
    logic [4:0]  sh;
    op = ir[31:26];
    r  = '0;
    sh = b[4:0];
    if (op[5:4] == 2'b00) begin
      if (op[0]) begin
        r = b - a;
        if (op == 6'b000101 && ir[0])
          r[31] = ir[1] ? (a > b) : ($signed(a) > $signed(b));
      end else begin
        r = a + b;
      end
    end else if (op[5:4] == 2'b10 && op[2] == 1'b0) begin
      case (op[1:0])
        2'b00: r = a | b;
        2'b01: r = a & b;
        2'b10: r = a ^ b;
        default: r = a & ~b;
      endcase
    end else if (op == 6'b100100) begin
      case (ir[6:0])
        7'b0000001: r = {a[31], a[31:1]};
        7'b1000001: r = {1'b0, a[31:1]};
        7'b1100000: r = {{24{a[7]}}, a[7:0]};
        7'b1100001: r = {{16{a[15]}}, a[15:0]};
        default:    r = '0;
      endcase
    end else if (op[5:4] == 2'b01 && op[2:0] == 3'b001) begin
      if (ir[10])      r = a << sh;
      else if (ir[9])  r = $unsigned($signed(a) >>> sh);
      else             r = a >> sh;
    end
    return r;
  endfunction

  // Branch evaluation. Returns taken; target through tgt.
  // a: rA value, b: rB value or sign-extended immediate, pc: branch address.
  function automatic logic br_eval(input logic [31:0] ir, input logic [31:0] a,
                                   input logic [31:0] b, input logic [31:0] pc,
                                   output logic [31:0] tgt);
    logic [5:0] op;
    logic t;
    op  = ir[31:26];
    tgt = pc + b;
    t   = 1'b0;
    if (op == OP_BR || op == OP_BRI) begin
      t = 1'b1;
      if (ir[19]) tgt = b;
    end else if (op == OP_BCC || op == OP_BCCI) begin
      case (ir[23:21])
        3'd0: t = (a == 0);
        3'd1: t = (a != 0);
        3'd2: t = $signed(a) < 0;
        3'd3: t = $signed(a) <= 0;
        3'd4: t = $signed(a) > 0;
        3'd5: t = $signed(a) >= 0;
        default: t = 1'b0;
      endcase
    end else if (op == OP_RTSD) begin
      t   = 1'b1;
      tgt = a + b;
    end
    return t;
  endfunction

  function automatic logic is_branch(input logic [31:0] ir);
    logic [5:0] op;
    op = ir[31:26];
    return op == OP_BR || op == OP_BRI || op == OP_BCC || op == OP_BCCI || op == OP_RTSD;
  endfunction

  // "bri 0": branch to itself, used as the halt idiom.
  function automatic logic is_halt(input logic [31:0] ir);
    return ir[31:26] == OP_BRI && ir[19:18] == 2'b00 && ir[15:0] == 16'h0000;
  endfunction

  // Single-precision multiply, round to nearest even, denormals flushed.
  function automatic logic [31:0] fp_mul(input logic [31:0] x, input logic [31:0] y);
    logic        s, g, st;
    logic [47:0] p;
    logic [23:0] m;
    logic [24:0] mr;
    int          e;
    s = x[31] ^ y[31];
    if (x[30:23] == 8'h00 || y[30:23] == 8'h00) return {s, 31'b0};
    if (x[30:23] == 8'hFF || y[30:23] == 8'hFF) return {s, 8'hFF, 23'b0};
    p = {24'b0, 1'b1, x[22:0]} * {24'b0, 1'b1, y[22:0]};
    e = int'(x[30:23]) + int'(y[30:23]) - 127;
    if (p[47]) begin
      m = p[47:24]; g = p[23]; st = |p[22:0]; e = e + 1;
    end else begin
      m = p[46:23]; g = p[22]; st = |p[21:0];
    end
    mr = {1'b0, m} + {24'b0, (g && (st || m[0]))};
    if (mr[24]) begin
      mr = mr >> 1; e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'b0};
    if (e <= 0)   return {s, 31'b0};
    return {s, e[7:0], mr[22:0]};
  endfunction

  // Single-precision add, round to nearest even, denormals flushed.
  function automatic logic [31:0] fp_add(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] a, b;
    logic [26:0] ma, mb, mbs;
    logic [27:0] sum;
    logic [24:0] mr;
    logic        g, st;
    int          d, e;
    if (x[30:0] >= y[30:0]) begin a = x; b = y; end
    else begin a = y; b = x; end
    if (a[30:23] == 8'hFF) return {a[31], 8'hFF, 23'b0};
    if (a[30:23] == 8'h00) return 32'h0;
    if (b[30:23] == 8'h00) return a;
    e  = int'(a[30:23]);
    d  = e - int'(b[30:23]);
    ma = {1'b1, a[22:0], 3'b000};
    mb = {1'b1, b[22:0], 3'b000};
    if (d >= 27) mbs = 27'd1;
    else begin
      mbs = mb >> d;
      if ((mb & ((27'd1 << d) - 27'd1)) != 0) mbs[0] = 1'b1;
    end
    if (a[31] == b[31]) begin
      sum = {1'b0, ma} + {1'b0, mbs};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e = e + 1;
      end
    end else begin
      sum = {1'b0, ma} - {1'b0, mbs};
      if (sum == 0) return 32'h0;
      for (int i = 0; i < 27; i++)
        if (!sum[26]) begin
          sum = sum << 1; e = e - 1;
        end
    end
    g  = sum[2];
    st = sum[1] | sum[0];
    mr = {1'b0, sum[26:3]} + {24'b0, (g && (st || sum[3]))};
    if (mr[24]) begin
      mr = mr >> 1; e = e + 1;
    end
    if (e >= 255) return {a[31], 8'hFF, 23'b0};
    if (e <= 0)   return {a[31], 31'b0};
    return {a[31], e[7:0], mr[22:0]};
  endfunction

endpackage
