// soma_asm_pkg: helpers shared by the testbenches.
//
// Encoders for the instruction subset run by the dispatchers and the data
// stream manager (MicroBlaze field layout: opcode[31:26], rd[25:21],
// ra[20:16], rb[15:11] or imm[15:0]), the configuration word of the Load and
// Store Pattern instructions, and a reference conversion from a double to a
// single-precision bit pattern (round to nearest even, denormals to zero),
// used to predict floating-point results from exact double arithmetic.
package soma_asm_pkg;

  function automatic logic [31:0] rtype(input logic [5:0] op, input int rd, input int ra,
                                        input int rb, input logic [10:0] fn = 11'd0);
    return {op, 5'(rd), 5'(ra), 5'(rb), fn};
  endfunction
  function automatic logic [31:0] itype(input logic [5:0] op, input int rd, input int ra,
                                        input int imm);
    return {op, 5'(rd), 5'(ra), 16'(imm)};
  endfunction

  function automatic logic [31:0] add  (int rd, int ra, int rb);  return rtype(6'b000000, rd, ra, rb); endfunction
  function automatic logic [31:0] rsub (int rd, int ra, int rb);  return rtype(6'b000001, rd, ra, rb); endfunction
  function automatic logic [31:0] cmp  (int rd, int ra, int rb);  return rtype(6'b000101, rd, ra, rb, 11'd1); endfunction
  function automatic logic [31:0] addi (int rd, int ra, int imm); return itype(6'b001000, rd, ra, imm); endfunction
  function automatic logic [31:0] rsubi(int rd, int ra, int imm); return itype(6'b001001, rd, ra, imm); endfunction
  function automatic logic [31:0] or_  (int rd, int ra, int rb);  return rtype(6'b100000, rd, ra, rb); endfunction
  function automatic logic [31:0] and_ (int rd, int ra, int rb);  return rtype(6'b100001, rd, ra, rb); endfunction
  function automatic logic [31:0] xor_ (int rd, int ra, int rb);  return rtype(6'b100010, rd, ra, rb); endfunction
  function automatic logic [31:0] ori  (int rd, int ra, int imm); return itype(6'b101000, rd, ra, imm); endfunction
  function automatic logic [31:0] andi (int rd, int ra, int imm); return itype(6'b101001, rd, ra, imm); endfunction
  function automatic logic [31:0] bslli(int rd, int ra, int sh);  return itype(6'b011001, rd, ra, 32'h400 | sh); endfunction
  function automatic logic [31:0] bsrli(int rd, int ra, int sh);  return itype(6'b011001, rd, ra, sh); endfunction
  function automatic logic [31:0] mul  (int rd, int ra, int rb);  return rtype(6'b010000, rd, ra, rb); endfunction
  function automatic logic [31:0] muli (int rd, int ra, int imm); return itype(6'b011000, rd, ra, imm); endfunction
  function automatic logic [31:0] fadd (int rd, int ra, int rb);  return rtype(6'b010110, rd, ra, rb, 11'h000); endfunction
  function automatic logic [31:0] frsub(int rd, int ra, int rb);  return rtype(6'b010110, rd, ra, rb, 11'h080); endfunction
  function automatic logic [31:0] fmul (int rd, int ra, int rb);  return rtype(6'b010110, rd, ra, rb, 11'h100); endfunction
  function automatic logic [31:0] lwi  (int rd, int ra, int imm); return itype(6'b111010, rd, ra, imm); endfunction
  function automatic logic [31:0] swi  (int rd, int ra, int imm); return itype(6'b111110, rd, ra, imm); endfunction
  function automatic logic [31:0] bri  (int off);                 return itype(6'b101110, 0, 0, off); endfunction
  function automatic logic [31:0] brlid(int rd, int off);         return itype(6'b101110, rd, 5'b00100, off); endfunction
  function automatic logic [31:0] rtsd (int ra, int imm);         return itype(6'b101101, 5'b10000, ra, imm); endfunction
  function automatic logic [31:0] beqi (int ra, int off);         return itype(6'b101111, 0, ra, off); endfunction
  function automatic logic [31:0] bnei (int ra, int off);         return itype(6'b101111, 1, ra, off); endfunction
  function automatic logic [31:0] blti (int ra, int off);         return itype(6'b101111, 2, ra, off); endfunction
  function automatic logic [31:0] bgti (int ra, int off);         return itype(6'b101111, 4, ra, off); endfunction
  function automatic logic [31:0] halt ();                        return bri(0); endfunction
  function automatic logic [31:0] ldp  (int rcfg, int ra, int rb); return rtype(6'b110011, rcfg, ra, rb); endfunction
  function automatic logic [31:0] stp  (int rcfg, int ra);        return rtype(6'b110111, rcfg, ra, 0); endfunction

  // configuration word of ldp/stp
  function automatic logic [31:0] pcfg(input int count, input int stride, input int did,
                                       input bit two, input bit blk, input bit eos);
    return {1'b0, eos, blk, two, 4'(did), 8'(stride), 16'(count)};
  endfunction

  // double -> single precision bits, round to nearest even, flush to zero
  function automatic logic [31:0] d2s(input real r);
    logic [63:0] b;
    logic [23:0] m;
    int e;
    b = $realtobits(r);
    if (b[62:52] == 0) return {b[63], 31'b0};
    e = int'(b[62:52]) - 1023 + 127;
    m = {1'b0, b[51:29]};
    if (b[28] && ((b[27:0] != 0) || b[29])) m = m + 1;
    if (m[23]) begin m = 0; e = e + 1; end
    if (e >= 255) return {b[63], 8'hFF, 23'b0};
    if (e <= 0) return {b[63], 31'b0};
    return {b[63], 8'(e), m[22:0]};
  endfunction

  // single-precision bits -> double (normal numbers and zero)
  function automatic real s2d(input logic [31:0] f);
    logic [63:0] b;
    if (f[30:23] == 0) return 0.0;
    b = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0};
    return $bitstoreal(b);
  endfunction

  // random single-precision value in [1, 2^span) with random sign
  function automatic logic [31:0] rand_f(input int span);
    logic [31:0] v;
    v = {$urandom_range(1, 0) == 1, 8'(127 + $urandom_range(span - 1, 0)), 23'($urandom)};
    return v;
  endfunction
endpackage
