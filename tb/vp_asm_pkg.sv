// vp_asm_pkg: instruction encoders and single-precision reference arithmetic shared by
// the testbenches. Encodings follow vp_pkg: scalar {0, op, rd, rs, rt, imm15} and
// vector {1, op, 0, vd, rs, va, vb, imm13}.
package vp_asm_pkg;
  import vp_pkg::*;

  function automatic logic [31:0] sI(sop_e op, int rd, int rs, int rt, int imm);
    return {1'b0, op, 4'(rd), 4'(rs), 4'(rt), 15'(imm)};
  endfunction

  function automatic logic [31:0] vI(vop_e op, int vd, int rs, int va, int vb, int imm);
    return {1'b1, op, 1'b0, 3'(vd), 4'(rs), 3'(va), 3'(vb), 13'(imm)};
  endfunction

  // IEEE single-precision results, each rounded once to single precision
  function automatic logic [31:0] f_add(logic [31:0] a, logic [31:0] b);
    return $shortrealtobits($bitstoshortreal(a) + $bitstoshortreal(b));
  endfunction

  function automatic logic [31:0] f_mul(logic [31:0] a, logic [31:0] b);
    return $shortrealtobits($bitstoshortreal(a) * $bitstoshortreal(b));
  endfunction

  function automatic logic [31:0] f_of(real r);
    return $shortrealtobits(shortreal'(r));
  endfunction
endpackage
