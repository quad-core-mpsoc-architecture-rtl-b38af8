// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Operands are widened exactly to double precision, the operation is done in
// double (exact for a product and correctly rounded for a sum, so rounding
// the double once more to single gives the correctly rounded single result),
// and the double is rounded to single with round-to-nearest-even. Subnormal
// inputs and results are flushed to zero, as the FPU does.
package fp_ref_pkg;

  function automatic real sp2real(input logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'd0) d = {x[31], 63'd0};
    else d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real2sp(input real r);
    logic [63:0] d;
    logic [24:0] m;
    int e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && ((|d[27:0]) || m[0])) m = m + 25'd1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // op: 0 add, 1 sub, 2 mul
  function automatic logic [31:0] fp_ref(input logic [1:0] op, input logic [31:0] a,
                                         input logic [31:0] b);
    real ra, rb;
    ra = sp2real(a);
    rb = sp2real(b);
    case (op)
      2'd0: return real2sp(ra + rb);
      2'd1: return real2sp(ra - rb);
      default: return real2sp(ra * rb);
    endcase
  endfunction

endpackage
