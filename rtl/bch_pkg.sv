// bch_pkg: shared constants, types and Galois-field arithmetic for the
// BCH code group used by the hybrid CMOS/nanodevice memory.
//
// All field elements are carried in a 13-bit container (gf_t), wide enough
// for GF(2^13), the largest field of the four code groups; a module working
// in GF(2^m) with m < 13 uses the low m bits.  The primitive polynomials are
// this design's choice (the common textbook ones); the code group layout
// (8 codes per group, t spread evenly between 0 and t_max) follows the
// description of the code groups.
package bch_pkg;

  localparam int GF_W      = 13;  // widest supported field, GF(2^13)
  localparam int NUM_CODES = 8;   // codes per code group
  localparam int CODE_W    = 3;   // ceil(log2(NUM_CODES))

  typedef logic [GF_W-1:0] gf_t;

  // Primitive polynomial of GF(2^m), including the x^m term.
  function automatic int unsigned prim_poly(int unsigned m);
    case (m)
      3:  return 'h00B;   // x^3+x+1
      4:  return 'h013;   // x^4+x+1
      5:  return 'h025;   // x^5+x^2+1
      6:  return 'h043;   // x^6+x+1
      7:  return 'h089;   // x^7+x^3+1
      8:  return 'h11D;   // x^8+x^4+x^3+x^2+1
      9:  return 'h211;   // x^9+x^4+1
      10: return 'h409;   // x^10+x^3+1
      11: return 'h805;   // x^11+x^2+1
      12: return 'h1053;  // x^12+x^6+x^4+x+1
      default: return 'h201B;  // 13: x^13+x^4+x^3+x+1
    endcase
  endfunction

  // Multiply an element by alpha (x) in GF(2^m).
  function automatic gf_t gf_mulx(gf_t a, int unsigned m);
    gf_t mask = gf_t'((32'd1 << m) - 1);
    gf_t sh   = gf_t'({a, 1'b0});
    if (a[m-1]) sh = sh ^ gf_t'(prim_poly(m));
    return sh & mask;
  endfunction

  // General multiplier in GF(2^m), shift-and-add form.
  function automatic gf_t gf_mul(gf_t a, gf_t b, int unsigned m);
    gf_t p  = '0;
    gf_t aa = a;
    for (int unsigned i = 0; i < GF_W; i++) begin
      if (i < m) begin
        if (b[i]) p = p ^ aa;
        aa = gf_mulx(aa, m);
      end
    end
    return p;
  endfunction

  // alpha^e in GF(2^m), e >= 0 (used for constants at elaboration):
  // square-and-multiply over the bits of e mod (2^m - 1), MSB first.
  function automatic gf_t gf_alpha_pow(int unsigned e, int unsigned m);
    gf_t p = gf_t'(1);
    int unsigned n = (32'd1 << m) - 1;
    int unsigned r = e % n;
    for (int i = GF_W - 1; i >= 0; i--) begin
      p = gf_mul(p, p, m);
      if (r[i]) p = gf_mulx(p, m);
    end
    return p;
  endfunction

  // Correction capability of code i of a group whose strongest code corrects
  // tmax errors: t_i spread evenly over 0..tmax, rounded to nearest.
  function automatic int unsigned code_t(int unsigned i, int unsigned tmax);
    return (2 * i * tmax + (NUM_CODES - 1)) / (2 * (NUM_CODES - 1));
  endfunction

endpackage
