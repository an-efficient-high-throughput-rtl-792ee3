// bch_pkg: shared constants, types and Galois-field arithmetic for the
// BCH(15,k) encoder-decoder.
//
// All three codes work over GF(2^4) built from the primitive polynomial
// p(x) = x^4 + x + 1, which is also the generator polynomial of the
// single-error-correcting code, so alpha is a root of it. Field elements are
// 4-bit vectors in the polynomial basis (bit i = coefficient of alpha^i).
// The functions below are pure combinational logic and synthesise to XOR
// networks: gf_mul is a shift-and-add multiplier reduced by p(x), gf_inv
// raises its argument to the 14th power (a^-1 = a^(2^4-2)), which maps 0 to 0.
//
// The generator polynomials g(x) for t = 1, 2, 3 and the code dimensions
// k = 11, 7, 5 are those of the design; the polynomial basis, the
// exponentiation inverse and the helper names are this implementation's.
package bch_pkg;

  localparam int unsigned M    = 4;          // field degree, GF(2^M)
  localparam int unsigned N    = 15;         // code length n = 2^M - 1
  localparam int unsigned GMAX = 10;         // largest degree of g(x)
  localparam logic [M:0]  PRIM_POLY = 5'b1_0011;  // x^4 + x + 1

  typedef logic [M-1:0] gf_t;

  // Multiply two field elements: shift-and-add, reducing by p(x) at each step.
  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    gf_t acc = '0;
    gf_t sh  = a;
    for (int i = 0; i < int'(M); i++) begin
      if (b[i]) acc ^= sh;
      sh = sh[M-1] ? ((sh << 1) ^ PRIM_POLY[M-1:0]) : (sh << 1);
    end
    return acc;
  endfunction

  // Square of a field element.
  function automatic gf_t gf_sq(input gf_t a);
    return gf_mul(a, a);
  endfunction

  // Inverse: a^14 = a^2 * a^4 * a^8 (returns 0 for a = 0).
  function automatic gf_t gf_inv(input gf_t a);
    gf_t a2 = gf_sq(a);
    gf_t a4 = gf_sq(a2);
    gf_t a8 = gf_sq(a4);
    return gf_mul(gf_mul(a2, a4), a8);
  endfunction

  // alpha^e for any non-negative exponent e.
  function automatic gf_t gf_alpha_pow(input int unsigned e);
    gf_t v = gf_t'(1);
    for (int unsigned i = 0; i < (e % N); i++)
      v = gf_mul(v, gf_t'(2));
    return v;
  endfunction

  // Number of data bits k of the BCH(15,k) code correcting t errors.
  function automatic int unsigned bch_k(input int unsigned t);
    case (t)
      1:       return 11;
      2:       return 7;
      default: return 5;
    endcase
  endfunction

  // Generator polynomial g(x) of the code correcting t errors, bit i = coeff of x^i.
  function automatic logic [GMAX:0] bch_gen(input int unsigned t);
    case (t)
      1:       return 11'b000_0001_0011;  // 1 + x + x^4
      2:       return 11'b001_1101_0001;  // 1 + x^4 + x^6 + x^7 + x^8
      default: return 11'b101_0011_0111;  // 1 + x + x^2 + x^4 + x^5 + x^8 + x^10
    endcase
  endfunction

endpackage
