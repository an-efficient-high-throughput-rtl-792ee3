// kes_direct: error-locator polynomial of the single- and double-error
// correcting codes, computed directly from the syndromes, without the
// Berlekamp-Massey iteration.
//
//   t = 1:  lambda(x) = 1 + S1 x
//   t = 2:  lambda(x) = 1 + S1 x + (S1^2 + S3 * S1^-1) x^2
//
// For a single error S3 = S1^3, so the x^2 term vanishes by itself. When
// S1 = 0 the inverse unit returns 0, lambda_2 becomes 0 and no bit is
// corrected (for t = 2 that case only arises with three or more errors).
//
// Interface: purely combinational. syn[i] is S_(2i+1); lambda[j] is the
// coefficient of x^j. The decoder samples lambda into the Chien search one
// cycle after the syndromes are final. The equations are the design's;
// handling S1 = 0 through the 0 -> 0 inverse is this implementation's choice.
module kes_direct
  import bch_pkg::*;
#(
  parameter int unsigned T = 2        // 1 or 2
) (
  input  gf_t [T-1:0] syn,
  output gf_t [T:0]   lambda
);

  always_comb begin
    lambda    = '0;
    lambda[0] = gf_t'(1);
    lambda[1] = syn[0];
    if (T >= 2)
      lambda[T] = gf_sq(syn[0]) ^ gf_mul(syn[T-1], gf_inv(syn[0]));
  end

  initial assert (T == 1 || T == 2) else $error("kes_direct: T must be 1 or 2");

endmodule
