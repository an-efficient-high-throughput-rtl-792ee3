// sgm: syndrome generator module, one syndrome S_J = r(alpha^J).
//
// The received word arrives serially, highest degree first (r_14 ... r_0), so
// the syndrome is accumulated by Horner's rule: S <- S * alpha^J + r_i each
// clock. After the n-th bit S holds r(alpha^J) = sum r_i alpha^(iJ). A binary
// BCH decoder needs only the odd syndromes S_1, S_3, ..., S_(2t-1); the
// decoder instantiates one sgm per odd J (even syndromes are squares of these).
//
// Interface: a bit is taken in every cycle with in_valid; in_first marks r_14
// and restarts the sum (S <- r_14). syn is the register: it holds the final
// syndrome in the cycle after r_0 was taken and keeps it until the next frame
// begins, which may be in that same cycle. Asynchronous active-high reset.
// The Horner structure with a constant multiplier is this implementation's
// reading of the syndrome equations; the equations themselves are the design's.
module sgm
  import bch_pkg::*;
#(
  parameter int unsigned J = 1     // syndrome index, S_J = r(alpha^J)
) (
  input  logic clk,
  input  logic rst,
  input  logic r_in,
  input  logic in_valid,
  input  logic in_first,
  output gf_t  syn
);

  localparam gf_t AJ = gf_alpha_pow(J);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)
      syn <= '0;
    else if (in_valid)
      syn <= (in_first ? gf_t'(0) : gf_mul(syn, AJ)) ^ gf_t'(r_in);
  end

endmodule
