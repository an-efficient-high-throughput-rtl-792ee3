// chien_search: Chien search module (CSM). Evaluates the error-locator
// polynomial at successive powers of alpha, one point per clock.
//
// There is one register per coefficient lambda_j; register j is multiplied by
// the constant alpha^j every clock, and the sum (XOR) of all registers is the
// output. When loaded, register j takes lambda_j * alpha^j, so the sum in
// evaluation cycle i (i = 0, 1, ...) is lambda(alpha^(i+1)). An error at bit
// position p gives a root at alpha^(-p) = alpha^(15-p); position n-1-i is
// therefore tested in cycle i, which is the order in which the received bits
// leave the delay register.
//
// Interface: load captures lambda (and takes precedence over step); step
// advances the registers by one point. sum is combinational from the
// registers. Asynchronous active-high reset. The register/multiplier/adder
// structure is the design's; the premultiplication at load time, which aligns
// cycle i with bit n-1-i, is this implementation's.
module chien_search
  import bch_pkg::*;
#(
  parameter int unsigned T = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic        step,
  input  gf_t [T:0]   lambda,
  output gf_t         sum
);

  gf_t [T:0] r;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      r <= '0;
    end else if (load) begin
      for (int j = 0; j <= int'(T); j++)
        r[j] <= gf_mul(lambda[j], gf_alpha_pow(j));
    end else if (step) begin
      for (int j = 1; j <= int'(T); j++)
        r[j] <= gf_mul(r[j], gf_alpha_pow(j));
    end
  end

  always_comb begin
    sum = '0;
    for (int j = 0; j <= int'(T); j++)
      sum ^= r[j];
  end

endmodule
