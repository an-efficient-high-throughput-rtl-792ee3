// bma_kes: inversion-based Berlekamp-Massey key equation solver for the
// triple-error-correcting code.
//
// Works out the error-locator polynomial lambda(x) from the syndromes in t
// iterations (one per clock), using the binary form of the algorithm in which
// every second discrepancy is known to be zero and is skipped:
//
//   d_r        = sum_i S_(2r+1-i) * lambda_i                 (discrepancy)
//   lambda(x) <- lambda(x) + (d_r * d_p^-1) * beta(x)        (beta * d_r d_p^-1 is the correction factor)
//   beta(x)   <- x^2 * lambda_old(x), d_p <- d_r             if d_r != 0
//   beta(x)   <- x^2 * beta(x)                               if d_r == 0
//
// starting from lambda = 1, beta = x, d_p = 1. The syndrome register holds
// S_1 ... S_(2t) (even syndromes are squares of the odd ones) together with
// zeros, and rotates by two places per iteration so that its first t+1
// cells always line up with lambda_0 ... lambda_t for the products of d_r.
// The select condition is d_r != 0 alone. The textbook condition also asks
// 2L <= 2r (L = current degree); for t <= 3 the two differ only in the last
// iteration, whose beta update is never used, so the result is the same.
//
// Interface: start takes the odd syndromes syn[i] = S_(2i+1) and begins.
// busy is high for the t iteration cycles; done pulses in the next cycle,
// when lambda holds the result (it stays until the next start). Latency from
// start to done: t+1 clocks. Asynchronous active-high reset.
// The update equations, the discrepancy test, the rotating syndrome
// register and the inversion of d_p follow the design; the one-iteration-
// per-clock schedule and the handshake are this implementation's.
module bma_kes
  import bch_pkg::*;
#(
  parameter int unsigned T = 3
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  gf_t [T-1:0] syn,
  output logic        busy,
  output logic        done,
  output gf_t [T:0]   lambda
);

  localparam int unsigned NQ = (T >= 2) ? 3*T - 1 : 2;  // syndrome register cells
  localparam int unsigned CW = $clog2(T + 1);

  gf_t [NQ-1:0] q;        // rotating syndrome register
  gf_t [NQ-1:0] q_init;
  gf_t [T:0]    beta;
  gf_t          dp;       // previous non-zero discrepancy
  gf_t          dr;       // current discrepancy
  gf_t          f;        // d_r * d_p^-1
  gf_t [2*T:1]  s_all;    // S_1 .. S_2t
  logic [CW-1:0] r;       // iteration counter

  // Full syndrome set: S_2j = S_j^2.
  always_comb begin
    s_all = '0;
    for (int j = 1; j <= 2*int'(T); j++)
      s_all[j] = (j % 2 == 1) ? syn[(j-1)/2] : gf_sq(s_all[j/2]);
  end

  // Initial syndrome register: S_1 in cell 0, zeros in cells 1..t, and
  // S_j (j >= 2) placed so that after r = j/2 rotations (2r cells) it sits
  // in cell 2r+1-j: its starting cell is (1-j) mod NQ.
  always_comb begin
    q_init = '0;
    for (int j = 1; j <= 2*int'(T) - 1; j++)
      q_init[(1 - j + int'(NQ)) % int'(NQ)] = s_all[j];
  end

  always_comb begin
    dr = '0;
    for (int i = 0; i <= int'(T); i++)
      dr ^= gf_mul(q[i], lambda[i]);
    f = gf_mul(dr, gf_inv(dp));
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q      <= '0;
      lambda <= '0;
      beta   <= '0;
      dp     <= '0;
      r      <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q         <= q_init;
        lambda    <= '0;
        lambda[0] <= gf_t'(1);
        beta      <= '0;
        beta[1]   <= gf_t'(1);
        dp        <= gf_t'(1);
        r         <= '0;
        busy      <= 1'b1;
      end else if (busy) begin
        for (int i = 0; i <= int'(T); i++)
          lambda[i] <= lambda[i] ^ gf_mul(f, beta[i]);
        if (dr != '0) begin
          beta <= {lambda[T-1:0], gf_t'(0)} << M;   // x^2 * lambda_old
          dp   <= dr;
        end else begin
          beta <= {beta[T-1:0], gf_t'(0)} << M;     // x^2 * beta
        end
        q <= {q[NQ-3:0], q[NQ-1:NQ-2]};             // rotate by two cells
        r <= r + CW'(1);
        if (r == CW'(T - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  initial assert (T >= 2) else $error("bma_kes: T must be at least 2");

endmodule
