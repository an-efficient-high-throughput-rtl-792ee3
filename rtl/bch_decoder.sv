// bch_decoder: serial BCH(15,k) decoder for t = 1, 2 or 3 errors.
//
// The received word enters one bit per clock, highest degree first. Decoding
// runs in three pipelined stages:
//  1. syndromes: t syndrome generators (sgm) compute S_1, S_3, ..., S_(2t-1)
//     while the word arrives;
//  2. key equation: for t = 1, 2 the error-locator coefficients come straight
//     from the syndromes (kes_direct, no iteration); for t = 3 the
//     inversion-based Berlekamp-Massey solver (bma_kes) runs t clocks;
//  3. error location: the Chien search tests the k data positions, one per
//     clock, and the error detection module flags a bit wherever the
//     error-locator polynomial is zero.
// Meanwhile the delay register (siso_reg) holds the received bits back so
// that each data bit leaves it in the cycle its flag is computed; the two are
// XORed and registered as the corrected output. The control module (dec_ctrl)
// sequences the stages. The parity bits are not corrected and not output.
//
// Interface and timing: in_bit/in_valid/in_first carry a frame of n = 15 bits
// on consecutive clocks (in_first on r_14). Frames may follow back to back.
// If the first bit is in cycle 0, the k corrected data bits d_(k-1) ... d_0
// leave on out_bit with out_valid in cycles n+2+L ... n+1+L+k, where L = 0
// for t = 1, 2 and L = t+1 for t = 3 (out_first marks d_(k-1)); n_corrected
// then holds the number of data bits flipped. Asynchronous active-high reset.
// The stage structure follows the design; the pipelining, timing and
// framing signals are this implementation's.
module bch_decoder
  import bch_pkg::*;
#(
  parameter  int unsigned T     = 2,
  localparam int unsigned K     = bch_k(T),
  localparam int unsigned L_KES = (T >= 3) ? T + 1 : 0,  // key-equation clocks
  localparam int unsigned D     = N + 1 + L_KES          // delay-register length
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_bit,
  input  logic       in_valid,
  input  logic       in_first,
  output logic       out_bit,
  output logic       out_valid,
  output logic       out_first,
  output logic [3:0] n_corrected
);

  gf_t [T-1:0] syn;
  gf_t [T:0]   lambda;
  gf_t         csum;
  logic        syn_done, lam_valid, chien_en, out_en, shift_en, err;

  // control module
  dec_ctrl #(.T(T), .LIFE(D + K)) u_ctrl (
    .clk, .rst, .in_valid, .in_first, .lam_valid,
    .syn_done, .chien_en, .out_en, .out_first, .shift_en
  );

  // syndrome generators: S_1, S_3, ..., S_(2t-1)
  for (genvar i = 0; i < int'(T); i++) begin : g_sgm
    sgm #(.J(2*i + 1)) u_sgm (
      .clk, .rst, .r_in(in_bit), .in_valid, .in_first, .syn(syn[i])
    );
  end

  // key equation solver
  if (T <= 2) begin : g_direct
    kes_direct #(.T(T)) u_kes (.syn, .lambda);
    assign lam_valid = syn_done;
  end else begin : g_bma
    logic bma_busy;
    bma_kes #(.T(T)) u_kes (
      .clk, .rst, .start(syn_done), .syn, .busy(bma_busy), .done(lam_valid), .lambda
    );
    // frames are at least n clocks apart, longer than the t+1 solver clocks
    a_kes_free: assert property (@(posedge clk) disable iff (rst) syn_done |-> !bma_busy)
      else $error("bch_decoder: key equation solver still busy");
  end

  // Chien search
  chien_search #(.T(T)) u_csm (
    .clk, .rst, .load(lam_valid), .step(chien_en), .lambda, .sum(csum)
  );

  // error detection
  err_detect u_det (
    .clk, .rst, .clr(lam_valid), .en(chien_en), .sum(csum), .err, .n_err(n_corrected)
  );

  // delay register and correction
  siso_reg #(.D(D)) u_siso (
    .clk, .rst, .en(shift_en), .sin(in_bit & in_valid), .err, .out_en(chien_en), .dout(out_bit)
  );

  assign out_valid = out_en;

  initial assert (T >= 1 && T <= 3) else $error("bch_decoder: T must be 1..3");

endmodule
