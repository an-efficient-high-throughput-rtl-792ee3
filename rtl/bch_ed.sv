// bch_ed: one BCH(15,k) encoder-decoder channel with error injection.
//
// A k-bit data word is loaded in parallel into the encoder register and
// shifted out one bit per clock into the LFSR encoder, which appends the
// n-k parity bits. An n-bit error pattern is loaded at the same time into the
// error register and shifted out in step with the codeword; the two are
// XORed, giving the corrupted received bit. The decoder corrects up to t
// errors and the decoder register turns its serial output back into a k-bit
// word. Error bit e[j] flips the codeword coefficient of x^j; data bit din[i]
// is the coefficient of x^(n-k+i).
//
// Interface: start (taken when ready) loads din and err_pat; a new word may
// be started every n = 15 clocks. dout is valid in the cycle dout_valid
// pulses, n+3+L+k clocks (L as in bch_decoder) after the cycle in which start was taken
// (29, 25 and 27 clocks for t = 1, 2, 3). n_corrected then gives the number
// of data bits the decoder flipped. Asynchronous active-high reset.
// The chain of registers, encoder, XOR and decoder is the design's; the
// handshake is this implementation's.
module bch_ed
  import bch_pkg::*;
#(
  parameter  int unsigned T = 2,
  localparam int unsigned K = bch_k(T)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  output logic         ready,
  input  logic [K-1:0] din,
  input  logic [N-1:0] err_pat,
  output logic [K-1:0] dout,
  output logic         dout_valid,
  output logic [3:0]   n_corrected
);

  logic go, d_bit, e_bit, data_phase, c_bit, c_valid, c_first;
  logic r_bit, o_bit, o_valid, o_first;

  assign go = start && ready;

  piso_reg #(.W(K)) u_enc_reg (
    .clk, .rst, .load(go), .shift(data_phase), .pin(din), .sout(d_bit)
  );

  bch_encoder #(.T(T)) u_enc (
    .clk, .rst, .start, .ready, .d_in(d_bit), .data_phase,
    .c_out(c_bit), .c_valid, .c_first
  );

  piso_reg #(.W(N)) u_err_reg (
    .clk, .rst, .load(go), .shift(c_valid), .pin(err_pat), .sout(e_bit)
  );

  assign r_bit = c_bit ^ e_bit;   // corrupted channel bit

  bch_decoder #(.T(T)) u_dec (
    .clk, .rst, .in_bit(r_bit), .in_valid(c_valid), .in_first(c_first),
    .out_bit(o_bit), .out_valid(o_valid), .out_first(o_first), .n_corrected
  );

  sipo_reg #(.W(K)) u_dec_reg (
    .clk, .rst, .sin(o_bit), .in_valid(o_valid), .in_first(o_first),
    .pout(dout), .out_valid(dout_valid)
  );

endmodule
