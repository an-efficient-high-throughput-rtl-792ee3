// bch_top: the multi-bit error-correction module: three independent BCH
// encoder-decoder channels side by side, one per correction strength:
//   sec_*  BCH(15,11), single-error correction (t = 1)
//   dec_*  BCH(15,7),  double-error correction (t = 2)
//   tec_*  BCH(15,5),  triple-error correction (t = 3, Berlekamp-Massey)
// Each channel has its own handshake, data and error-pattern ports (see
// bch_ed for their timing); they share only clock and reset.
// The three codes are the design's; placing them side by side in one top
// level is this implementation's way of offering all three.
module bch_top
  import bch_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  // single-error correcting channel, BCH(15,11)
  input  logic         sec_start,
  output logic         sec_ready,
  input  logic [10:0]  sec_din,
  input  logic [14:0]  sec_err,
  output logic [10:0]  sec_dout,
  output logic         sec_dout_valid,
  output logic [3:0]   sec_n_corrected,
  // double-error correcting channel, BCH(15,7)
  input  logic         dec_start,
  output logic         dec_ready,
  input  logic [6:0]   dec_din,
  input  logic [14:0]  dec_err,
  output logic [6:0]   dec_dout,
  output logic         dec_dout_valid,
  output logic [3:0]   dec_n_corrected,
  // triple-error correcting channel, BCH(15,5)
  input  logic         tec_start,
  output logic         tec_ready,
  input  logic [4:0]   tec_din,
  input  logic [14:0]  tec_err,
  output logic [4:0]   tec_dout,
  output logic         tec_dout_valid,
  output logic [3:0]   tec_n_corrected
);

  bch_ed #(.T(1)) u_sec (
    .clk, .rst, .start(sec_start), .ready(sec_ready), .din(sec_din), .err_pat(sec_err),
    .dout(sec_dout), .dout_valid(sec_dout_valid), .n_corrected(sec_n_corrected)
  );

  bch_ed #(.T(2)) u_dec (
    .clk, .rst, .start(dec_start), .ready(dec_ready), .din(dec_din), .err_pat(dec_err),
    .dout(dec_dout), .dout_valid(dec_dout_valid), .n_corrected(dec_n_corrected)
  );

  bch_ed #(.T(3)) u_tec (
    .clk, .rst, .start(tec_start), .ready(tec_ready), .din(tec_din), .err_pat(tec_err),
    .dout(tec_dout), .dout_valid(tec_dout_valid), .n_corrected(tec_n_corrected)
  );

endmodule
