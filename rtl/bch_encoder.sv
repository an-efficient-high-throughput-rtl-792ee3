// bch_encoder: systematic BCH(15,k) encoder built from a linear feedback
// shift register (LFSR) dividing by the generator polynomial g(x).
//
// How it works: a frame lasts n = 15 clocks. During the first k clocks the
// data bits d_(k-1) ... d_0 arrive serially on d_in and go straight to the
// output, while the LFSR accumulates x^(n-k) d(x) mod g(x): the feedback bit is
// the LFSR's top stage XOR the data bit, and it is added into every stage whose
// g(x) coefficient is 1. During the remaining n-k clocks the feedback is
// forced to 0 and the LFSR shifts its remainder (the parity bits) out of the
// top stage. The codeword c(x) = x^(n-k) d(x) + rp(x) thus leaves highest
// degree first. The LFSR is cleared at the start of every frame.
//
// Interface: start (accepted when ready) begins a frame; the first data bit
// must be on d_in in the following cycle. data_phase tells the encoder
// register to shift. c_out/c_valid/c_first carry the codeword, one bit per
// clock for n clocks; c_first marks the x^(n-1) coefficient. A new frame may
// start in the last cycle of the current one, so frames can run back to back
// at one bit per clock. Asynchronous active-high reset.
//
// The LFSR structure and g(x) for t = 1, 2, 3 follow the design; the frame
// counter and handshake are this implementation's.
module bch_encoder
  import bch_pkg::*;
#(
  parameter  int unsigned T = 2,                     // errors corrected: 1, 2 or 3
  localparam int unsigned K = bch_k(T),              // data bits
  localparam int unsigned P = N - K                  // parity bits = deg g(x)
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic ready,
  input  logic d_in,
  output logic data_phase,
  output logic c_out,
  output logic c_valid,
  output logic c_first
);

  localparam logic [GMAX:0] G = bch_gen(T);

  logic [P-1:0] lfsr;
  logic [3:0]   cnt;     // position in the frame, 0 .. n-1
  logic         busy;
  logic         fb;      // feedback bit
  logic         go;

  assign ready      = !busy || (cnt == 4'(N - 1));
  assign go         = start && ready;
  assign data_phase = busy && (cnt < 4'(K));
  assign fb         = data_phase ? (lfsr[P-1] ^ d_in) : 1'b0;
  assign c_out      = data_phase ? d_in : lfsr[P-1];
  assign c_valid    = busy;
  assign c_first    = busy && (cnt == '0);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      lfsr <= '0;
      cnt  <= '0;
      busy <= 1'b0;
    end else if (go) begin
      lfsr <= '0;
      cnt  <= '0;
      busy <= 1'b1;
    end else if (busy) begin
      lfsr[0] <= fb;
      for (int i = 1; i < int'(P); i++)
        lfsr[i] <= lfsr[i-1] ^ (G[i] & fb);
      cnt <= cnt + 4'd1;
      if (cnt == 4'(N - 1)) busy <= 1'b0;
    end
  end

  initial assert (T >= 1 && T <= 3) else $error("bch_encoder: T must be 1..3");

endmodule
