// piso_reg: parallel-in serial-out register.
//
// Used twice in each encoder-decoder channel: as the encoder register, which
// takes the k data bits in parallel and hands them one per clock to the LFSR
// encoder, and as the error register, which takes an n-bit error pattern and
// hands it out one bit per clock to be XORed onto the codeword.
// The most significant bit leaves first, because the codeword is sent
// highest polynomial degree first.
//
// Interface: load captures pin (it wins over shift); shift moves the word one
// place towards the MSB, filling with 0. sout is the current MSB, so the first
// bit is visible in the cycle right after load. Asynchronous active-high reset
// clears the register. The load/shift protocol and the reset are this
// implementation's choices; the role of the two registers is the design's.
module piso_reg #(
  parameter int unsigned W = 7
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] pin,
  output logic         sout
);

  logic [W-1:0] q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        q <= '0;
    else if (load)  q <= pin;
    else if (shift) q <= q << 1;
  end

  assign sout = q[W-1];

endmodule
