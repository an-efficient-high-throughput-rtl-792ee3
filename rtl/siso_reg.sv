// siso_reg: serial-in serial-out delay register with output correction.
//
// The received bits are held back while the syndromes, the error-locator
// polynomial and the Chien search are worked out: the register shifts once
// per enabled clock and a bit reaches the end D enabled shifts after it was
// taken. There it is XORed with the error flag of the Chien search, and the
// corrected bit is registered on the output.
//
// Interface: en (from the control module) shifts the register and is held
// high for the whole life of a frame, so the delay is exactly D clocks for
// every bit. sin is taken on every enabled clock. err is the error flag for
// the bit at the end of the register in the same cycle; out_en registers the
// corrected bit into dout (one cycle later). Asynchronous active-high reset.
// The shift register and XOR are the design's; the length D and the output
// register are this implementation's timing choices.
module siso_reg #(
  parameter int unsigned D = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic sin,
  input  logic err,
  input  logic out_en,
  output logic dout
);

  logic [D-1:0] sr;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sr   <= '0;
      dout <= 1'b0;
    end else begin
      if (en)     sr   <= {sr[D-2:0], sin};
      if (out_en) dout <= sr[D-1] ^ err;
    end
  end

endmodule
