// sipo_reg: serial-in parallel-out register (the decoder register).
//
// Collects the corrected data bits that leave the decoder one per clock and
// presents them as a k-bit word. Bits arrive most significant first, so each
// new bit is shifted in at bit 0 and the first one ends at bit W-1.
//
// Interface: a bit is taken on every cycle with in_valid; in_first marks the
// first bit of a word and restarts the bit count. pout is the shift register
// itself, so it moves while a word is arriving; out_valid pulses for one cycle,
// the cycle after the W-th bit was taken, when pout holds the complete word.
// It keeps that word until the next word starts arriving. Asynchronous
// active-high reset. The framing signals are this implementation's choice.
module sipo_reg #(
  parameter int unsigned W = 7
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         sin,
  input  logic         in_valid,
  input  logic         in_first,
  output logic [W-1:0] pout,
  output logic         out_valid
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [CW-1:0] cnt;   // bits of the current word taken so far

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pout      <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        pout <= {pout[W-2:0], sin};
        if (in_first) begin
          cnt       <= CW'(1);
          out_valid <= (W == 1);
        end else begin
          cnt       <= cnt + CW'(1);
          out_valid <= (cnt == CW'(W - 1));
        end
      end
    end
  end

endmodule
