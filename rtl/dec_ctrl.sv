// dec_ctrl: control module of the BCH decoder: counters with decode logic
// that sequence the syndrome, key-equation and Chien-search stages.
//
// Three independent counters let consecutive frames overlap in the pipeline:
//  - the bit counter follows the n received bits of a frame and raises
//    syn_done in the cycle after the last bit, when the syndromes are final;
//  - the Chien counter starts when lam_valid reports the error-locator
//    polynomial ready, and holds chien_en for the k cycles in which the data
//    bits r_14 ... r_(15-k) are tested; out_en / out_first follow one cycle
//    later, in step with the registered corrected bit;
//  - the life counter keeps shift_en high from the first bit of a frame until
//    its last data bit has left the delay register, so that register delays
//    every bit by exactly the same number of clocks.
//
// Interface: in_valid / in_first come with the received bits: a frame is n
// consecutive valid cycles, the first marked by in_first (checked by
// assertions). LIFE is the number of clocks after the first bit during which
// shifting must continue. Asynchronous active-high reset. The existence of a
// counter-based control module is the design's; its signals and timing are
// this implementation's. The reset is asynchronous for the logic and is
// also used synchronously by the assertions' disable condition; lint tools
// report that double use, which is intended.
module dec_ctrl
  import bch_pkg::*;
#(
  parameter  int unsigned T    = 2,
  parameter  int unsigned LIFE = 24,
  localparam int unsigned K    = bch_k(T)
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_first,
  input  logic lam_valid,
  output logic syn_done,
  output logic chien_en,
  output logic out_en,
  output logic out_first,
  output logic shift_en
);

  logic [3:0] bit_cnt;   // bits of the current frame taken so far
  logic [3:0] ch_cnt;    // Chien evaluation index
  logic [5:0] life;      // clocks of shifting still owed to the latest frame
  logic       frame_open;

  assign frame_open = (bit_cnt != 4'd0) && (bit_cnt != 4'(N));
  assign shift_en   = (in_valid && in_first) || (life != '0);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      bit_cnt   <= '0;
      ch_cnt    <= '0;
      chien_en  <= 1'b0;
      syn_done  <= 1'b0;
      out_en    <= 1'b0;
      out_first <= 1'b0;
      life      <= '0;
    end else begin
      // syndrome stage
      syn_done <= 1'b0;
      if (in_valid) begin
        if (in_first) bit_cnt <= 4'd1;
        else          bit_cnt <= bit_cnt + 4'd1;
        syn_done <= in_first ? (N == 1) : (bit_cnt == 4'(N - 1));
      end

      // Chien search stage
      if (lam_valid) begin
        chien_en <= 1'b1;
        ch_cnt   <= '0;
      end else if (chien_en) begin
        ch_cnt <= ch_cnt + 4'd1;
        if (ch_cnt == 4'(K - 1)) chien_en <= 1'b0;
      end
      out_en    <= chien_en;
      out_first <= chien_en && (ch_cnt == '0);

      // delay register enable
      if (in_valid && in_first) life <= 6'(LIFE);
      else if (life != '0)      life <= life - 6'd1;
    end
  end

  // Framing rules of the received-bit stream.
  a_first_only_between_frames: assert property (@(posedge clk) disable iff (rst)
    in_valid && in_first |-> !frame_open)
    else $error("dec_ctrl: new frame started before the previous one ended");
  a_no_gap_in_frame: assert property (@(posedge clk) disable iff (rst)
    frame_open |-> in_valid && !in_first)
    else $error("dec_ctrl: frame interrupted");
  a_no_bits_outside_frame: assert property (@(posedge clk) disable iff (rst)
    in_valid && !in_first |-> frame_open)
    else $error("dec_ctrl: bit outside a frame");

endmodule
