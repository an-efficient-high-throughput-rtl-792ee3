// err_detect: error detection module. Turns the Chien sum into a per-bit
// error flag and counts the bits flagged in a frame.
//
// A received bit is in error exactly when the error-locator polynomial is
// zero at the point tested for it, so err = en && (sum == 0). The count of
// flagged bits is kept for status: it is cleared by clr (given when a new
// frame enters the Chien search) and incremented for every flagged bit.
//
// Interface: err is combinational and belongs to the same cycle as sum;
// n_err is a register. Asynchronous active-high reset. The zero test is the
// design's; the counter is this implementation's addition for observability.
module err_detect
  import bch_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       clr,
  input  logic       en,
  input  gf_t        sum,
  output logic       err,
  output logic [3:0] n_err
);

  assign err = en && (sum == '0);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)      n_err <= '0;
    else if (clr) n_err <= '0;
    else if (err) n_err <= n_err + 4'd1;
  end

endmodule
