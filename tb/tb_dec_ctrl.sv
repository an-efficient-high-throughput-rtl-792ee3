// tb_dec_ctrl: self-checking test of the decoder control module (t = 2,
// LIFE = 23). Frames of 15 bits are sent back to back and with gaps, and
// lam_valid is returned a fixed number of clocks after syn_done, as a key
// equation solver would. Checked: syn_done exactly one clock after the 15th
// bit; chien_en high for k = 7 clocks starting one clock after lam_valid;
// out_en/out_first one clock behind; shift_en high from the first bit for
// LIFE further clocks.
module tb_dec_ctrl;
  logic clk = 0, rst = 1, in_valid = 0, in_first = 0, lam_valid;
  logic syn_done, chien_en, out_en, out_first, shift_en;
  int checks = 0, failures = 0;
  int cyc = 0;
  int first_at[$];
  logic [63:0] exp_syn, exp_ch, exp_sh;   // expectation by cycle mod 64

  localparam int KES = 2;     // clocks from syn_done to lam_valid in this test

  dec_ctrl #(.T(2), .LIFE(23)) dut (.clk, .rst, .in_valid, .in_first, .lam_valid,
                                    .syn_done, .chien_en, .out_en, .out_first, .shift_en);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // key equation stand-in: lam_valid KES clocks after syn_done
  logic [KES-1:0] pipe = '0;
  always @(posedge clk) pipe <= {pipe[KES-2:0], syn_done};
  assign lam_valid = pipe[KES-1];

  // reference timing, built from the frame start cycles
  function automatic bit in_window(input int c, input int lo, input int len);
    foreach (first_at[i])
      if (c >= first_at[i] + lo && c < first_at[i] + lo + len) return 1;
    return 0;
  endfunction

  logic ch_d = 0;
  always @(negedge clk) if (!rst) begin
    bit e_syn, e_ch, e_sh, e_oe, e_of;
    e_syn = in_window(cyc, 15, 1);
    e_ch  = in_window(cyc, 16 + KES, 7);
    e_oe  = in_window(cyc, 17 + KES, 7);
    e_of  = in_window(cyc, 17 + KES, 1);
    e_sh  = in_window(cyc, 0, 24);
    checks++;
    if (syn_done != e_syn || chien_en != e_ch || out_en != e_oe || out_first != e_of ||
        shift_en != e_sh) begin
      failures++;
      $display("FAIL cycle %0d: syn %b/%b ch %b/%b oe %b/%b of %b/%b sh %b/%b", cyc,
               syn_done, e_syn, chien_en, e_ch, out_en, e_oe, out_first, e_of, shift_en, e_sh);
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 40; f++) begin
      first_at.push_back(cyc);
      for (int i = 0; i < 15; i++) begin
        in_valid = 1; in_first = (i == 0);
        @(negedge clk);
      end
      in_valid = 0; in_first = 0;
      if (f % 3 == 2) repeat (f % 7) @(negedge clk);
    end
    repeat (60) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle counter advanced after the checker has sampled this cycle
  always @(posedge clk) if (!rst) cyc <= cyc + 1;
endmodule
