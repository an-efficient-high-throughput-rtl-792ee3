// tb_kes_direct: self-checking test of the direct error-locator computation.
// For every error pattern of weight 0..t (t = 1 and t = 2), the syndromes of
// the pattern are applied and the coefficients must equal those of
// prod (1 + alpha^p x) over the error positions p. For t = 2 and three errors
// with S1 = 0 the polynomial must be 1 (nothing corrected).
module tb_kes_direct;
  import bch_ref_pkg::*;
  bch_pkg::gf_t [0:0] syn1;
  bch_pkg::gf_t [1:0] lam1;
  bch_pkg::gf_t [1:0] syn2;
  bch_pkg::gf_t [2:0] lam2;
  int checks = 0, failures = 0;

  kes_direct #(.T(1)) dut1 (.syn(syn1), .lambda(lam1));
  kes_direct #(.T(2)) dut2 (.syn(syn2), .lambda(lam2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    int s1_zero_seen = 0;
    for (int e = 0; e < 32768; e++) begin
      w = popcount15(e);
      if (w <= 1) begin
        syn1[0] = bch_pkg::gf_t'(ref_syn(e, 1));
        #1;
        for (int j = 0; j <= 1; j++) begin
          checks++;
          if (int'(lam1[j]) != ref_locator_coef(e, j)) begin
            failures++;
            $display("FAIL t=1 err %h lambda%0d got %h", e, j, lam1[j]);
          end
        end
      end
      if (w <= 2 || (w == 3 && ref_syn(e, 1) == 0)) begin
        syn2[0] = bch_pkg::gf_t'(ref_syn(e, 1));
        syn2[1] = bch_pkg::gf_t'(ref_syn(e, 3));
        #1;
        for (int j = 0; j <= 2; j++) begin
          checks++;
          if (int'(lam2[j]) != ((w <= 2) ? ref_locator_coef(e, j) : (j == 0))) begin
            failures++;
            $display("FAIL t=2 err %h lambda%0d got %h", e, j, lam2[j]);
          end
        end
        if (w == 3) s1_zero_seen++;
      end
    end
    checks++;
    if (s1_zero_seen == 0) begin failures++; $display("FAIL S1=0 case never met"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
