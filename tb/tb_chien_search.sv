// tb_chien_search: self-checking test of the Chien search (t = 3).
// Random error-locator polynomials are loaded; in evaluation cycle i the sum
// must equal lambda(alpha^(i+1)), computed with reference arithmetic, for 15
// consecutive steps. A cycle without step must hold the sum.
module tb_chien_search;
  import bch_ref_pkg::*;
  logic clk = 0, rst = 1, load = 0, step = 0;
  bch_pkg::gf_t [3:0] lambda;
  bch_pkg::gf_t sum;
  int checks = 0, failures = 0;

  chien_search #(.T(3)) dut (.clk, .rst, .load, .step, .lambda, .sum);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int eval_ref(input bch_pkg::gf_t [3:0] l, input int e);
    int s = 0;
    for (int j = 0; j <= 3; j++) s = s ^ ref_mul(int'(l[j]), ref_exp(e * j));
    return s;
  endfunction

  initial begin
    bch_pkg::gf_t [3:0] l;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      l = bch_pkg::gf_t'($urandom);
      for (int j = 1; j <= 3; j++) l[j] = bch_pkg::gf_t'($urandom);
      if (n < 16) l = {12'h000, 4'(n)};
      lambda = l;
      load = 1;
      @(negedge clk);
      load = 0;
      lambda = '0;
      for (int i = 0; i < 15; i++) begin
        checks++;
        if (int'(sum) != eval_ref(l, i + 1)) begin
          failures++;
          $display("FAIL lambda %h cycle %0d: sum %h expected %h", l, i, sum, eval_ref(l, i + 1));
        end
        if (i == 7) begin      // pause: no step, sum holds
          @(negedge clk);
          checks++;
          if (int'(sum) != eval_ref(l, i + 1)) begin failures++; $display("FAIL hold"); end
        end
        step = 1;
        @(negedge clk);
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
