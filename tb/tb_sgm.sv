// tb_sgm: self-checking test of the syndrome generator for J = 1, 3, 5.
// Random received words are fed MSB first, back to back and with gaps; after
// the 15th bit each syndrome register must equal the direct sum r(alpha^J),
// and it must hold that value until the next word starts.
module tb_sgm;
  import bch_ref_pkg::*;
  logic clk = 0, rst = 1, r_in = 0, in_valid = 0, in_first = 0;
  bch_pkg::gf_t syn[3];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 3; g++) begin : u
    sgm #(.J(2*g + 1)) dut (.clk, .rst, .r_in, .in_valid, .in_first, .syn(syn[g]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input int w);
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (int'(syn[g]) != ref_syn(w, 2*g + 1)) begin
        failures++;
        $display("FAIL word %h S%0d: got %h expected %h", w, 2*g+1, syn[g], ref_syn(w, 2*g+1));
      end
    end
  endtask

  initial begin
    int w;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      w = (n < 15) ? (1 << n) : int'($urandom % 32768);
      for (int i = 14; i >= 0; i--) begin
        r_in = w[i]; in_valid = 1; in_first = (i == 14);
        @(negedge clk);
      end
      in_valid = 0; in_first = 0; r_in = 0;
      check_all(w);
      if (n % 3 == 0) begin
        repeat (2) @(negedge clk);
        check_all(w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
