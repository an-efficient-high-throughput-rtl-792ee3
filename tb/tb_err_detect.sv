// tb_err_detect: self-checking test of the error detection module.
// Random Chien sums are applied with and without enable; err must be high
// exactly for an enabled zero sum, and the per-frame count must equal the
// number of flags since the last clear.
module tb_err_detect;
  logic clk = 0, rst = 1, clr = 0, en = 0, err;
  bch_pkg::gf_t sum = '0;
  logic [3:0] n_err;
  int checks = 0, failures = 0;

  err_detect dut (.clk, .rst, .clr, .en, .sum, .err, .n_err);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt, flags_seen;
    flags_seen = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 300; f++) begin
      clr = 1;
      @(negedge clk);
      clr = 0;
      cnt = 0;
      for (int i = 0; i < 11; i++) begin
        en  = ($urandom % 4) != 0;
        sum = ($urandom % 3 == 0) ? '0 : bch_pkg::gf_t'($urandom);
        #1;
        checks++;
        if (err != (en && sum == '0)) begin
          failures++;
          $display("FAIL err=%b for en=%b sum=%h", err, en, sum);
        end
        if (en && sum == '0) begin cnt++; flags_seen++; end
        @(negedge clk);
      end
      en = 0;
      checks++;
      if (int'(n_err) != cnt) begin
        failures++;
        $display("FAIL count %0d expected %0d", n_err, cnt);
      end
    end
    checks++;
    if (flags_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
