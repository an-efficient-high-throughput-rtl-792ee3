// tb_siso_reg: self-checking test of the delay-and-correct register (D = 16).
// A random bit stream is shifted in while en is high (with pauses); the
// corrected output must be the bit taken 16 enabled shifts earlier XOR the
// error flag, registered one clock later, and must hold when out_en is low.
module tb_siso_reg;
  logic clk = 0, rst = 1, en = 0, sin = 0, err = 0, out_en = 0, dout;
  int checks = 0, failures = 0;
  logic hist[$];

  siso_reg #(.D(16)) dut (.clk, .rst, .en, .sin, .err, .out_en, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expv, last;
    last = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      en     = ($urandom % 8) != 0;
      sin    = 1'($urandom);
      err    = 1'($urandom);
      out_en = ($urandom % 4) != 0;
      // bit at the end of the register: 16th most recent enabled input
      expv = (hist.size() >= 16) ? hist[hist.size() - 16] : 1'b0;
      if (out_en) last = expv ^ err;
      if (en) hist.push_back(sin);
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (dout !== last) begin
          failures++;
          $display("FAIL cycle %0d: dout %b expected %b", i, dout, last);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
