// tb_sipo_reg: self-checking test of the serial-in parallel-out register.
// Sends random 7-bit words MSB first, with and without gaps between bits and
// back to back, and checks the assembled word and the one-cycle valid pulse.
module tb_sipo_reg;
  logic clk = 0, rst = 1, sin = 0, in_valid = 0, in_first = 0, out_valid;
  logic [6:0] pout;
  int checks = 0, failures = 0, pulses = 0, words = 0;
  logic [6:0] expq[$];

  sipo_reg #(.W(7)) dut (.clk, .rst, .sin, .in_valid, .in_first, .pout, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst && out_valid) begin
    pulses++;
    checks++;
    if (expq.size() == 0 || pout !== expq[0]) begin
      failures++;
      $display("FAIL word: got %h", pout);
    end
    if (expq.size() != 0) void'(expq.pop_front());
  end

  initial begin
    logic [6:0] w;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      w = 7'($urandom);
      expq.push_back(w);
      words++;
      for (int i = 6; i >= 0; i--) begin
        sin = w[i]; in_valid = 1; in_first = (i == 6);
        @(negedge clk);
        in_valid = 0; in_first = 0; sin = 0;
        if (n % 3 == 1 && i == 3) @(negedge clk);   // a gap inside a word
      end
      if (n % 4 == 0) repeat (2) @(negedge clk);     // a gap between words
    end
    repeat (3) @(negedge clk);
    checks++;
    if (pulses != words) begin
      failures++;
      $display("FAIL %0d valid pulses for %0d words", pulses, words);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
