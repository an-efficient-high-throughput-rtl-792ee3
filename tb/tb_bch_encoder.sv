// tb_bch_encoder: self-checking test of the LFSR encoder for t = 1, 2, 3.
// Every data word of each code is encoded, frames running back to back; the
// serial codeword is compared with long division by g(x), its syndromes
// S_1 .. S_2t are checked to be zero, and each frame must take n = 15 clocks.
module tb_bch_encoder;
  import bch_ref_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  int done_cnt = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
  end

  for (genvar g = 1; g <= 3; g++) begin : ch
    localparam int K = ref_k(g);
    logic start = 0, ready, d_in, data_phase, c_out, c_valid, c_first;
    logic [K-1:0] data = '0, cur = '0;
    int pos = 0;

    bch_encoder #(.T(g)) dut (.clk, .rst, .start, .ready, .d_in, .data_phase,
                              .c_out, .c_valid, .c_first);

    // stands in for the encoder register: serves the word MSB first
    always @(posedge clk)
      if (start && ready) begin cur <= data; pos <= 0; end
      else if (data_phase) pos <= pos + 1;
    assign d_in = (pos < K) ? cur[K-1-pos] : 1'b0;

    initial begin
      int cw, exp_cw;
      @(negedge clk);
      while (rst) @(negedge clk);
      data = '0;
      start = 1;
      @(negedge clk);
      start = 0;
      for (int d = 0; d < (1 << K); d++) begin
        cw = 0;
        for (int c = 0; c < 15; c++) begin
          checks++;
          if (!c_valid || (c_first != (c == 0)) || (data_phase != (c < K))) begin
            failures++;
            $display("FAIL t=%0d framing at clock %0d", g, c);
          end
          cw = cw | (int'(c_out) << (14 - c));
          if (c == 14 && d != (1 << K) - 1) begin   // next frame back to back
            data = K'(d + 1);
            start = 1;
            checks++;
            if (!ready) begin failures++; $display("FAIL t=%0d not ready", g); end
          end else if (c < 14) begin
            checks++;
            if (ready) begin failures++; $display("FAIL t=%0d ready mid-frame", g); end
          end
          @(negedge clk);
          start = 0;
        end
        exp_cw = ref_encode(g, d);
        checks++;
        if (cw != exp_cw) begin
          failures++;
          $display("FAIL t=%0d data %h: codeword %h expected %h", g, d, cw, exp_cw);
        end
        for (int j = 1; j <= 2 * g; j++) begin
          checks++;
          if (ref_syn(cw, j) != 0) begin
            failures++;
            $display("FAIL t=%0d codeword %h has S%0d != 0", g, cw, j);
          end
        end
      end
      checks++;
      if (c_valid || !ready) begin failures++; $display("FAIL t=%0d not idle after last frame", g); end
      done_cnt++;
    end
  end

  initial begin
    wait (done_cnt == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
