// tb_bch_decoder: self-checking test of the serial decoder for t = 1, 2, 3.
// Each decoder receives reference codewords (long division by g(x)) with
// random error patterns of weight 0..t, frames back to back and with gaps.
// Checked per frame: the k corrected data bits equal the original data,
// n_corrected equals the number of errors that fell on data bits, and the
// first output bit appears n+2+L clocks after the first input bit (L = 0 for
// t = 1, 2 and t+1 = 4 for t = 3). Frames with t+1 errors are also sent to
// show they still produce a full k-bit frame; their data are not checked.
module tb_bch_decoder;
  import bch_ref_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0, done_cnt = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
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
    localparam int K   = ref_k(g);
    localparam int LAT = 15 + 2 + ((g == 3) ? 4 : 0);
    logic in_bit = 0, in_valid = 0, in_first = 0;
    logic out_bit, out_valid, out_first;
    logic [3:0] n_corrected;

    typedef struct { int data; int ncorr; int start; bit check; } frame_t;
    frame_t q[$];

    bch_decoder #(.T(g)) dut (.clk, .rst, .in_bit, .in_valid, .in_first,
                              .out_bit, .out_valid, .out_first, .n_corrected);

    // driver
    initial begin
      frame_t f;
      int cw, e, w;
      @(negedge clk);
      while (rst) @(negedge clk);
      for (int n = 0; n < 3000; n++) begin
        f.data = int'($urandom % (1 << K));
        w      = (n % 50 == 49) ? g + 1 : int'($urandom % (g + 1));
        e      = rand_err(w);
        f.check = (w <= g);
        f.ncorr = popcount15(e >> (15 - K));
        f.start = cyc;
        q.push_back(f);
        cw = ref_encode(g, f.data) ^ e;
        for (int i = 14; i >= 0; i--) begin
          in_bit = cw[i]; in_valid = 1; in_first = (i == 14);
          @(negedge clk);
        end
        in_valid = 0; in_first = 0; in_bit = 0;
        if (n % 4 == 3) repeat ($urandom % 20) @(negedge clk);
      end
      repeat (60) @(negedge clk);
      checks++;
      if (q.size() != 0) begin failures++; $display("FAIL t=%0d %0d frames lost", g, q.size()); end
      done_cnt++;
    end

    // collector
    int got, nbits;
    always @(negedge clk) if (!rst && out_valid) begin
      if (out_first) begin
        got = 0;
        nbits = 0;
        checks++;
        if (q.size() == 0 || cyc - q[0].start != LAT) begin
          failures++;
          $display("FAIL t=%0d latency %0d", g, (q.size() == 0) ? -1 : cyc - q[0].start);
        end
      end
      got = (got << 1) | int'(out_bit);
      nbits++;
      if (nbits == K && q.size() != 0) begin
        if (q[0].check) begin
          checks += 2;
          if (got != q[0].data) begin
            failures++;
            $display("FAIL t=%0d data %h decoded %h", g, q[0].data, got);
          end
          if (int'(n_corrected) != q[0].ncorr) begin
            failures++;
            $display("FAIL t=%0d corrected %0d expected %0d", g, n_corrected, q[0].ncorr);
          end
        end
        void'(q.pop_front());
      end
    end
  end

  initial begin
    wait (done_cnt == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
