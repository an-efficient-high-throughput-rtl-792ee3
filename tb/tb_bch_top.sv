// tb_bch_top: end-to-end test of the three-channel BCH module at its default
// configuration: BCH(15,11) single-, BCH(15,7) double- and BCH(15,5)
// triple-error correction running at the same time.
// Every channel gets random words with random error patterns of weight
// 0..t, partly one word at a time and partly back to back (a new word every
// 15 clocks, so syndrome computation of one word overlaps the key equation
// and Chien search of the previous one). Checked for every word: the decoded
// word equals the sent one, the number of corrected data bits, and the
// start-to-output latency (29, 25 and 27 clocks).
// Mechanisms counted, each of which must occur at least once: error-free
// words, words with exactly 1, 2 and 3 corrected bits on the channel that
// allows them, errors that hit only parity bits, back-to-back words, and
// both outcomes of the Berlekamp-Massey discrepancy test (d_r = 0 keeps
// beta, d_r != 0 swaps in lambda).
module tb_bch_top;
  import bch_ref_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0, cyc = 0, done_cnt = 0;

  logic sec_start, dec_start, tec_start;
  logic sec_ready, dec_ready, tec_ready;
  logic [10:0] sec_din, sec_dout;
  logic [6:0]  dec_din, dec_dout;
  logic [4:0]  tec_din, tec_dout;
  logic [14:0] sec_err, dec_err, tec_err;
  logic sec_dout_valid, dec_dout_valid, tec_dout_valid;
  logic [3:0] sec_n_corrected, dec_n_corrected, tec_n_corrected;

  // mechanism counters
  int m_clean = 0, m_parity_only = 0, m_b2b = 0, m_bma_zero = 0, m_bma_swap = 0;
  int m_corr[4] = '{0, 0, 0, 0};

  bch_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
  end

  always @(posedge clk) if (!rst && dut.u_tec.u_dec.g_bma.bma_busy) begin
    if (dut.u_tec.u_dec.g_bma.u_kes.dr == '0) m_bma_zero++;
    else                                       m_bma_swap++;
  end

  // one generic driver/checker per channel, bound to the channel's ports
  for (genvar g = 1; g <= 3; g++) begin : ch
    localparam int K   = ref_k(g);
    localparam int LAT = 15 + 3 + K + ((g == 3) ? 4 : 0);
    typedef struct { int data; int ncorr; int t0; } word_t;
    word_t q[$];
    logic start = 0, ready, dout_valid;
    logic [K-1:0] din = '0, dout;
    logic [14:0] err = '0;
    logic [3:0] ncor;
    int last_out = -1;

    if (g == 1) begin : w
      assign sec_start = start; assign sec_din = din; assign sec_err = err;
      assign ready = sec_ready; assign dout = sec_dout; assign dout_valid = sec_dout_valid;
      assign ncor = sec_n_corrected;
    end else if (g == 2) begin : w
      assign dec_start = start; assign dec_din = din; assign dec_err = err;
      assign ready = dec_ready; assign dout = dec_dout; assign dout_valid = dec_dout_valid;
      assign ncor = dec_n_corrected;
    end else begin : w
      assign tec_start = start; assign tec_din = din; assign tec_err = err;
      assign ready = tec_ready; assign dout = tec_dout; assign dout_valid = tec_dout_valid;
      assign ncor = tec_n_corrected;
    end

    always @(posedge clk) if (!rst && start && ready)
      q.push_back('{int'(din), popcount15(int'(err) >> (15 - K)), cyc});

    always @(negedge clk) if (!rst && dout_valid) begin
      checks += 3;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL t=%0d unexpected word", g);
      end else begin
        if (int'(dout) != q[0].data) begin
          failures++;
          $display("FAIL t=%0d word %h decoded %h", g, q[0].data, dout);
        end
        if (int'(ncor) != q[0].ncorr) begin
          failures++;
          $display("FAIL t=%0d corrected %0d expected %0d", g, ncor, q[0].ncorr);
        end
        if (cyc - q[0].t0 != LAT) begin
          failures++;
          $display("FAIL t=%0d latency %0d expected %0d", g, cyc - q[0].t0, LAT);
        end
        m_corr[ncor > 3 ? 0 : ncor]++;
        void'(q.pop_front());
      end
      if (last_out >= 0 && cyc - last_out == 15) m_b2b++;
      last_out = cyc;
    end

    initial begin
      int e;
      @(negedge clk);
      while (rst) @(negedge clk);
      for (int n = 0; n < 2000; n++) begin
        din = K'($urandom);
        e = rand_err(int'($urandom % (g + 1)));
        if (e == 0) m_clean++;
        else if ((e >> (15 - K)) == 0) m_parity_only++;
        err = 15'(e);
        while (!ready) @(negedge clk);   // ready again in the last clock of a word
        start = 1;
        @(negedge clk);                  // taken at this clock edge
        start = 0;
        if (n % 100 >= 90)               // now and then, one word at a time
          repeat (LAT + 5) @(negedge clk);
      end
      repeat (LAT + 20) @(negedge clk);
      checks++;
      if (q.size() != 0) begin failures++; $display("FAIL t=%0d %0d words lost", g, q.size()); end
      done_cnt++;
    end
  end

  task automatic need(input string what, input int n);
    $display("  %-40s %0d", what, n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    wait (done_cnt == 3);
    $display("mechanisms:");
    need("error-free words", m_clean);
    need("words with 1 corrected data bit", m_corr[1]);
    need("words with 2 corrected data bits", m_corr[2]);
    need("words with 3 corrected data bits", m_corr[3]);
    need("errors on parity bits only", m_parity_only);
    need("back-to-back words", m_b2b);
    need("BMA iterations with d_r = 0", m_bma_zero);
    need("BMA iterations with d_r != 0", m_bma_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
