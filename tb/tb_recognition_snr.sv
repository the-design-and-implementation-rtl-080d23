// tb_recognition_snr: recognition rate of the modulation recogniser against
// the signal-to-noise ratio, for single BPSK, QPSK and 8PSK signals at two
// carrier/symbol settings: carrier 0.4 of the sample rate with 25 samples per
// symbol, and carrier 0.48 with 20 samples per symbol. Each decision uses one
// 2000-sample window. Noise is white Gaussian (Box-Muller from $urandom),
// SNR = (A^2/2) / sigma^2 over the full band. At every SNR point (-5, 0, 5,
// 10 and 20 dB) WINS windows of each kind are sent, one window of settling
// after each kind change is not scored, and the fraction recognised correctly
// is printed. Checks: without noise and at 10 dB and above every kind must be
// recognised in at least 80 percent of the windows. (A window holds only 80 to
// 100 symbols, so the random mean of z^2 alone spreads the QPSK feature A2 by
// about 0.2 even without noise; a few QPSK windows fall on the BPSK side.)
module tb_recognition_snr;
  import mpsk_pkg::*;

  localparam int unsigned N    = 2000;
  localparam int          WINS = 20;
  localparam real PI  = 3.14159265358979;
  localparam real AMP = 700.0;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic [15:0] fcw = '0;
  logic signed [11:0] in_x = '0;
  logic rec_valid;
  mod_t mode;
  logic signed [63:0] c40_re, c40_im, c41_re, c41_im, c42;
  logic [65:0] t_bpsk, t_qpsk, t_8psk;

  int checks = 0, failures = 0;

  signal_recognizer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int m_of(mod_t m);
    return (m == MOD_BPSK) ? 2 : (m == MOD_QPSK) ? 4 : 8;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1000000, 1))) / 1000001.0;
    u2 = (real'($urandom_range(1000000, 0))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  // Sends one window, returns the decision taken on it.
  task automatic window(mod_t m, real fc, int sps, real sigma, output mod_t got);
    int sym;
    real v;
    longint n0;
    sym = 0;
    for (int i = 0; i < int'(N); i++) begin
      if (i % sps == 0) sym = int'($urandom_range(m_of(m) - 1));
      v = AMP * $cos(2.0 * PI * fc * real'(i) + 2.0 * PI * real'(sym) / real'(m_of(m)) + 0.3);
      if (sigma > 0.0) v += sigma * gauss();
      if (v > 2047.0) v = 2047.0;
      if (v < -2048.0) v = -2048.0;
      @(negedge clk);
      in_valid = 1'b1;
      in_x = 12'($rtoi(v));
    end
    // The estimator counts filter outputs, which follow the input samples
    // one for one, so the window closes with its own last sample.
    @(negedge clk);
    in_valid = 1'b0;
    got = mode;
  endtask

  real snrs [5] = '{-5.0, 0.0, 5.0, 10.0, 20.0};
  real fcs  [2] = '{0.40, 0.48};
  int  spss [2] = '{25, 20};
  mod_t kinds [3] = '{MOD_BPSK, MOD_QPSK, MOD_8PSK};

  initial begin
    mod_t got;
    real sigma, rate;
    int ok;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (fcs[ci]) begin
      fcw = 16'($rtoi(fcs[ci] * 65536.0 + 0.5));
      $display("carrier %0.2f, %0d samples per symbol", fcs[ci], spss[ci]);
      for (int si = -1; si < 5; si++) begin
        sigma = (si < 0) ? 0.0 : AMP / $sqrt(2.0 * (10.0 ** (snrs[si] / 10.0)));
        foreach (kinds[ki]) begin
          ok = 0;
          for (int w = 0; w < WINS; w++) begin
            // Restart the window and the oscillator, then send one window
            // plus the samples that fill the pipeline.
            @(negedge clk);
            clear = 1'b1;
            in_valid = 1'b0;
            @(negedge clk);
            clear = 1'b0;
            fork
              window(kinds[ki], fcs[ci], spss[ci], sigma, got);
              begin
                @(posedge rec_valid);
              end
            join
            // wait for the decision of this window
            @(negedge clk);
            ok += int'(mode == kinds[ki]);
            if ($test$plusargs("verbose"))
              $display("    A1=%f A2=%f -> %s",
                $sqrt(real'(c40_re) ** 2 + real'(c40_im) ** 2) / (-real'(c42)),
                $sqrt(real'(c41_re) ** 2 + real'(c41_im) ** 2) / (-real'(c42)), mode.name());
          end
          rate = real'(ok) / real'(WINS);
          if (si < 0) $display("  noiseless %s: %0d/%0d", kinds[ki].name(), ok, WINS);
          else        $display("  SNR %5.1f dB %s: %0d/%0d", snrs[si], kinds[ki].name(), ok, WINS);
          if (si < 0 || snrs[si] >= 10.0) begin
            checks++;
            if (rate < 0.8) begin
              failures++;
              $display("FAIL: rate %f", rate);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
