// tb_signal_recognizer: end-to-end check of the modulation recogniser.
//
// Real passband MPSK signals are generated here with the real-number cosine:
// s[n] = A*cos(2*pi*fc*n + phi0 + 2*pi*k[n]/M) (+ optional uniform noise), with
// rectangular symbols of SPS samples and random symbols k. Each kind (BPSK,
// QPSK, 8PSK, then again in another order) is sent for three recogniser
// windows; the decision at the end of the second and third windows (which hold
// only that kind) must name it. The cumulant signs are checked against the
// theory too: C42 must be negative for every kind.
// One decision must arrive every N samples (rate check).
module tb_signal_recognizer;
  import mpsk_pkg::*;

  localparam int unsigned N   = 2000;
  localparam int unsigned SPS = 20;
  localparam real         FC  = 0.25;
  localparam real         PI  = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic signed [11:0] in_x = '0;
  logic rec_valid;
  mod_t mode;
  logic signed [63:0] c40_re, c40_im, c41_re, c41_im, c42;
  logic [65:0] t_bpsk, t_qpsk, t_8psk;

  int checks = 0, failures = 0;

  signal_recognizer #(.N(N)) dut (
    .clk, .rst_n, .clear, .fcw(16'(int'(FC * 65536.0))), .in_valid, .in_x,
    .rec_valid, .mode, .c40_re, .c40_im, .c41_re, .c41_im, .c42,
    .t_bpsk, .t_qpsk, .t_8psk
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Decision log.
  bit   verbose = 1'b0;
  int   ndec = 0;
  mod_t dec [64];
  longint dec_cycle [64];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && rec_valid) begin
    dec[ndec] = mode;
    dec_cycle[ndec] = cyc;
    if (c42 >= 0) begin
      failures++;
      $display("FAIL: C42 not negative in decision %0d", ndec);
    end
    if (verbose) $display("dec %0d @%0d: %s c40=(%0d,%0d) c41=(%0d,%0d) c42=%0d", ndec, cyc, mode.name(), c40_re, c40_im, c41_re, c41_im, c42);
    checks++;
    ndec++;
  end

  function automatic int m_of(mod_t m);
    return (m == MOD_BPSK) ? 2 : (m == MOD_QPSK) ? 4 : 8;
  endfunction

  longint n = 0;
  int     sym = 0;
  real    phi0 = 0.7;

  task automatic send(mod_t m, int nsamp, real noise_amp);
    real v;
    for (int i = 0; i < nsamp; i++) begin
      if (n % longint'(SPS) == 0) sym = int'($urandom_range(m_of(m) - 1));
      v = 1000.0 * $cos(2.0 * PI * FC * real'(n) + phi0 + 2.0 * PI * real'(sym) / real'(m_of(m)));
      if (noise_amp > 0.0)
        v += noise_amp * (real'($urandom_range(2000)) / 1000.0 - 1.0);
      @(negedge clk);
      in_valid = 1'b1;
      in_x     = 12'($rtoi(v));
      n++;
    end
  endtask

  mod_t order [6] = '{MOD_BPSK, MOD_QPSK, MOD_8PSK, MOD_QPSK, MOD_BPSK, MOD_8PSK};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    verbose = $test$plusargs("verbose");
    for (int s = 0; s < 6; s++) send(order[s], 3 * N, (s >= 3) ? 150.0 : 0.0);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (20) @(posedge clk);
    // 18 windows -> 17 complete decisions before the pipeline flushes
    checks++;
    if (ndec < 17) begin
      failures++;
      $display("FAIL: only %0d decisions", ndec);
    end
    for (int s = 0; s < 6; s++) begin
      for (int w = 1; w < 3; w++) begin
        int d;
        d = 3 * s + w;
        if (d < ndec) begin
          checks++;
          if (dec[d] != order[s]) begin
            failures++;
            $display("FAIL: segment %0d window %0d: decided %s, sent %s", s, w, dec[d].name(), order[s].name());
          end
        end
      end
    end
    for (int d = 1; d < ndec; d++) begin
      checks++;
      if (dec_cycle[d] - dec_cycle[d-1] != longint'(N)) begin
        failures++;
        $display("FAIL: decisions %0d and %0d are %0d cycles apart", d - 1, d, dec_cycle[d] - dec_cycle[d-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
