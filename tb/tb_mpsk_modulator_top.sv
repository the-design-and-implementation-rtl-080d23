// tb_mpsk_modulator_top: end-to-end run of the recognising MPSK modulator at
// its default parameters (four clocks per bit, 2000-sample recognition
// windows).
//
// The recogniser input gets passband BPSK, QPSK and 8PSK signals (generated
// here with $cos, carrier 0.25 of the sample rate, 20 samples per symbol, some
// with noise), three windows of each, so that the recognised kind changes
// several times. At the same time random source bits enter on x. A reference
// model in this testbench groups the bits by the kind the recogniser shows
// when a symbol's first bit is taken, encodes them differentially, and checks
// every clock that y is its own eight-step square carrier shifted by the
// symbol's phase, four clocks after the symbol's last bit. The loop-back
// demodulator must return the source bits in order. The run is made twice,
// with differential encoding on and off (a reset between the two).
//
// Mechanisms counted (each must occur): recognised BPSK, QPSK and 8PSK
// decisions, kind changes taking effect at a symbol boundary, modulated
// symbols of each kind, runs with and without differential encoding.
module tb_mpsk_modulator_top;
  import mpsk_pkg::*;

  localparam real PI  = 3.14159265358979;
  localparam real FC  = 0.25;
  localparam int  SPS = 20;
  localparam int  WIN = 2000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, diff_en = 1'b1;
  logic rec_clear = 1'b0, rx_valid = 1'b0, x = 1'b0;
  logic [15:0] fcw = 16'(int'(FC * 65536.0));
  logic signed [11:0] rx_x = '0;
  logic rec_valid, bit_tick, sym_valid, y;
  logic dem_valid, dem_bit_valid, dem_bit;
  mod_t mode, sym_mode, dem_mode;
  logic [2:0] xx, yy, dem_yy, dem_yyy;
  logic [7:0] f;
  logic [1:0] q;

  int checks = 0, failures = 0;

  mpsk_modulator_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_dec [3] = '{0, 0, 0};
  int n_sym [3] = '{0, 0, 0};
  int n_kind_change = 0, n_run_diff = 0, n_run_plain = 0;

  // ---------------- recogniser stimulus and check ----------------
  mod_t sent_kind;
  int   sent_win = 0;     // index of the window now being sent
  mod_t win_kind [64];
  int   ndec = 0;

  function automatic int m_of(mod_t m);
    return (m == MOD_BPSK) ? 2 : (m == MOD_QPSK) ? 4 : 8;
  endfunction

  // ---------------- modulation reference ----------------
  int   cyc = 0, c_start = 0;
  int   nb = 0, kk = 0, dsym = 0, prev_idx = 0;
  mod_t smode = MOD_QPSK, last_mode = MOD_QPSK;
  bit   after_tick = 0;
  int   pend_step [$], pend_at [$];
  int   cur_step = -1;
  bit   src_bits [$];
  int   n_y_checked = 0, n_dem_bits = 0;
  bit   run_on = 0;

  function automatic bit carrier_bit(int n, int i);
    int a;
    a = (n + i) % 8;
    return (a >= 6) || (a <= 1);
  endfunction

  always @(negedge clk) begin
    cyc++;
    if (run_on) begin
      // Modulated output: new phase from four clocks after the last bit.
      if (pend_at.size() > 0 && pend_at[0] == cyc) begin
        cur_step = pend_step.pop_front();
        void'(pend_at.pop_front());
      end
      if (cur_step >= 0) begin
        checks++;
        n_y_checked++;
        if (y != carrier_bit(cyc - 1 - c_start, cur_step)) begin
          failures++;
          if (failures < 10) $display("FAIL @%0d: y=%b, expected carrier copy %0d", cyc, y, cur_step);
        end
      end
      // Source bits.
      if (bit_tick) begin
        if (nb == 0) begin
          smode = mode;
          kk = int'(bits_per_sym(mode));
          dsym = 0;
          if (smode != last_mode) n_kind_change++;
          last_mode = smode;
        end
        dsym = (dsym << 1) | int'(x);
        src_bits.push_back(x);
        nb++;
        if (nb == kk) begin
          int idx;
          idx = diff_en ? (prev_idx + dsym) % m_of(smode) : dsym;
          prev_idx = idx;
          pend_step.push_back(idx * (8 / m_of(smode)));
          pend_at.push_back(cyc + 4);
          n_sym[int'(smode)]++;
          nb = 0;
        end
      end
      if (after_tick) x = 1'($urandom);
      after_tick = bit_tick;
      // Demodulated bits.
      if (dem_bit_valid) begin
        checks++;
        n_dem_bits++;
        if (src_bits.size() == 0 || dem_bit != src_bits.pop_front()) begin
          failures++;
          if (failures < 10) $display("FAIL @%0d: demodulated bit %0d wrong", cyc, n_dem_bits);
        end
      end
      // Recogniser decisions.
      if (rec_valid) begin
        n_dec[int'(mode)]++;
        // The decision covers window ndec; windows after the first of a
        // segment hold only one kind.
        if (ndec > 0 && win_kind[ndec] == win_kind[ndec - 1]) begin
          checks++;
          if (mode != win_kind[ndec]) begin
            failures++;
            $display("FAIL: window %0d recognised as %s, sent %s", ndec, mode.name(), win_kind[ndec].name());
          end
        end
        ndec++;
      end
    end
  end

  task automatic send_kind(mod_t m, int windows, real noise);
    int sym;
    real v;
    sym = 0;
    for (int w = 0; w < windows; w++) begin
      win_kind[sent_win] = m;
      for (int i = 0; i < WIN; i++) begin
        int n;
        n = sent_win * WIN + i;
        if (n % SPS == 0) sym = int'($urandom_range(m_of(m) - 1));
        v = 1000.0 * $cos(2.0 * PI * FC * real'(n) + 0.4 + 2.0 * PI * real'(sym) / real'(m_of(m)));
        if (noise > 0.0) v += noise * (real'($urandom_range(2000)) / 1000.0 - 1.0);
        rx_valid = 1'b1;
        rx_x = 12'($rtoi(v));
        @(negedge clk);
      end
      sent_win++;
    end
  endtask

  task automatic run(bit de, mod_t kinds [], real noise);
    rst_n = 1'b0;
    start = 1'b0;
    diff_en = de;
    rx_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Clear the per-run reference.
    nb = 0; prev_idx = 0; cur_step = -1; last_mode = MOD_QPSK;
    pend_step.delete(); pend_at.delete(); src_bits.delete();
    sent_win = 0; ndec = 0; after_tick = 0; x = 1'b0;
    // Raise start between a rising and a falling edge: the carrier step is 0
    // at the next falling edge and counts up by one per clock from there.
    @(posedge clk);
    #1;
    start = 1'b1;
    c_start = cyc + 1;
    run_on = 1'b1;
    foreach (kinds[i]) send_kind(kinds[i], 3, (i % 2 == 1) ? noise : 0.0);
    rx_valid = 1'b0;
    repeat (40) @(negedge clk);
    run_on = 1'b0;
    checks++;
    if (ndec < 3 * kinds.size() - 1) begin
      failures++;
      $display("FAIL: only %0d recogniser decisions", ndec);
    end
    // All but the last (undecided) symbol's bits, and at most the bits still
    // queued, come back.
    checks++;
    if (src_bits.size() > 12) begin
      failures++;
      $display("FAIL: %0d source bits never demodulated", src_bits.size());
    end
    $display("run diff_en=%0b: %0d decisions, %0d y samples checked, %0d bits demodulated",
             de, ndec, n_y_checked, n_dem_bits);
    if (de) n_run_diff++; else n_run_plain++;
  endtask

  mod_t k1 [] = '{MOD_BPSK, MOD_QPSK, MOD_8PSK, MOD_QPSK, MOD_BPSK, MOD_8PSK};
  mod_t k2 [] = '{MOD_8PSK, MOD_BPSK, MOD_QPSK};

  initial begin
    run(1'b1, k1, 150.0);
    run(1'b0, k2, 100.0);
    // Mechanisms.
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (n_dec[i] == 0) begin
        failures++;
        $display("FAIL: kind %0d never recognised", i);
      end
      if (n_sym[i] == 0) begin
        failures++;
        $display("FAIL: no symbol of kind %0d modulated", i);
      end
    end
    checks += 3;
    if (n_kind_change < 4) begin failures++; $display("FAIL: only %0d kind changes", n_kind_change); end
    if (n_run_diff == 0)   begin failures++; $display("FAIL: no differential run"); end
    if (n_run_plain == 0)  begin failures++; $display("FAIL: no plain run"); end
    $display("decisions B/Q/8 = %0d/%0d/%0d, symbols B/Q/8 = %0d/%0d/%0d, kind changes %0d",
             n_dec[0], n_dec[1], n_dec[2], n_sym[0], n_sym[1], n_sym[2], n_kind_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
