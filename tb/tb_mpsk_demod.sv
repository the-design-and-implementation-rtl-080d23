// tb_mpsk_demod: a modulator model in the testbench draws random source bits,
// groups them by a random kind per symbol, optionally encodes them
// differentially, and produces the square-carrier signal y (one clock behind
// the carrier copies f, as the selector does), flipping one sample in some
// symbols to imitate disturbances. The demodulator must return every
// symbol's received phase index (yy), the decoded symbol (yyy) and its kind,
// and the serial output must repeat the source bits in order, one every
// BIT_CLKS clocks within a symbol.
module tb_mpsk_demod;
  import mpsk_pkg::*;

  localparam int unsigned BIT_CLKS = 4;

  logic clk = 1'b0, rst_n = 1'b0, diff_en = 1'b1;
  logic [7:0] f = '0;
  logic y = 1'b0, sym_start = 1'b0;
  mod_t sym_mode = MOD_QPSK;
  logic out_valid, bit_valid, bit_out;
  logic [2:0] yy, yyy;
  mod_t out_mode;

  int checks = 0, failures = 0;

  mpsk_demod #(.BIT_CLKS(BIT_CLKS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] carrier(int n);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = (((n + i) % 8) >= 6) || (((n + i) % 8) <= 1);
    return r;
  endfunction

  // expected results
  int   exp_idx [$], exp_sym [$], exp_k [$];
  bit   exp_bits [$];
  bit   eb;
  int   nsym_dec = 0, nbits = 0, last_bit = -1, cyc = 0;

  always @(negedge clk) begin
    cyc++;
    if (out_valid) begin
      int ei, es, ek;
      ei = exp_idx.pop_front();
      es = exp_sym.pop_front();
      ek = exp_k.pop_front();
      checks++;
      if (int'(yy) != ei || int'(yyy) != es || int'(bits_per_sym(out_mode)) != ek) begin
        failures++;
        $display("FAIL @%0d: yy=%0d yyy=%0d k=%0d, expected %0d %0d %0d", cyc, yy, yyy, bits_per_sym(out_mode), ei, es, ek);
      end
      nsym_dec++;
    end
    if (bit_valid) begin
      checks++;
      eb = exp_bits.pop_front();
      if ($test$plusargs("verbose")) $display("@%0d bit %0d got %b exp %b", cyc, nbits, bit_out, eb);
      if (bit_out != eb) begin
        failures++;
        $display("FAIL @%0d: serial bit %0d wrong (got %b, mode %s yyy %0d)", cyc, nbits, bit_out, out_mode.name(), yyy);
      end
      if (last_bit >= 0 && !out_valid && cyc - last_bit != BIT_CLKS) begin
        // bits of one symbol are BIT_CLKS apart
        if (cyc - last_bit < int'(BIT_CLKS)) begin
          failures++;
          $display("FAIL @%0d: serial bits %0d clocks apart", cyc, cyc - last_bit);
        end
      end
      last_bit = cyc;
      nbits++;
    end
  end

  initial begin
    int n, k, m, d, idx, prev, st, len, flip;
    mod_t md;
    logic [7:0] f_prev;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    n = 0;
    prev = 0;
    f_prev = carrier(0);
    for (int s = 0; s < 400; s++) begin
      md = mod_t'($urandom_range(2));
      k = int'(bits_per_sym(md));
      m = 1 << k;
      d = int'($urandom_range(m - 1));
      for (int b = k - 1; b >= 0; b--) exp_bits.push_back(1'((d >> b) & 1));
      if ($test$plusargs("verbose")) $display("sym %0d k=%0d d=%0d", s, k, d);
      idx = (s < 200) ? (prev + d) % m : d;
      prev = idx;
      exp_idx.push_back(idx);
      exp_sym.push_back(d);
      exp_k.push_back(k);
      st = idx * (8 / m);
      len = k * int'(BIT_CLKS);
      flip = ($urandom_range(1) == 1) ? int'($urandom_range(len - 1)) : -1;
      for (int c = 0; c < len; c++) begin
        @(posedge clk);
        #1;
        f_prev = f;
        f = carrier(n);
        y = f_prev[st] ^ (c == flip);
        sym_start = (c == 0);
        // Differential decoding is switched off after the decision of
        // symbol 199 (made on the first clock of symbol 200).
        if (s == 200 && c == 1) diff_en = 1'b0;
        sym_mode = md;
        n++;
      end
    end
    @(posedge clk);
    #1;
    sym_start = 1'b1;
    @(posedge clk);
    #1;
    sym_start = 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (nsym_dec != 400) begin
      failures++;
      $display("FAIL: %0d symbols decided", nsym_dec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
