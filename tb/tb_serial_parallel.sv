// tb_serial_parallel: random source bits and random kind changes into the
// serial-to-parallel converter. A reference in the testbench samples the bit
// on every bit_tick, groups 1/2/3 bits by the kind present at a symbol's first
// bit and predicts each symbol, its kind, and the even/odd (I/Q) split. It also
// checks that bit_tick comes every BIT_CLKS clocks and that start low holds
// the converter. All monitoring happens on the falling edge.
module tb_serial_parallel;
  import mpsk_pkg::*;

  localparam int unsigned BIT_CLKS = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, x = 1'b0;
  mod_t mode = MOD_QPSK;
  logic [1:0] q;
  logic bit_tick, sym_valid, i_bit, q_bit;
  logic [1:0] en;
  logic [2:0] sym;
  mod_t sym_mode;

  int checks = 0, failures = 0;

  serial_parallel #(.BIT_CLKS(BIT_CLKS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int k_of(mod_t m);
    return (m == MOD_BPSK) ? 1 : (m == MOD_QPSK) ? 2 : 3;
  endfunction

  // Reference model.
  int   nb = 0, kk = 0, last_tick = -1, cyc = 0, nsym = 0;
  logic [2:0] acc = '0;
  bit   exp_valid = 0, after_tick = 0;
  logic [2:0] exp_sym;
  mod_t exp_mode;
  logic exp_i = 0, exp_q = 0;
  int   nsym_k [3] = '{0, 0, 0};

  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      // Output of the previous grouping.
      if (exp_valid) begin
        checks++;
        if (!sym_valid || sym != exp_sym || sym_mode != exp_mode) begin
          failures++;
          $display("FAIL @%0d: sym_valid=%b sym=%0d mode=%s, expected %0d %s", cyc, sym_valid, sym, sym_mode.name(), exp_sym, exp_mode.name());
        end
        if (exp_mode == MOD_QPSK) begin
          checks++;
          if (i_bit != exp_i || q_bit != exp_q) begin
            failures++;
            $display("FAIL @%0d: I/Q %b%b expected %b%b", cyc, i_bit, q_bit, exp_i, exp_q);
          end
        end
      end else if (sym_valid) begin
        checks++;
        failures++;
        $display("FAIL @%0d: unexpected sym_valid", cyc);
      end
      exp_valid = 0;
      if (bit_tick) begin
        if (!start) begin
          failures++;
          $display("FAIL @%0d: bit_tick while start low", cyc);
        end
        if (last_tick >= 0) begin
          checks++;
          if (cyc - last_tick != BIT_CLKS) begin
            failures++;
            $display("FAIL @%0d: bit period %0d", cyc, cyc - last_tick);
          end
        end
        last_tick = cyc;
        if (nb == 0) begin
          kk = k_of(mode);
          exp_mode = mode;
          acc = '0;
        end
        if (nb % 2 == 0) exp_i = x; else exp_q = x;
        acc = {acc[1:0], x};
        nb++;
        if (nb == kk) begin
          exp_valid = 1;
          exp_sym = acc;
          nb = 0;
          nsym++;
          nsym_k[kk-1]++;
        end
      end
      // New source bit and sometimes a new kind on the cycle after a tick.
      if (after_tick) begin
        x = 1'($urandom);
        if ($urandom_range(9) == 0) mode = mod_t'($urandom_range(2));
      end
      after_tick = bit_tick;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    repeat (2000) @(negedge clk);
    // Pause: start low holds the converter and restarts the symbol.
    @(negedge clk);
    wait (bit_tick == 1'b0 && nb == 0);
    start = 1'b0;
    last_tick = -1;
    repeat (30) @(negedge clk);
    checks++;
    if (q != 0 || en != 0) begin
      failures++;
      $display("FAIL: counters not held while start low");
    end
    start = 1'b1;
    repeat (2000) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (nsym_k[i] < 20) begin
        failures++;
        $display("FAIL: only %0d symbols of %0d bits", nsym_k[i], i + 1);
      end
    end
    $display("symbols: %0d (1-bit %0d, 2-bit %0d, 3-bit %0d)", nsym, nsym_k[0], nsym_k[1], nsym_k[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
