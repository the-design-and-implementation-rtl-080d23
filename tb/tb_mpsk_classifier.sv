// tb_mpsk_classifier: feeds cumulant triples and checks the decision against
// a reference that forms the features A1 = |C40|/|C42|, A2 = |C41|/|C42| with
// exact real magnitudes and picks the smallest T = |A1-a1| + |A2-a2| over the
// references [1,1] (BPSK), [1,0] (QPSK), [0,0] (8PSK). Hand-made cases use the
// theoretical cumulants of each kind; random cases spread the features over
// [0, 1.5]^2 at random phases and are checked wherever the best distance
// beats the second best by more than 0.15 (the magnitude approximation may
// decide closer calls either way). The decision must come one clock after
// in_valid.
module tb_mpsk_classifier;
  import mpsk_pkg::*;

  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [63:0] c40_re = '0, c40_im = '0, c41_re = '0, c41_im = '0, c42 = '0;
  logic out_valid;
  mod_t mode;
  logic [65:0] t_bpsk, t_qpsk, t_8psk;

  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  mpsk_classifier dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // a1, a2: features; ph: phases; scale: |C42|
  task automatic apply(real a1, real a2, real ph1, real ph2, real scale, bit must);
    real t [3], best, second;
    int  bi;
    c40_re = longint'(a1 * scale * $cos(ph1));
    c40_im = longint'(a1 * scale * $sin(ph1));
    c41_re = longint'(a2 * scale * $cos(ph2));
    c41_im = longint'(a2 * scale * $sin(ph2));
    c42    = -longint'(scale);
    t[0] = rabs(a1 - 1.0) + rabs(a2 - 1.0);
    t[1] = rabs(a1 - 1.0) + rabs(a2);
    t[2] = rabs(a1) + rabs(a2);
    bi = 0;
    for (int i = 1; i < 3; i++) if (t[i] < t[bi]) bi = i;
    best = t[bi];
    second = 1.0e9;
    for (int i = 0; i < 3; i++) if (i != bi && t[i] < second) second = t[i];
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    if (must || second - best > 0.15) begin
      checks++;
      if (!out_valid || int'(mode) != bi) begin
        failures++;
        $display("FAIL: A=[%f,%f] decided %s, expected %0d", a1, a2, mode.name(), bi);
      end
      seen[bi]++;
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL: out_valid held");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (mode != MOD_QPSK) begin
      failures++;
      $display("FAIL: reset kind is not QPSK");
    end
    // Theoretical cumulants (Table of fourth-order cumulants), E = 1e9.
    apply(1.0, 1.0, 0.3, 1.2, 2.0e12, 1'b1);  // BPSK: C40 = C41 = C42 = -2E^2
    apply(1.0, 0.0, 2.1, 0.0, 1.0e12, 1'b1);  // QPSK: |C40| = |C42| = E^2, C41 = 0
    apply(0.0, 0.0, 0.0, 0.0, 1.0e12, 1'b1);  // 8PSK: C40 = C41 = 0
    apply(0.9, 0.85, 4.0, 5.5, 3.3e14, 1'b1); // noisy BPSK
    apply(0.85, 0.1, 1.0, 3.0, 5.0e13, 1'b1); // noisy QPSK
    apply(0.15, 0.1, 2.0, 1.0, 7.0e15, 1'b1); // noisy 8PSK
    for (int i = 0; i < 2000; i++)
      apply(1.5 * real'($urandom_range(1000)) / 1000.0, 1.5 * real'($urandom_range(1000)) / 1000.0,
            2.0 * PI * real'($urandom_range(1000)) / 1000.0, 2.0 * PI * real'($urandom_range(1000)) / 1000.0,
            1.0e6 * real'($urandom_range(1000000, 1)), 1'b0);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (seen[i] < 10) begin
        failures++;
        $display("FAIL: kind %0d decided only %0d times", i, seen[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
