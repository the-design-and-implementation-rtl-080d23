// tb_cumulant_est: feeds windows of random BPSK, QPSK and 8PSK baseband
// symbols (radius 100, random common phase, optional noise) and compares the
// three cumulants with a reference computed here. The reference sums the
// expanded real and imaginary parts of z^2, z^4, z^3*conj(z) and |z|^4 in
// 64-bit integers (for example Re z^4 = a^4 - 6a^2b^2 + b^4). The results must
// match exactly. In addition, the cumulants normalised by N^2 and the signal
// power must lie near the theoretical values (|C40| 2/1/0, |C41| 2/0/0,
// C42 -2/-1/-1). done must come three clocks after the last sample.
module tb_cumulant_est;

  localparam int unsigned N = 2000;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic signed [7:0] zi = '0, zq = '0;
  logic done;
  logic signed [63:0] c40_re, c40_im, c41_re, c41_im, c42;

  int checks = 0, failures = 0;

  cumulant_est #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint s20r, s20i, s21, s40r, s40i, s41r, s41i, s42;

  task automatic window(int m, real phi, int noise, real e40, real e41, real e42);
    longint a, b, a2, b2, nn;
    longint r40r, r40i, r41r, r41i, r42;
    real ang, pw, n40, n41, n42;
    int lat;
    {s20r, s20i, s21, s40r, s40i, s41r, s41i, s42} = '0;
    for (int k = 0; k < int'(N); k++) begin
      ang = phi + 2.0 * PI * real'($urandom_range(m - 1)) / real'(m);
      a = longint'($rtoi($floor(100.0 * $cos(ang) + 0.5))) + longint'($urandom_range(2 * noise)) - longint'(noise);
      b = longint'($rtoi($floor(100.0 * $sin(ang) + 0.5))) + longint'($urandom_range(2 * noise)) - longint'(noise);
      zi = 8'(a); zq = 8'(b); in_valid = 1'b1;
      a2 = a * a; b2 = b * b;
      s20r += a2 - b2;
      s20i += 2 * a * b;
      s21  += a2 + b2;
      s40r += a2 * a2 - 6 * a2 * b2 + b2 * b2;
      s40i += 4 * a * b * (a2 - b2);
      s41r += (a2 - b2) * (a2 + b2);
      s41i += 2 * a * b * (a2 + b2);
      s42  += (a2 + b2) * (a2 + b2);
      @(negedge clk);
    end
    in_valid = 1'b0;
    lat = 0;
    while (!done && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    nn = longint'(N);
    r40r = nn * s40r - 3 * (s20r * s20r - s20i * s20i);
    r40i = nn * s40i - 6 * s20r * s20i;
    r41r = nn * s41r - 3 * s20r * s21;
    r41i = nn * s41i - 3 * s20i * s21;
    r42  = nn * s42 - (s20r * s20r + s20i * s20i) - 2 * s21 * s21;
    checks += 2;
    if (lat != 2) begin
      // lat counts falling edges after the one following the last sample
      failures++;
      $display("FAIL: done after %0d extra cycles", lat);
    end
    if (c40_re != r40r || c40_im != r40i || c41_re != r41r || c41_im != r41i || c42 != r42) begin
      failures++;
      $display("FAIL: M=%0d cumulants differ from the reference", m);
    end
    pw  = real'(s21) / real'(N);
    n40 = $sqrt(real'(c40_re) ** 2 + real'(c40_im) ** 2) / (real'(N) * real'(N) * pw * pw);
    n41 = $sqrt(real'(c41_re) ** 2 + real'(c41_im) ** 2) / (real'(N) * real'(N) * pw * pw);
    n42 = real'(c42) / (real'(N) * real'(N) * pw * pw);
    $display("M=%0d noise=%0d: |C40|=%f |C41|=%f C42=%f", m, noise, n40, n41, n42);
    checks++;
    if ((n40 - e40) ** 2 > 0.04 || (n41 - e41) ** 2 > 0.04 || (n42 - e42) ** 2 > 0.04) begin
      failures++;
      $display("FAIL: M=%0d normalised cumulants far from theory", m);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    window(2, 0.4, 0, 2.0, 2.0, -2.0);
    window(4, 1.3, 0, 1.0, 0.0, -1.0);
    window(8, 0.2, 0, 0.0, 0.0, -1.0);
    window(2, 2.0, 10, 2.0, 2.0, -2.0);
    window(8, 0.9, 10, 0.0, 0.0, -1.0);
    window(4, 0.0, 27, 1.0, 0.0, -1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
