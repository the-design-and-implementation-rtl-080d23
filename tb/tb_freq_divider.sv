// tb_freq_divider: checks the eight carrier copies against a cosine computed
// in the testbench: copy i must be high exactly when cos(2*pi*n/8 + i*pi/4) > 0
// (or at the +pi/2 boundary, which belongs to the high half), where n counts
// carrier steps since start. Also checks the step period DIV, the 50 percent
// duty cycle and that start low holds the carrier at step 0.
module tb_freq_divider;

  localparam int unsigned DIV = 2;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2:0] p;
  logic step_tick;
  logic [7:0] f;

  int checks = 0, failures = 0;

  freq_divider #(.DIV(DIV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_bit(int n, int i);
    // angle in units of 45 degrees, wrapped to [-4, 4)
    int a;
    a = (n + i) % 8;
    if (a >= 4) a -= 8;
    // The cosine is positive for -2 < a < 2; the square wave is high for
    // a = -2..1, so that each half lasts four steps.
    return (a >= -2 && a <= 1);
  endfunction

  initial begin
    int n, ones [8];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    for (int i = 0; i < 8; i++) ones[i] = 0;
    for (int c = 0; c < 8 * DIV * 20; c++) begin
      n = c / DIV;
      checks++;
      if (int'(p) != n % 8) begin
        failures++;
        $display("FAIL: cycle %0d step %0d expected %0d", c, p, n % 8);
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (f[i] != ref_bit(n, i)) begin
          failures++;
          $display("FAIL: cycle %0d f[%0d]=%b", c, i, f[i]);
        end
        if ($cos(2.0 * PI * real'(n) / 8.0 + real'(i) * PI / 4.0) > 0.1) begin
          checks++;
          if (!f[i]) begin
            failures++;
            $display("FAIL: f[%0d] low where the cosine is positive", i);
          end
        end
        ones[i] += int'(f[i]);
      end
      @(negedge clk);
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (ones[i] != 8 * DIV * 20 / 2) begin
        failures++;
        $display("FAIL: duty of f[%0d] is %0d", i, ones[i]);
      end
    end
    start = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (p != 0 || f != 8'b1100_0011) begin
      failures++;
      $display("FAIL: not held at step 0: p=%0d f=%b", p, f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
