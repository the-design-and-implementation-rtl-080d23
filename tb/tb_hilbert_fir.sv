// tb_hilbert_fir: feeds cosines of several frequencies and checks that the
// filter returns the analytic signal: out_i must equal the input delayed by
// (NTAPS-1)/2 + 1 samples exactly, and out_q must match the sine of the same
// delayed angle (computed here with $sin) within 1.5 percent of the amplitude
// once the filter has filled. Also checks out_valid follows in_valid and
// that a gap in in_valid freezes the filter.
module tb_hilbert_fir;

  localparam int unsigned NTAPS = 31;
  localparam int unsigned D     = (NTAPS - 1) / 2 + 1;
  localparam real PI = 3.14159265358979;
  localparam real AMP = 1000.0;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic signed [11:0] in_x = '0;
  logic out_valid;
  logic signed [13:0] out_i, out_q;

  int checks = 0, failures = 0;

  hilbert_fir #(.NTAPS(NTAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real freqs [3] = '{0.15, 0.25, 0.35};
  int  hist [$];
  real worst = 0.0;

  initial begin
    real w, e;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (freqs[fi]) begin
      w = 2.0 * PI * freqs[fi];
      for (int k = 0; k < 200; k++) begin
        in_valid = 1'b1;
        in_x = 12'($rtoi($floor(AMP * $cos(w * real'(k)) + 0.5)));
        hist.push_back(int'(in_x));
        @(negedge clk);
        checks++;
        if (!out_valid) begin
          failures++;
          $display("FAIL: out_valid low");
        end
        if (k >= NTAPS + 2) begin
          checks += 2;
          if (int'(out_i) != hist[hist.size() - 1 - D]) begin
            failures++;
            $display("FAIL: f=%f k=%0d out_i=%0d expected %0d", freqs[fi], k, out_i, hist[hist.size() - 1 - D]);
          end
          e = real'(out_q) - AMP * $sin(w * real'(k - int'(D)));
          if (e < 0.0) e = -e;
          if (e > worst) worst = e;
          if (e > 0.015 * AMP) begin
            failures++;
            $display("FAIL: f=%f k=%0d out_q=%0d error %f", freqs[fi], k, out_q, e);
          end
        end
        // a one-cycle gap now and then
        if (k % 37 == 5) begin
          in_valid = 1'b0;
          @(negedge clk);
          checks++;
          if (out_valid) begin
            failures++;
            $display("FAIL: out_valid without in_valid");
          end
        end
      end
    end
    $display("largest quadrature error %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
