// tb_nco_mixer: feeds a complex exponential A*exp(j*(w*k + phi)) with the
// oscillator set to the same frequency and checks that the output is the
// constant A*exp(j*phi), computed here with $cos/$sin. With a frequency word
// that is a multiple of the table step the error must stay within 3 counts;
// with an arbitrary word (phase truncated to the table) within 30 counts.
// Also checks the one-clock latency of out_valid and that clear resets the
// oscillator phase.
module tb_nco_mixer;

  localparam real PI  = 3.14159265358979;
  localparam real AMP = 1000.0;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic [15:0] fcw = '0;
  logic signed [13:0] in_i = '0, in_q = '0;
  logic out_valid;
  logic signed [14:0] out_i, out_q;

  int checks = 0, failures = 0;

  nco_mixer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int word, real phi, real tol);
    real w, ei, eq;
    fcw = 16'(word);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    w = 2.0 * PI * real'(word) / 65536.0;
    for (int k = 0; k < 300; k++) begin
      in_valid = 1'b1;
      in_i = 14'($rtoi($floor(AMP * $cos(w * real'(k) + phi) + 0.5)));
      in_q = 14'($rtoi($floor(AMP * $sin(w * real'(k) + phi) + 0.5)));
      @(negedge clk);
      ei = real'(out_i) - AMP * $cos(phi);
      eq = real'(out_q) - AMP * $sin(phi);
      checks++;
      if (!out_valid || ei > tol || ei < -tol || eq > tol || eq < -tol) begin
        failures++;
        $display("FAIL: word %0d k=%0d out=(%0d,%0d) expected (%f,%f)", word, k, out_i, out_q, AMP * $cos(phi), AMP * $sin(phi));
      end
    end
    in_valid = 1'b0;
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL: out_valid without in_valid");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(16384, 0.3, 3.0);
    run(4096 * 3, -2.0, 3.0);
    run(12345, 1.1, 30.0);
    run(60000, 2.5, 30.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
