// tb_diff_encoder: random symbols of random kinds into the differential
// encoder, with the differential mode switched on and off. The reference keeps
// its own previous index and predicts (prev + d) mod M, or d in bypass mode.
// Also checks the one-clock latency and a few hand-worked QPSK values.
module tb_diff_encoder;
  import mpsk_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, diff_en = 1'b1, in_valid = 1'b0;
  logic [2:0] in_sym = '0;
  mod_t in_mode = MOD_QPSK;
  logic out_valid;
  logic [2:0] phase;
  mod_t out_mode;

  int checks = 0, failures = 0;

  diff_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int prev = 0;

  task automatic push(logic [2:0] s, mod_t m, bit de, int expect_phase);
    int mm, e;
    mm = (m == MOD_BPSK) ? 2 : (m == MOD_QPSK) ? 4 : 8;
    e  = de ? (prev + (int'(s) % mm)) % mm : int'(s) % mm;
    @(negedge clk);
    in_valid = 1'b1; in_sym = s; in_mode = m; diff_en = de;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || int'(phase) != e || out_mode != m || (expect_phase >= 0 && int'(phase) != expect_phase)) begin
      failures++;
      $display("FAIL: sym %0d %s de=%b -> phase %0d valid %b, expected %0d", s, m.name(), de, phase, out_valid, e);
    end
    prev = e;
    // idle cycles keep the output
    repeat ($urandom_range(2)) begin
      @(negedge clk);
      checks++;
      if (out_valid || int'(phase) != e) begin
        failures++;
        $display("FAIL: output not held");
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Hand-worked QPSK: 0 + 1 = 1, 1 + 3 = 0, 0 + 2 = 2, 2 + 3 = 1.
    push(3'd1, MOD_QPSK, 1'b1, 1);
    push(3'd3, MOD_QPSK, 1'b1, 0);
    push(3'd2, MOD_QPSK, 1'b1, 2);
    push(3'd3, MOD_QPSK, 1'b1, 1);
    // 8PSK: 1 + 7 = 0.
    push(3'd7, MOD_8PSK, 1'b1, 0);
    for (int i = 0; i < 500; i++)
      push(3'($urandom), mod_t'($urandom_range(2)), 1'($urandom_range(3) != 0), -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
