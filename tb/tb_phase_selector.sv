// tb_phase_selector: a carrier model in the testbench produces the eight phase
// copies; random symbols of random kinds are handed to the selector at random
// intervals. The reference computes the expected carrier step
// (index * 8/M) and checks every clock that y equals the copy for that step
// taken one clock earlier, with the new phase appearing two clocks after
// sym_valid, and that y stays low before the first symbol.
module tb_phase_selector;
  import mpsk_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, sym_valid = 1'b0;
  logic [7:0] f;
  logic [2:0] phase = '0;
  mod_t mode = MOD_QPSK;
  logic [2:0] step;
  logic active, y;

  int checks = 0, failures = 0;

  phase_selector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Carrier model: copy i is high when (n + i) mod 8 is 6, 7, 0 or 1.
  int n = 0;
  always_comb
    for (int i = 0; i < 8; i++) f[i] = (((n + i) % 8) >= 6) || (((n + i) % 8) <= 1);
  always @(posedge clk) n <= n + 1;

  int exp_step = -1, pend_step = -1, pend2 = -1;
  logic [7:0] f_prev = '0;

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (exp_step < 0) begin
        if (y !== 1'b0) begin
          failures++;
          $display("FAIL: y high before the first symbol");
        end
      end else if (y !== f_prev[exp_step]) begin
        failures++;
        $display("FAIL: y=%b expected copy %0d = %b", y, exp_step, f_prev[exp_step]);
      end
    end
    // The step latched at the edge after sym_valid is used at the next edge.
    if (pend2 >= 0) exp_step = pend2;
    pend2 = pend_step;
    pend_step = -1;
    f_prev = f;
  end

  function automatic int step_of(mod_t m, int idx);
    return (m == MOD_BPSK) ? (idx % 2) * 4 : (m == MOD_QPSK) ? (idx % 4) * 2 : idx % 8;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      // Drive between a rising and the next falling edge.
      @(posedge clk);
      #1;
      mode  = mod_t'($urandom_range(2));
      phase = 3'($urandom);
      sym_valid = 1'b1;
      pend_step = step_of(mode, int'(phase));
      @(posedge clk);
      #1;
      sym_valid = 1'b0;
      phase = 3'($urandom);
      repeat ($urandom_range(12, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
