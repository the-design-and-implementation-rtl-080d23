// freq_divider: frequency division of the system clock into the carrier.
//
// A step counter p advances once every DIV clocks while start is high and is
// held at 0 while start is low. One carrier period is eight steps, so the
// carrier frequency is f_clk / (8 * DIV). The output f holds eight copies of
// the square carrier, copy i shifted by i * 45 degrees: f[i] is high while the
// carrier angle 2*pi*p/8 + i*pi/4 lies in (-pi/2, pi/2], i.e. a cosine-like
// square wave. The selector picks one copy per symbol.
//
// The document gives this block only as frequency division of the clock
// feeding the selector, and its waveform shows a register of carrier phases;
// the eight-step square carrier and the cosine alignment are this design's
// choices.
//
// Timing: p and tick are registered; f follows p combinationally. step_tick is
// high on the cycle before p advances.
module freq_divider #(
  parameter int unsigned DIV = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic [2:0] p,
  output logic       step_tick,
  output logic [7:0] f
);

  localparam int unsigned DW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [DW-1:0] div_cnt;

  assign step_tick = start && (div_cnt == DW'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      p       <= '0;
    end else if (!start) begin
      div_cnt <= '0;
      p       <= '0;
    end else begin
      div_cnt <= step_tick ? '0 : div_cnt + 1'b1;
      if (step_tick) p <= p + 3'd1;
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      logic [2:0] a;
      a    = p + 3'(i) + 3'd2;
      f[i] = (a < 3'd4);
    end
  end

endmodule
