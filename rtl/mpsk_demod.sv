// mpsk_demod: coherent demodulator for the square-carrier MPSK signal.
//
// The received signal y is compared, clock by clock, with the eight phase
// copies of the reference carrier f (the same copies the modulator selects
// from). For each copy a counter adds up how many samples of the current
// symbol agree with it. When the next symbol starts (sym_start), the copy with
// the most agreements among those allowed for the symbol's kind (every 8/M-th
// copy) gives the received phase index yy; with diff_en high it is
// differentially decoded, yyy = (yy - previous yy) mod M, otherwise yyy = yy.
// The symbol's bits are then sent out serially, most significant first, one
// bit every BIT_CLKS clocks, which restores the source bit order; a queue of
// up to eight bits absorbs the difference between symbol lengths when kinds
// change.
//
// The document shows this demodulation only as a simulation waveform (a phase
// index, a two-bit symbol and the serial output of a QPSK signal); the
// correlation by agreement counting, the use of the modulator's own carrier
// and symbol timing (no carrier or timing recovery) and the serial timing are
// this design's choices.
//
// Interface and timing: y must lag f by one clock, as the registered selector
// output does. sym_start is high on the first clock of each received symbol,
// with sym_mode its kind. A decision is made on the sym_start that ends a
// symbol: out_valid, yy, yyy and out_mode change one clock later. bit_valid
// marks each serial bit on bit_out, the first one two clocks after out_valid
// when the queue was empty.
module mpsk_demod
  import mpsk_pkg::*;
#(
  parameter int unsigned BIT_CLKS = 4,
  parameter int unsigned CNT_W    = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       diff_en,
  input  logic [7:0] f,
  input  logic       y,
  input  logic       sym_start,
  input  mod_t       sym_mode,
  output logic       out_valid,
  output logic [2:0] yy,
  output logic [2:0] yyy,
  output mod_t       out_mode,
  output logic       bit_valid,
  output logic       bit_out
);

  localparam int unsigned BW = (BIT_CLKS > 1) ? $clog2(BIT_CLKS) : 1;

  logic [7:0]       f_d;
  logic [CNT_W-1:0] agree [8];
  mod_t             cur_mode;
  logic             have_sym;
  logic [2:0]       best_idx;
  logic [2:0]       prev_yy;

  // Best allowed phase index of the symbol that is ending.
  always_comb begin
    logic [CNT_W-1:0] best_cnt;
    logic [2:0]       st;
    best_idx = '0;
    best_cnt = '0;
    st       = '0;
    for (int p = 0; p < 8; p++) begin
      if (p < (1 << bits_per_sym(cur_mode))) begin
        st = phase_to_step(cur_mode, 3'(p));
        if (agree[st] > best_cnt) begin
          best_cnt = agree[st];
          best_idx = 3'(p);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_d       <= '0;
      for (int i = 0; i < 8; i++) agree[i] <= '0;
      cur_mode  <= MOD_QPSK;
      have_sym  <= 1'b0;
      prev_yy   <= '0;
      out_valid <= 1'b0;
      yy        <= '0;
      yyy       <= '0;
      out_mode  <= MOD_QPSK;
    end else begin
      f_d       <= f;
      out_valid <= 1'b0;
      if (sym_start) begin
        if (have_sym) begin
          out_valid <= 1'b1;
          yy        <= best_idx;
          yyy       <= diff_en ? ((best_idx - prev_yy) & phase_mask(cur_mode)) : best_idx;
          out_mode  <= cur_mode;
          prev_yy   <= best_idx;
        end
        have_sym <= 1'b1;
        cur_mode <= sym_mode;
        for (int i = 0; i < 8; i++) agree[i] <= CNT_W'(y == f_d[i]);
      end else begin
        for (int i = 0; i < 8; i++) agree[i] <= agree[i] + CNT_W'(y == f_d[i]);
      end
    end
  end

  // Parallel to serial. A symbol's bits are decided one symbol late, and a
  // short symbol (BPSK) can follow a long one, so the bits wait in a small
  // queue (bq[0] goes out next) that sends one bit every BIT_CLKS clocks.
  logic [7:0]    bq;
  logic [3:0]    bn;
  logic [BW-1:0] bcnt;
  logic          pop;
  logic [7:0]    bq_pop;
  logic [3:0]    bn_pop;
  logic [1:0]    k;

  assign pop    = (bn != 4'd0) && (bcnt == '0);
  assign bq_pop = pop ? (bq >> 1) : bq;
  assign bn_pop = pop ? bn - 4'd1 : bn;
  assign k      = bits_per_sym(out_mode);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bq        <= '0;
      bn        <= '0;
      bcnt      <= '0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
    end else begin
      bit_valid <= pop;
      if (pop) begin
        bit_out <= bq[0];
        bcnt    <= BW'(BIT_CLKS - 1);
      end else if (bcnt != '0) begin
        bcnt <= bcnt - 1'b1;
      end
      bq <= bq_pop;
      bn <= bn_pop;
      if (out_valid) begin
        // Most significant bit first.
        for (int b = 0; b < 3; b++) begin
          if (b < int'(k)) bq[3'(bn_pop) + 3'(b)] <= yyy[int'(k) - 1 - b];
        end
        bn <= bn_pop + 4'(k);
      end
    end
  end

endmodule
