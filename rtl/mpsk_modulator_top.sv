// mpsk_modulator_top: MPSK modulator with automatic recognition of the
// modulation kind.
//
// Two paths share one clock. The recognition path takes samples of a received
// real signal (rx_x), recognises whether it is BPSK, QPSK or 8PSK
// (signal_recognizer) and sets the modulation kind. The modulation path takes
// the serial source bits on x, groups them into symbols of log2(M) bits for the
// recognised kind (serial_parallel), differentially encodes them modulo M
// (diff_encoder), and selects for each symbol the matching phase copy of a
// square carrier divided from the clock (freq_divider, phase_selector); y is
// the modulated signal. A kind change from the recogniser takes effect at the
// next symbol boundary, so no symbol mixes two kinds.
//
// A demodulator (mpsk_demod) is attached to y with the modulator's own carrier
// and symbol timing and recovers the source bits, so the whole chain can be
// checked in a loop.
//
// The block order (source, serial-to-parallel conversion, recognition,
// frequency division of the clock, selector, modulated output) follows the
// document's system diagram. Feeding the recogniser from a separate sample
// input and the loop-back demodulator are this design's choices.
//
// Interface: start high runs the symbol clock and the carrier. Source bits are
// taken on bit_tick (every BIT_CLKS clocks): x must hold the bit over its bit
// period. rx_valid marks a recogniser sample; a decision comes every
// REC_N samples with rec_valid. Latency from the last bit of a symbol to its
// phase on y is four clocks; the demodulated bits follow one symbol later.
module mpsk_modulator_top
  import mpsk_pkg::*;
#(
  parameter int unsigned BIT_CLKS = 4,
  parameter int unsigned RX_W     = 12,
  parameter int unsigned REC_N    = 2000
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   diff_en,
  // recognition input
  input  logic                   rec_clear,
  input  logic [15:0]            fcw,
  input  logic                   rx_valid,
  input  logic signed [RX_W-1:0] rx_x,
  output logic                   rec_valid,
  output mod_t                   mode,
  // modulator
  input  logic                   x,
  output logic [$clog2(BIT_CLKS)-1:0] q,
  output logic                   bit_tick,
  output logic                   sym_valid,
  output logic [2:0]             xx,
  output logic [2:0]             yy,
  output mod_t                   sym_mode,
  output logic [7:0]             f,
  output logic                   y,
  // loop-back demodulator
  output logic                   dem_valid,
  output logic [2:0]             dem_yy,
  output logic [2:0]             dem_yyy,
  output mod_t                   dem_mode,
  output logic                   dem_bit_valid,
  output logic                   dem_bit
);

  logic signed [63:0] c40_re, c40_im, c41_re, c41_im, c42;
  logic [65:0]        t_bpsk, t_qpsk, t_8psk;

  signal_recognizer #(.IN_W(RX_W), .N(REC_N)) u_rec (
    .clk, .rst_n, .clear(rec_clear), .fcw,
    .in_valid(rx_valid), .in_x(rx_x),
    .rec_valid, .mode,
    .c40_re, .c40_im, .c41_re, .c41_im, .c42,
    .t_bpsk, .t_qpsk, .t_8psk
  );

  logic [1:0]                  en;
  logic                        i_bit, q_bit;
  mod_t                        sp_mode;

  serial_parallel #(.BIT_CLKS(BIT_CLKS)) u_sp (
    .clk, .rst_n, .start, .mode, .x,
    .q, .bit_tick, .en, .sym_valid, .sym(xx), .sym_mode(sp_mode),
    .i_bit, .q_bit
  );

  logic enc_valid;

  diff_encoder u_enc (
    .clk, .rst_n, .diff_en,
    .in_valid(sym_valid), .in_sym(xx), .in_mode(sp_mode),
    .out_valid(enc_valid), .phase(yy), .out_mode(sym_mode)
  );

  logic [2:0] p;
  logic       step_tick;

  freq_divider u_div (
    .clk, .rst_n, .start, .p, .step_tick, .f
  );

  logic [2:0] step;
  logic       active;

  phase_selector u_sel (
    .clk, .rst_n, .f, .sym_valid(enc_valid), .phase(yy), .mode(sym_mode),
    .step, .active, .y
  );

  // The selector puts a new phase on y two clocks after enc_valid.
  logic [1:0] start_d;
  mod_t       mode_d1, mode_d2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_d <= '0;
      mode_d1 <= MOD_QPSK;
      mode_d2 <= MOD_QPSK;
    end else begin
      start_d <= {start_d[0], enc_valid};
      mode_d1 <= sym_mode;
      mode_d2 <= mode_d1;
    end
  end

  mpsk_demod #(.BIT_CLKS(BIT_CLKS)) u_dem (
    .clk, .rst_n, .diff_en, .f, .y,
    .sym_start(start_d[1]), .sym_mode(mode_d2),
    .out_valid(dem_valid), .yy(dem_yy), .yyy(dem_yyy), .out_mode(dem_mode),
    .bit_valid(dem_bit_valid), .bit_out(dem_bit)
  );

endmodule
