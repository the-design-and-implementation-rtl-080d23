// signal_recognizer: recognises whether the incoming signal is BPSK, QPSK or
// 8PSK from its fourth-order cumulants.
//
// The chain follows the recognition steps: the real input samples are turned
// into the analytic signal (hilbert_fir), moved to baseband with the carrier
// estimate fcw (nco_mixer), reduced to Z_W-bit complex samples (arithmetic
// shift right by Z_SHIFT, then saturation), and their cumulants C40, C41, C42
// are estimated over windows of N samples (cumulant_est). The feature vector
// [|C40|/|C42|, |C41|/|C42|] is matched to the references [1,1], [1,0], [0,0]
// by minimum distance (mpsk_classifier). Windows follow one another without a
// gap, so a new decision comes every N input samples.
//
// The document gives the steps (analytic signal, cumulants at baseband with
// carrier and symbol rate known in advance, feature vectors, minimum-distance
// rule); the recogniser here works on one signal at a time and uses only the
// carrier estimate (no cyclic-frequency search over the symbol rate). Word
// widths and the scaling are this design's choices: Z_SHIFT = 4 suits inputs
// with an amplitude of about a thousand counts.
//
// Interface: in_valid marks an input sample; clear empties the filter and
// restarts the window and the oscillator phase. rec_valid is a one-cycle strobe with each decision, which
// stays on mode until the next one; mode is QPSK after reset. The cumulants
// (scaled by N^2) and the three scaled distances of the last decision are
// brought out for observation.
module signal_recognizer
  import mpsk_pkg::*;
#(
  parameter int unsigned IN_W    = 12,
  parameter int unsigned NTAPS   = 31,
  parameter int unsigned PHASE_W = 16,
  parameter int unsigned Z_W     = 8,
  parameter int unsigned Z_SHIFT = 4,
  parameter int unsigned N       = 2000
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic [PHASE_W-1:0]     fcw,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_x,
  output logic                   rec_valid,
  output mod_t                   mode,
  output logic signed [63:0]     c40_re,
  output logic signed [63:0]     c40_im,
  output logic signed [63:0]     c41_re,
  output logic signed [63:0]     c41_im,
  output logic signed [63:0]     c42,
  output logic [65:0]            t_bpsk,
  output logic [65:0]            t_qpsk,
  output logic [65:0]            t_8psk
);

  localparam int unsigned H_W = IN_W + 2;
  localparam int unsigned M_W = H_W + 1;

  logic                  h_valid, m_valid;
  logic signed [H_W-1:0] h_i, h_q;
  logic signed [M_W-1:0] m_i, m_q;
  logic signed [Z_W-1:0] z_i, z_q;
  logic                  c_done;

  hilbert_fir #(.IN_W(IN_W), .OUT_W(H_W), .NTAPS(NTAPS)) u_hilbert (
    .clk, .rst_n, .clear, .in_valid, .in_x,
    .out_valid(h_valid), .out_i(h_i), .out_q(h_q)
  );

  nco_mixer #(.IN_W(H_W), .OUT_W(M_W), .PHASE_W(PHASE_W)) u_mixer (
    .clk, .rst_n, .clear, .fcw,
    .in_valid(h_valid), .in_i(h_i), .in_q(h_q),
    .out_valid(m_valid), .out_i(m_i), .out_q(m_q)
  );

  function automatic logic signed [Z_W-1:0] scale(logic signed [M_W-1:0] v);
    logic signed [M_W-1:0] s;
    s = v >>> Z_SHIFT;
    if (s > M_W'((1 << (Z_W - 1)) - 1))   return Z_W'((1 << (Z_W - 1)) - 1);
    else if (s < -M_W'(1 << (Z_W - 1)))   return Z_W'(-(1 << (Z_W - 1)));
    else                                  return s[Z_W-1:0];
  endfunction

  assign z_i = scale(m_i);
  assign z_q = scale(m_q);

  cumulant_est #(.Z_W(Z_W), .N(N)) u_cum (
    .clk, .rst_n, .clear, .in_valid(m_valid), .zi(z_i), .zq(z_q),
    .done(c_done), .c40_re, .c40_im, .c41_re, .c41_im, .c42
  );

  mpsk_classifier u_cls (
    .clk, .rst_n, .in_valid(c_done),
    .c40_re, .c40_im, .c41_re, .c41_im, .c42,
    .out_valid(rec_valid), .mode,
    .t_bpsk, .t_qpsk, .t_8psk
  );

endmodule
