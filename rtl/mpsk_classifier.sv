// mpsk_classifier: builds the two-element feature vector from the cumulants
// and picks the modulation with the smallest distance to its reference vector.
//
// The features are A1 = |C40| / |C42| and A2 = |C41| / |C42|. The reference
// vectors are F = [1,1] for BPSK, [1,0] for QPSK and [0,0] for 8PSK, and the
// distance of the measured features A' to reference A is
// T = |A'1 - A1| + |A'2 - A2|; the kind with the smallest T is the result.
// To avoid a divider every T is multiplied by |C42| (the same positive factor
// for all three, so the ordering is kept):
//   T_BPSK * |C42| = | |C40| - |C42| | + | |C41| - |C42| |
//   T_QPSK * |C42| = | |C40| - |C42| | + |C41|
//   T_8PSK * |C42| = |C40| + |C41|
// Complex magnitudes use the approximation max(|re|,|im|) + 3/8*min(|re|,|im|),
// whose error (under 7 percent) is small against the distance between the
// reference vectors. On a tie the lower-order kind wins (BPSK, then QPSK).
//
// The feature vectors, reference values and minimum-distance rule follow the
// document; the choice of features as cumulant ratios is derived from its
// cumulant table, and the division-free form and magnitude approximation are
// this design's.
//
// Timing: one clock; out_valid and mode follow in_valid. mode and the scaled
// distances are held until the next decision. mode is QPSK after reset.
module mpsk_classifier
  import mpsk_pkg::*;
#(
  parameter int unsigned C_W = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [C_W-1:0] c40_re,
  input  logic signed [C_W-1:0] c40_im,
  input  logic signed [C_W-1:0] c41_re,
  input  logic signed [C_W-1:0] c41_im,
  input  logic signed [C_W-1:0] c42,
  output logic                  out_valid,
  output mod_t                  mode,
  output logic [C_W+1:0]        t_bpsk,
  output logic [C_W+1:0]        t_qpsk,
  output logic [C_W+1:0]        t_8psk
);

  typedef logic [C_W-1:0] mag_t;
  typedef logic [C_W+1:0] dist_t;

  function automatic mag_t abs_s(logic signed [C_W-1:0] v);
    return v[C_W-1] ? mag_t'(-v) : mag_t'(v);
  endfunction

  function automatic mag_t cmag(logic signed [C_W-1:0] re, logic signed [C_W-1:0] im);
    mag_t a, b, mx, mn;
    a  = abs_s(re);
    b  = abs_s(im);
    mx = (a > b) ? a : b;
    mn = (a > b) ? b : a;
    return mx + (mn >> 2) + (mn >> 3);
  endfunction

  function automatic dist_t absdiff(mag_t a, mag_t b);
    mag_t d;
    d = (a > b) ? a - b : b - a;
    return dist_t'(d);
  endfunction

  mag_t  m40, m41, m42;
  dist_t tb, tq, t8;
  mod_t  best;

  always_comb begin
    m40 = cmag(c40_re, c40_im);
    m41 = cmag(c41_re, c41_im);
    m42 = abs_s(c42);
    tb  = absdiff(m40, m42) + absdiff(m41, m42);
    tq  = absdiff(m40, m42) + dist_t'(m41);
    t8  = dist_t'(m40) + dist_t'(m41);
    if (tb <= tq && tb <= t8) best = MOD_BPSK;
    else if (tq <= t8)        best = MOD_QPSK;
    else                      best = MOD_8PSK;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mode      <= MOD_QPSK;
      t_bpsk    <= '0;
      t_qpsk    <= '0;
      t_8psk    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        mode   <= best;
        t_bpsk <= tb;
        t_qpsk <= tq;
        t_8psk <= t8;
      end
    end
  end

endmodule
