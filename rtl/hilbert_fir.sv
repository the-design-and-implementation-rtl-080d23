// hilbert_fir: Hilbert transformer that turns the real input signal into its
// analytic signal, the pretreatment step of the modulation recogniser.
//
// A linear-phase FIR of NTAPS (odd) taps approximates the ideal Hilbert
// transformer h[n] = 2/(pi*n) for odd n, 0 for even n, with n measured from the
// centre tap, shaped by a Hamming window w[n] = 0.54 + 0.46*cos(2*pi*n/(NTAPS-1)).
// The coefficients are computed at elaboration in Q1.(COEF_W-1). The real part
// of the analytic signal is the input delayed by the filter's group delay
// (NTAPS-1)/2 samples, so both parts line up: a cosine at the input comes out as
// cos + j*sin, i.e. exp(j*w*n).
//
// The document asks only for a Hilbert transform to the analytic signal; the
// tap count, window and word widths are this design's choices.
//
// Interface: in_valid marks a new sample. out_valid follows it by one clock,
// and out_i/out_q belong to the sample that arrived (NTAPS-1)/2 + 1 valid
// samples before the current one. The quadrature output saturates at OUT_W bits.
module hilbert_fir #(
  parameter int unsigned IN_W   = 12,
  parameter int unsigned OUT_W  = 14,
  parameter int unsigned NTAPS  = 31,
  parameter int unsigned COEF_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_x,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q
);

  localparam int unsigned C   = (NTAPS - 1) / 2;
  localparam int unsigned ACC_W = IN_W + COEF_W + $clog2(NTAPS) + 1;
  typedef logic signed [COEF_W-1:0] coef_t [NTAPS];

  function automatic coef_t make_coefs();
    coef_t r;
    real   pi, h, w, scale;
    int    n;
    pi    = 3.14159265358979;
    scale = real'(longint'(1) << (COEF_W - 1)) - 1.0;
    for (int k = 0; k < NTAPS; k++) begin
      n = k - int'(C);
      if (n % 2 == 0) begin
        r[k] = '0;
      end else begin
        h    = 2.0 / (pi * real'(n));
        w    = 0.54 + 0.46 * $cos(2.0 * pi * real'(n) / real'(NTAPS - 1));
        r[k] = COEF_W'($rtoi($floor(h * w * scale + 0.5)));
      end
    end
    return r;
  endfunction

  localparam coef_t COEF = make_coefs();

  logic signed [IN_W-1:0] taps [NTAPS];
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] qs;

  // taps[0] is the newest sample, taps[k] the one k samples older.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) taps[k] <= '0;
    end else if (clear) begin
      for (int k = 0; k < NTAPS; k++) taps[k] <= '0;
    end else if (in_valid) begin
      taps[0] <= in_x;
      for (int k = 1; k < NTAPS; k++) taps[k] <= taps[k-1];
    end
  end

  // y[m] = sum_k h[k-C] * x[m-k]
  always_comb begin
    acc = '0;
    for (int k = 0; k < NTAPS; k++)
      acc += ACC_W'(COEF[k]) * ACC_W'(taps[k]);
    qs = acc >>> (COEF_W - 1);
  end

  localparam logic signed [ACC_W-1:0] QMAX = ACC_W'((longint'(1) << (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] QMIN = -QMAX - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid && !clear;
      if (in_valid && !clear) begin
        out_i <= OUT_W'(taps[C]);
        if (qs > QMAX)      out_q <= QMAX[OUT_W-1:0];
        else if (qs < QMIN) out_q <= QMIN[OUT_W-1:0];
        else                out_q <= qs[OUT_W-1:0];
      end
    end
  end

endmodule
