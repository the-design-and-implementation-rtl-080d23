// nco_mixer: moves the analytic signal to baseband with the estimated carrier.
//
// A phase accumulator advances by the carrier frequency word fcw with every
// valid sample (carrier frequency = fcw / 2^PHASE_W cycles per sample). Its top
// LUT_AW bits address cosine and sine tables, computed at elaboration with
// amplitude 2^(LUT_W-1)-1, and the sample is rotated by the negative phase:
//   out = (in_i + j*in_q) * exp(-j*theta)
//       = (in_i*cos + in_q*sin) + j*(in_q*cos - in_i*sin).
// The result leaves a constant phase error, which the recogniser's features
// ignore because they use only magnitudes of the cumulants.
//
// The document requires the carrier to be estimated in advance and the
// cumulants to be taken at baseband; how the carrier is removed (this
// numerically controlled oscillator and the table sizes) is this design's
// choice. The carrier estimate itself comes in on fcw.
//
// Timing: out_valid follows in_valid by one clock. clear resets the phase.
module nco_mixer #(
  parameter int unsigned IN_W    = 14,
  parameter int unsigned OUT_W   = 15,
  parameter int unsigned PHASE_W = 16,
  parameter int unsigned LUT_AW  = 8,
  parameter int unsigned LUT_W   = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic [PHASE_W-1:0]      fcw,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_i,
  input  logic signed [IN_W-1:0]  in_q,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q
);

  localparam int unsigned LUT_N = 1 << LUT_AW;
  localparam int unsigned PROD_W = IN_W + LUT_W + 1;
  typedef logic signed [LUT_W-1:0] lut_t [LUT_N];

  function automatic lut_t make_lut(bit sine);
    lut_t r;
    real  pi, a, amp;
    pi  = 3.14159265358979;
    amp = real'(longint'(1) << (LUT_W - 1)) - 1.0;
    for (int k = 0; k < LUT_N; k++) begin
      a    = 2.0 * pi * real'(k) / real'(LUT_N);
      r[k] = LUT_W'($rtoi($floor(amp * (sine ? $sin(a) : $cos(a)) + 0.5)));
    end
    return r;
  endfunction

  localparam lut_t COS_LUT = make_lut(1'b0);
  localparam lut_t SIN_LUT = make_lut(1'b1);

  logic [PHASE_W-1:0]       acc;
  logic [LUT_AW-1:0]        idx;
  logic signed [LUT_W-1:0]  c, s;
  logic signed [OUT_W-1:0]  mi, mq;

  assign idx = acc[PHASE_W-1 -: LUT_AW];
  assign c   = COS_LUT[idx];
  assign s   = SIN_LUT[idx];
  assign mi  = OUT_W'((PROD_W'(in_i) * PROD_W'(c) + PROD_W'(in_q) * PROD_W'(s)) >>> (LUT_W - 1));
  assign mq  = OUT_W'((PROD_W'(in_q) * PROD_W'(c) - PROD_W'(in_i) * PROD_W'(s)) >>> (LUT_W - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid && !clear;
      if (clear) begin
        acc <= '0;
      end else if (in_valid) begin
        acc   <= acc + fcw;
        out_i <= mi;
        out_q <= mq;
      end
    end
  end

endmodule
