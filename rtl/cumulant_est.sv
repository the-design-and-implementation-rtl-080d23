// cumulant_est: estimates the fourth-order cumulants C40, C41 and C42 of a
// complex baseband signal over windows of N samples.
//
// For every sample z = zi + j*zq the moments z^2, |z|^2, z^4, z^3*conj(z) and
// |z|^4 are formed (pipeline stage 1) and summed over the window (stage 2),
// giving the sums S20, S21, S40, S41, S42 (S = N * moment). At the end of the
// window the cumulants are formed without division, scaled by N^2:
//   N^2*C40 = N*S40 - 3*S20^2
//   N^2*C41 = N*S41 - 3*S20*S21
//   N^2*C42 = N*S42 - |S20|^2 - 2*S21^2
// These are the usual zero-mean cumulant definitions
//   C40 = M40 - 3*M20^2, C41 = M41 - 3*M20*M21, C42 = M42 - |M20|^2 - 2*M21^2.
// For unit-energy signals they give the values of the document's cumulant
// table: BPSK -2, -2, -2; QPSK 1, 0, -1; 8PSK 0, 0, -1 (magnitudes, up to a
// common phase rotation). The next window starts right after the last sample
// of the previous one, so the estimator runs continuously.
//
// The window of 2000 samples is the sample count the document simulates with;
// the formulas, the division-free scaling and the word widths are this
// design's. The common factor N^2 drops out of the recogniser's decision.
//
// Interface: in_valid marks a sample; clear restarts the window. done is a
// one-cycle strobe three clocks after the valid of the window's last sample;
// c40/c41/c42 are then valid and held until the next done.
module cumulant_est #(
  parameter int unsigned Z_W = 8,
  parameter int unsigned N   = 2000,
  parameter int unsigned A_W = 48,
  parameter int unsigned C_W = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  in_valid,
  input  logic signed [Z_W-1:0] zi,
  input  logic signed [Z_W-1:0] zq,
  output logic                  done,
  output logic signed [C_W-1:0] c40_re,
  output logic signed [C_W-1:0] c40_im,
  output logic signed [C_W-1:0] c41_re,
  output logic signed [C_W-1:0] c41_im,
  output logic signed [C_W-1:0] c42
);

  localparam int unsigned CNT_W = $clog2(N + 1);
  localparam int unsigned P2_W  = 2 * Z_W + 2;   // z^2, |z|^2
  localparam int unsigned P4_W  = 2 * P2_W + 2;  // z^4, z^3 z*, |z|^4

  // Stage 1: moments of one sample.
  logic signed [P2_W-1:0] z2r, z2i, p2;
  logic signed [P4_W-1:0] z4r, z4i, z31r, z31i, p4;
  always_comb begin
    z2r  = P2_W'(zi) * P2_W'(zi) - P2_W'(zq) * P2_W'(zq);
    z2i  = 2 * (P2_W'(zi) * P2_W'(zq));
    p2   = P2_W'(zi) * P2_W'(zi) + P2_W'(zq) * P2_W'(zq);
  end

  logic                   s1_valid, s1_last;
  logic signed [P2_W-1:0] r_z2r, r_z2i, r_p2;
  logic [CNT_W-1:0]       cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      r_z2r    <= '0;
      r_z2i    <= '0;
      r_p2     <= '0;
      cnt      <= '0;
    end else begin
      s1_valid <= in_valid && !clear;
      s1_last  <= in_valid && !clear && (cnt == CNT_W'(N - 1));
      if (clear) begin
        cnt <= '0;
      end else if (in_valid) begin
        r_z2r <= z2r;
        r_z2i <= z2i;
        r_p2  <= p2;
        cnt   <= (cnt == CNT_W'(N - 1)) ? '0 : cnt + 1'b1;
      end
    end
  end

  // Fourth-order products from the registered second-order ones.
  always_comb begin
    z4r  = P4_W'(r_z2r) * P4_W'(r_z2r) - P4_W'(r_z2i) * P4_W'(r_z2i);
    z4i  = 2 * (P4_W'(r_z2r) * P4_W'(r_z2i));
    z31r = P4_W'(r_z2r) * P4_W'(r_p2);
    z31i = P4_W'(r_z2i) * P4_W'(r_p2);
    p4   = P4_W'(r_p2) * P4_W'(r_p2);
  end

  // Stage 2: window sums.
  logic signed [A_W-1:0] s20r, s20i, s21, s40r, s40i, s41r, s41i, s42;
  logic signed [A_W-1:0] f20r, f20i, f21, f40r, f40i, f41r, f41i, f42;
  logic                  fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s20r, s20i, s21, s40r, s40i, s41r, s41i, s42} <= '0;
      {f20r, f20i, f21, f40r, f40i, f41r, f41i, f42} <= '0;
      fin <= 1'b0;
    end else begin
      fin <= s1_valid && s1_last && !clear;
      if (clear) begin
        {s20r, s20i, s21, s40r, s40i, s41r, s41i, s42} <= '0;
      end else if (s1_valid) begin
        if (s1_last) begin
          // Hand the finished sums over and start the next window.
          f20r <= s20r + A_W'(r_z2r);
          f20i <= s20i + A_W'(r_z2i);
          f21  <= s21  + A_W'(r_p2);
          f40r <= s40r + A_W'(z4r);
          f40i <= s40i + A_W'(z4i);
          f41r <= s41r + A_W'(z31r);
          f41i <= s41i + A_W'(z31i);
          f42  <= s42  + A_W'(p4);
          {s20r, s20i, s21, s40r, s40i, s41r, s41i, s42} <= '0;
        end else begin
          s20r <= s20r + A_W'(r_z2r);
          s20i <= s20i + A_W'(r_z2i);
          s21  <= s21  + A_W'(r_p2);
          s40r <= s40r + A_W'(z4r);
          s40i <= s40i + A_W'(z4i);
          s41r <= s41r + A_W'(z31r);
          s41i <= s41i + A_W'(z31i);
          s42  <= s42  + A_W'(p4);
        end
      end
    end
  end

  // Stage 3: cumulants scaled by N^2.
  localparam logic signed [C_W-1:0] NN = C_W'(N);
  logic signed [C_W-1:0] a20r, a20i, a21;
  always_comb begin
    a20r = C_W'(f20r);
    a20i = C_W'(f20i);
    a21  = C_W'(f21);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done   <= 1'b0;
      c40_re <= '0;
      c40_im <= '0;
      c41_re <= '0;
      c41_im <= '0;
      c42    <= '0;
    end else begin
      done <= fin;
      if (fin) begin
        c40_re <= NN * C_W'(f40r) - 3 * (a20r * a20r - a20i * a20i);
        c40_im <= NN * C_W'(f40i) - 3 * (2 * a20r * a20i);
        c41_re <= NN * C_W'(f41r) - 3 * (a20r * a21);
        c41_im <= NN * C_W'(f41i) - 3 * (a20i * a21);
        c42    <= NN * C_W'(f42) - (a20r * a20r + a20i * a20i) - 2 * (a21 * a21);
      end
    end
  end

endmodule
