// diff_encoder: symbol mapping and differential encoding.
//
// Each parallel symbol is mapped to a phase index (natural binary: index d
// means d * 360/M degrees, so for QPSK 00/01/10/11 are 0/90/180/270 degrees)
// and added modulo M to the previous encoded index, which is held in a
// one-symbol delay register; the sum is the new encoded index and is fed back.
// The first symbol after reset is added to 0. With diff_en low the adder is
// bypassed and the mapped index is sent as it is (plain MPSK), the register
// still holding the last index sent.
//
// The adder, the modulo-M wrap and the delay in the feedback path follow the
// document's differential encoder (a modulo-4 adder for QPSK, widened here to
// modulo 2 and 8 for BPSK and 8PSK). The natural-binary mapping, the bypass and
// reset to phase 0 are this design's choices.
//
// Timing: one clock. phase/out_mode change one clock after in_valid and are
// held until the next symbol; out_valid is the matching one-cycle strobe.
module diff_encoder
  import mpsk_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       diff_en,
  input  logic       in_valid,
  input  logic [2:0] in_sym,
  input  mod_t       in_mode,
  output logic       out_valid,
  output logic [2:0] phase,
  output mod_t       out_mode
);

  logic [2:0] mask;
  logic [2:0] mapped;
  logic [2:0] sum;

  assign mask   = phase_mask(in_mode);
  assign mapped = in_sym & mask;
  assign sum    = (phase + mapped) & mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_mode  <= MOD_QPSK;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        phase    <= diff_en ? sum : mapped;
        out_mode <= in_mode;
      end
    end
  end

endmodule
