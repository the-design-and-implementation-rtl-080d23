// serial_parallel: serial to parallel conversion of the source bit stream.
//
// Each source bit lasts BIT_CLKS clock cycles. A clock counter q runs
// 0..BIT_CLKS-1 while start is high and is held at 0 while start is low. The
// bit on x is taken on the last cycle of its bit period (bit_tick high). A bit
// counter en numbers the bits of the current symbol; the symbol is complete
// after bits_per_sym(mode) bits (1 for BPSK, 2 for QPSK, 3 for 8PSK), so the
// parallel symbol rate is the bit rate divided by log2(M) (half of it for QPSK).
// The first bit of a symbol is its most significant bit.
//
// For QPSK this is the even/odd split: a bit with en % 2 == 0 goes to the I
// output and a bit with en % 2 == 1 to the Q output; i_bit/q_bit hold the last
// completed pair. The 1- and 3-bit groupings for BPSK and 8PSK, the bit period
// of four clocks (so that a QPSK symbol spans the eight values of q) and the
// sampling on the last cycle of a bit are this design's choices.
//
// Interface: mode is read when a symbol's first bit is taken and kept for the
// whole symbol. sym_valid is a one-cycle strobe, one clock after the
// bit_tick of the symbol's last bit; sym holds the symbol right-aligned and
// sym_mode its kind, both held until the next symbol completes.
module serial_parallel
  import mpsk_pkg::*;
#(
  parameter int unsigned BIT_CLKS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  mod_t       mode,
  input  logic       x,
  output logic [$clog2(BIT_CLKS)-1:0] q,
  output logic       bit_tick,
  output logic [1:0] en,
  output logic       sym_valid,
  output logic [2:0] sym,
  output mod_t       sym_mode,
  output logic       i_bit,
  output logic       q_bit
);

  logic [1:0] sreg;
  mod_t       cur_mode;
  logic [1:0] nbits;

  assign bit_tick = start && (q == BIT_CLKS[$clog2(BIT_CLKS)-1:0] - 1'b1);
  // The mode of a symbol is the one present when its first bit is taken.
  mod_t use_mode;
  assign use_mode = (en == 2'd0) ? mode : cur_mode;
  assign nbits    = bits_per_sym(use_mode);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q         <= '0;
      en        <= '0;
      sreg      <= '0;
      cur_mode  <= MOD_QPSK;
      sym_valid <= 1'b0;
      sym       <= '0;
      sym_mode  <= MOD_QPSK;
      i_bit     <= 1'b0;
      q_bit     <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      if (!start) begin
        q  <= '0;
        en <= '0;
      end else begin
        q <= bit_tick ? '0 : q + 1'b1;
        if (bit_tick) begin
          if (en == 2'd0) cur_mode <= mode;
          if (en[0] == 1'b0) i_bit <= x;
          else               q_bit <= x;
          if (en == nbits - 2'd1) begin
            en        <= '0;
            sym_valid <= 1'b1;
            sym_mode  <= use_mode;
            case (nbits)
              2'd1:    sym <= {2'b00, x};
              2'd2:    sym <= {1'b0, sreg[0], x};
              default: sym <= {sreg, x};
            endcase
          end else begin
            en <= en + 2'd1;
          end
          sreg <= {sreg[0], x};
        end
      end
    end
  end

endmodule
