// mpsk_pkg: types and constants shared by the MPSK modulator, the signal
// recogniser and the demodulator.
//
// The modulation kinds are the three the recogniser distinguishes (BPSK, QPSK,
// 8PSK). A symbol carries 1, 2 or 3 bits; its phase index counts in steps of
// 360/M degrees and is placed on an eight-step square carrier, so one carrier
// step is 45 degrees. The eight-step carrier is this design's choice: it is the
// smallest square carrier on which all eight 8PSK phases can be drawn.
package mpsk_pkg;

  typedef enum logic [1:0] {
    MOD_BPSK = 2'd0,
    MOD_QPSK = 2'd1,
    MOD_8PSK = 2'd2
  } mod_t;

  // Bits per symbol, log2(M).
  function automatic logic [1:0] bits_per_sym(mod_t m);
    case (m)
      MOD_BPSK: return 2'd1;
      MOD_QPSK: return 2'd2;
      default:  return 2'd3;
    endcase
  endfunction

  // M - 1, the mask that keeps a phase index modulo M.
  function automatic logic [2:0] phase_mask(mod_t m);
    case (m)
      MOD_BPSK: return 3'b001;
      MOD_QPSK: return 3'b011;
      default:  return 3'b111;
    endcase
  endfunction

  // Carrier step (0..7) of phase index p under kind m: p * 360/M degrees.
  function automatic logic [2:0] phase_to_step(mod_t m, logic [2:0] p);
    case (m)
      MOD_BPSK: return {p[0], 2'b00};
      MOD_QPSK: return {p[1:0], 1'b0};
      default:  return p;
    endcase
  endfunction

endpackage
