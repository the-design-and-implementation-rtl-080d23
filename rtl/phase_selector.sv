// phase_selector: places the encoded symbol on the carrier.
//
// When a new encoded symbol arrives (sym_valid) its phase index is converted
// to a carrier step offset (index * 8/M steps of 45 degrees) and held for the
// whole symbol; every clock the selector passes the carrier copy f[offset] to
// the registered output y. So the modulated signal is the square carrier
// shifted by phase * 360/M degrees. Until the first symbol arrives the output
// is held low and active is low.
//
// The document names this block as the selector between the frequency divider
// and the modulated output; the step-offset arithmetic is this design's.
//
// Timing: the new phase appears on y two clocks after sym_valid (one to latch
// the offset, one for the output register).
module phase_selector
  import mpsk_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] f,
  input  logic       sym_valid,
  input  logic [2:0] phase,
  input  mod_t       mode,
  output logic [2:0] step,
  output logic       active,
  output logic       y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step   <= '0;
      active <= 1'b0;
      y      <= 1'b0;
    end else begin
      if (sym_valid) begin
        step   <= phase_to_step(mode, phase & phase_mask(mode));
        active <= 1'b1;
      end
      y <= active ? f[step] : 1'b0;
    end
  end

endmodule
