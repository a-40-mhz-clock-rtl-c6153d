// vco: behavioural model of the 12-stage differential ring oscillator (analog).
//
// Each of the 12 differential delay cells delays the signal by td = 1/(24 f),
// so the true and complement outputs of the cells give 24 clock phases spaced
// td apart: phase[k] is phase[0] delayed by k*td (1.04 ns at 40.08 MHz). The
// frequency follows the chip's linear, low-gain characteristic
//     f = PROCESS * (F_BASE + ip_code * F_STEP + Kvco * vc),
// where the offset current code ip_code selects one of a family of parallel
// curves and high_gain selects the steeper Kvco. vc is clamped to [0, VDD].
// PROCESS scales the whole characteristic to stand for process, supply,
// temperature and radiation spread; the calibration must cope with it.
//
// The ring structure, the 24 phases, the linear characteristic with an
// offset-current term and the high-gain mode follow the chip description. All
// numeric values (base, step, gains) are this design's own: with PROCESS = 1 the
// low-gain curves span 10..80 MHz in 4 MHz steps, each 10 MHz wide.
//
// Ports: vc (V); ip_code; high_gain; phase[23:0].
module vco
  import plldelay_pkg::*;
#(
  parameter real F_BASE_HZ    = 10.0e6,
  parameter real F_STEP_HZ    = 4.0e6,
  parameter real KVCO_LOW     = 4.0e6,    // Hz/V
  parameter real KVCO_HIGH    = 12.0e6,   // Hz/V
  parameter real VDD          = 2.5,
  parameter real PROCESS      = 1.0
) (
  input  real                 vc,
  input  ip_code_t            ip_code,
  input  logic                high_gain,
  output logic [N_PHASES-1:0] phase
);
  timeunit 1ns;
  timeprecision 1fs;

  // Johnson-counter view of the ring: one cell switches every td.
  logic [N_STAGES-1:0] ring;

  initial ring = '0;
  real                 freq_hz;

  always_comb begin
    real v;
    v = (vc < 0.0) ? 0.0 : ((vc > VDD) ? VDD : vc);
    freq_hz = PROCESS * (F_BASE_HZ + real'(ip_code) * F_STEP_HZ
                         + (high_gain ? KVCO_HIGH : KVCO_LOW) * v);
  end

  always begin
    #((1.0e9 / (real'(N_PHASES) * freq_hz)) * 1ns);
    ring = {ring[N_STAGES-2:0], ~ring[N_STAGES-1]};
  end

  // Cell outputs give phases 0..11, their complements phases 12..23.
  assign phase = {~ring, ring};
endmodule
