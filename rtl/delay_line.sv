// delay_line: programmable phase deskew of the recovered clock and trigger.
//
// Clock: one of the 24 VCO phases, phase[k] = phase[0] delayed by k stage
// delays (1.04 ns at 40.08 MHz), is selected as the output clock, so the clock
// can be shifted in 1.04 ns steps over a full 25 ns period. In silicon this is
// a 24:2 multiplexer on the differential cell outputs followed by a
// differential-to-single-ended converter; here it is a 24:1 multiplexer.
//
// Trigger: t1_in (one pulse per trigger, in the clk = phase[0] domain) first
// goes through a coarse delay of trg_coarse (0..15) clock cycles, a shift
// register, and is then retimed by a flip-flop clocked on phase
// (trg_fine + 1) mod 24. The fine step adds (trg_fine + 1) * 1.04 ns, so the
// trigger leaves t1_out (trg_coarse*T + (trg_fine+1)*T/24) after t1_in changed
// on its clk edge, up to 16 clock periods in 1.04 ns steps.
//
// The 1.04 ns step, the phase selection by multiplexer and the 16-cycle trigger
// range follow the chip description. The coarse/fine split, the (trg_fine + 1)
// offset (which keeps the delay monotonic where phase 0 would otherwise retime
// on the edge that launched the data) and the clamping of select values above
// 23 to 23 are this design's own choices. Multiplexing clocks with a
// combinational select can glitch when the select changes; the settings are
// meant to be changed while the outputs are not in use.
//
// Ports: phase[23:0], clk (= phase[0]), rst_n async active low, cfg (clk_fine,
// trg_fine, trg_coarse), t1_in, clk_out, t1_out.
module delay_line
  import plldelay_pkg::*;
(
  input  logic [N_PHASES-1:0] phase,
  input  logic                clk,
  input  logic                rst_n,
  input  delay_cfg_t          cfg,
  input  logic                t1_in,
  output logic                clk_out,
  output logic                t1_out
);
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned DEPTH = 2 ** COARSE_W;   // 16
  localparam phase_sel_t  LAST  = phase_sel_t'(N_PHASES - 1);

  phase_sel_t clk_sel, trg_sel, trg_fine_c;
  logic [DEPTH-1:1] shreg;
  logic t1_coarse, trg_clk;

  always_comb begin
    clk_sel    = (cfg.clk_fine > LAST) ? LAST : cfg.clk_fine;
    trg_fine_c = (cfg.trg_fine > LAST) ? LAST : cfg.trg_fine;
    trg_sel    = (trg_fine_c == LAST) ? '0 : trg_fine_c + 1'b1;
  end

  assign clk_out = phase[clk_sel];
  assign trg_clk = phase[trg_sel];

  // Coarse delay: shreg[i] is t1_in delayed by i cycles.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) shreg <= '0;
    else        shreg <= {shreg[DEPTH-2:1], t1_in};

  assign t1_coarse = (cfg.trg_coarse == '0) ? t1_in : shreg[cfg.trg_coarse];

  // Fine delay: retime on the selected phase.
  always_ff @(posedge trg_clk or negedge rst_n)
    if (!rst_n) t1_out <= 1'b0;
    else        t1_out <= t1_coarse;
endmodule
