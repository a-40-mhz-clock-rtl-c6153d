// phase_detector: double-mode digital phase detector of the PLL.
//
// It compares the reference (the encoded CLK_T1 line) with the feedback clock
// (VCO phase 0) and drives the UP and DN switches of the charge pump.
//
// * pd_mode = 0, lock acquisition: a three-state phase-frequency detector. A
//   rising reference edge sets UP, a rising feedback edge sets DN, and when both
//   are set they are cleared together, so the pulse width equals the time between
//   the two edges and its sign says which came first. Because it also senses
//   frequency, it pulls the VCO in from any starting frequency.
// * pd_mode = 1, after lock: a two-state (bang-bang) phase detector. On each
//   feedback edge the reference level is sampled: high means the reference edge
//   came first (UP), low means it did not (DN). The chosen output is asserted
//   for a fixed window, from the feedback edge to the next VCO phase (one stage
//   delay, about 1.04 ns). A missing reference pulse, which is how a trigger is
//   sent, therefore costs one small DN correction instead of the full-cycle DN
//   pulse the PFD would give.
//
// The use of the two modes and their switch-over follow the chip description.
// The PFD clearing scheme, the sampling PD and its pulse window are this
// design's own choices. The PFD clears itself asynchronously from its own
// outputs (up_q & dn_q): that path is intended, as in every three-state PFD.
//
// Ports: rst_n async active low; ref_clk, fb_clk, fb_clk_late (fb_clk delayed by
// one VCO stage); pd_mode; up, dn.
module phase_detector (
  input  logic rst_n,
  input  logic pd_mode,
  input  logic ref_clk,
  input  logic fb_clk,
  input  logic fb_clk_late,
  output logic up,
  output logic dn
);
  timeunit 1ns;
  timeprecision 1fs;

  logic up_q, dn_q, pfd_clr;
  logic early_q;

  // Three-state PFD
  assign pfd_clr = ~rst_n | pd_mode | (up_q & dn_q);

  always_ff @(posedge ref_clk or posedge pfd_clr)
    if (pfd_clr) up_q <= 1'b0;
    else         up_q <= 1'b1;

  always_ff @(posedge fb_clk or posedge pfd_clr)
    if (pfd_clr) dn_q <= 1'b0;
    else         dn_q <= 1'b1;

  // Two-state PD: the reference level at the feedback edge
  always_ff @(posedge fb_clk or negedge rst_n)
    if (!rst_n) early_q <= 1'b0;
    else        early_q <= ref_clk;

  logic pd_window;
  assign pd_window = fb_clk & ~fb_clk_late;

  always_comb begin
    if (pd_mode) begin
      up = pd_window &  early_q;
      dn = pd_window & ~early_q;
    end else begin
      up = up_q;
      dn = dn_q;
    end
  end
endmodule
