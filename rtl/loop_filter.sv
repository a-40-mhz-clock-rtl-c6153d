// loop_filter: behavioural model of the PLL loop filter (analog).
//
// A series resistor R and capacitor C1, in parallel with a smaller capacitor
// C2, between the charge pump output and ground. The voltage on C2 is the VCO
// control voltage vc. With b = 1 + C1/C2 and T2 = R*C1 the open-loop gain is
// G0(s) = wc (1 + s T2) / (T2 s^2 (1 + s T2/b)), wc = Kvco Ip R (b-1) / (2 pi b).
//
// The circuit topology follows the chip description. The component values are
// this design's own, chosen for the nominal point of the phase-margin curves:
// b = 20 and wc*T2 = 2 (phase margin about 59 degrees) with wc = 2 pi x 200 kHz,
// Ip = 10 uA and a low-gain Kvco of 4 MHz/V: R = 33 kOhm, C1 = 48 pF,
// C2 = C1/(b-1) = 2.53 pF.
//
// Numerics: the charge-pump current is constant between its changes, so the
// state (v1 on C1, vc on C2) is advanced with forward-Euler steps of at most
// DT_NS whenever the current changes and every DT_NS otherwise. vc is clamped
// to the supply range [0, VDD]. rst_n low discharges both capacitors to V_INIT.
//
// Ports: rst_n; i_in (A); vc (V).
module loop_filter #(
  parameter real R_OHM  = 33.0e3,
  parameter real C1_F   = 48.0e-12,
  parameter real C2_F   = 2.53e-12,
  parameter real VDD    = 2.5,
  parameter real V_INIT = 1.25,
  parameter real DT_NS  = 0.5
) (
  input  logic rst_n,
  input  real  i_in,
  output real  vc
);
  timeunit 1ns;
  timeprecision 1fs;

  real     vcap;     // voltage across C2 (the control voltage)
  real     v1;       // voltage across C1
  real     i_held;   // charge-pump current since the last update
  realtime t_last;
  logic    tick;

  initial begin
    vcap   = V_INIT;
    v1     = V_INIT;
    i_held = 0.0;
    t_last = 0;
    tick   = 1'b0;
  end

  assign vc = vcap;

  function automatic real clamp(input real v);
    if (v < 0.0) return 0.0;
    if (v > VDD) return VDD;
    return v;
  endfunction

  // Periodic update request, so that vc follows a long UP or DN pulse.
  always #(DT_NS * 1ns) tick = ~tick;

  always @(i_in or rst_n or tick) begin
    real dt, h, ir;
    int  n;
    dt = (($realtime - t_last) / 1ns) * 1.0e-9;   // seconds
    t_last = $realtime;
    if (dt > 0.0) begin
      n = int'(dt / (DT_NS * 1.0e-9)) + 1;
      h = dt / n;
      for (int k = 0; k < n; k++) begin
        ir   = (vcap - v1) / R_OHM;               // current through R into C1
        vcap = clamp(vcap + h * (i_held - ir) / C2_F);
        v1   = v1 + h * ir / C1_F;
      end
    end
    i_held = i_in;
    if (!rst_n) begin
      vcap = V_INIT;
      v1   = V_INIT;
    end
  end
endmodule
