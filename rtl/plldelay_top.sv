// plldelay_top: the PLL-Delay chip, clock and first-level trigger recovery.
//
// The 40.08 MHz machine clock and the trigger arrive on one line, CLK_T1: a
// clock whose pulses are suppressed to send a trigger. A charge-pump PLL with
// a low loop gain (low jitter, good filtering of missing pulses) regenerates
// the clock from the rising edges of CLK_T1. Its 12-stage differential ring
// VCO gives 24 phases 1.04 ns apart. Phase 0 is the feedback and system clock;
// phases 6 and 18 sample CLK_T1 a quarter period after and before its edge for
// the trigger decoder and the lock detector. Because a low-gain VCO cannot
// cover process, temperature and radiation spread, a calibration machine steps
// the VCO offset current (and, if needed, its gain) until the loop locks, then
// switches the phase detector from PFD to PD mode and enables the trigger
// decoder. The delay line selects the output clock phase and delays the
// decoded trigger; its settings come from the I2C slave.
//
//   clk_t1 -> phase_detector -> charge_pump -> loop_filter -> vco -> 24 phases
//   phases + clk_t1 -> lock_detector -> calibration_fsm -> ip_code, gain, mode
//   phases + clk_t1 -> trigger_decoder -> delay_line -> clk_out, t1_out
//   scl/sda -> i2c_slave -> delay settings; status read back
//
// The block structure follows the chip description. The charge pump, loop
// filter and VCO are behavioural models of analog circuits (real-valued
// control voltage, delays in simulated time); everything else is
// synthesizable logic. The differential input receiver and output drivers are
// not modelled: clk_t1, clk_out and t1_out are single-ended logic signals.
//
// Reset: rst_n is asynchronous, active low; its release is synchronised to
// VCO phase 0 for the logic by a two-flop reset synchroniser (whose flops are,
// by design, reset asynchronously and clocked synchronously). Each reset
// restarts the calibration. The VCO runs through reset, so the logic always
// has a clock.
//
// Ports: rst_n, clk_t1, i2c_addr (7-bit I2C device address pins), scl,
// sda_in, sda_oe (open drain, 1 pulls SDA low), clk_out, t1_out, locked,
// cal_done, status (the I2C status register contents).
module plldelay_top
  import plldelay_pkg::*;
#(
  parameter int unsigned WAIT_CYCLES = 1024,   // calibration wait per code
  parameter int unsigned LOCK_COUNT  = 128,    // good cycles to declare lock
  parameter real         PROCESS     = 1.0     // VCO process/radiation factor
) (
  input  logic       rst_n,
  input  logic       clk_t1,
  input  logic [6:0] i2c_addr,
  input  logic       scl,
  input  logic       sda_in,
  output logic       sda_oe,
  output logic       clk_out,
  output logic       t1_out,
  output logic       locked,
  output logic       cal_done,
  output status_t    status
);
  timeunit 1ns;
  timeprecision 1fs;

  logic [N_PHASES-1:0] phase;
  logic clk;
  logic [1:0] rst_sync;
  logic sys_rst_n;
  logic up, dn, pd_mode, high_gain, cal_failed, t1_dec;
  ip_code_t ip_code;
  delay_cfg_t cfg;
  real i_cp, vc;

  assign clk = phase[0];

  // Reset release synchronised to the system clock
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rst_sync <= 2'b00;
    else        rst_sync <= {rst_sync[0], 1'b1};
  assign sys_rst_n = rst_sync[1];

  // ---------------- PLL
  phase_detector u_pd (
    .rst_n       (sys_rst_n),
    .pd_mode     (pd_mode),
    .ref_clk     (clk_t1),
    .fb_clk      (phase[0]),
    .fb_clk_late (phase[1]),
    .up          (up),
    .dn          (dn)
  );

  charge_pump u_cp (
    .up    (up),
    .dn    (dn),
    .i_out (i_cp)
  );

  loop_filter u_lf (
    .rst_n (rst_n),
    .i_in  (i_cp),
    .vc    (vc)
  );

  vco #(.PROCESS(PROCESS)) u_vco (
    .vc        (vc),
    .ip_code   (ip_code),
    .high_gain (high_gain),
    .phase     (phase)
  );

  // ---------------- calibration
  lock_detector #(.LOCK_COUNT(LOCK_COUNT)) u_lock (
    .clk       (clk),
    .clk_early (phase[PH_EARLY_SAMPLE]),
    .clk_late  (phase[PH_LATE_SAMPLE]),
    .rst_n     (sys_rst_n),
    .ref_in    (clk_t1),
    .locked    (locked)
  );

  calibration_fsm #(.WAIT_CYCLES(WAIT_CYCLES)) u_cal (
    .clk        (clk),
    .rst_n      (sys_rst_n),
    .locked     (locked),
    .ip_code    (ip_code),
    .high_gain  (high_gain),
    .pd_mode    (pd_mode),
    .cal_done   (cal_done),
    .cal_failed (cal_failed),
    .state      ()
  );

  // ---------------- trigger and delay
  trigger_decoder u_dec (
    .clk        (clk),
    .clk_sample (phase[PH_EARLY_SAMPLE]),
    .rst_n      (sys_rst_n),
    .enable     (cal_done),
    .clk_t1     (clk_t1),
    .t1         (t1_dec)
  );

  delay_line u_dl (
    .phase   (phase),
    .clk     (clk),
    .rst_n   (sys_rst_n),
    .cfg     (cfg),
    .t1_in   (t1_dec),
    .clk_out (clk_out),
    .t1_out  (t1_out)
  );

  // ---------------- configuration
  assign status = '{cal_failed: cal_failed, cal_done: cal_done,
                    high_gain: high_gain, locked: locked, ip_code: ip_code};

  i2c_slave u_i2c (
    .clk       (clk),
    .rst_n     (sys_rst_n),
    .dev_addr  (i2c_addr),
    .scl       (scl),
    .sda_in    (sda_in),
    .sda_oe    (sda_oe),
    .status    (status),
    .cfg       (cfg)
  );
endmodule
