// tb_plldelay_top: end-to-end test of the PLL-Delay chip.
//
// Three chips share one CLK_T1 line (from the encoder model, with +/-100 ps
// edge jitter) and one I2C bus, each with its own device address:
//   A  nominal VCO (PROCESS 1.0): calibrates in low gain
//   B  slow VCO (PROCESS 0.45): no low-gain curve reaches 40.08 MHz, so the
//      calibration must switch to high gain
//   C  very slow VCO (PROCESS 0.3): cannot lock at all, calibration fails
// Sequence: reset; wait for A and B to finish calibration; check lock, PD
// mode, status over I2C; program A's delays (clock phase 5, trigger coarse 3,
// fine 7); send random triggers. Checked on A: the clock phase error of
// clk_out against the ideal clock plus the selected phase (limit 0.5 ns),
// the time of every t1_out edge against the expected
// (missing edge + (1 + coarse) T + (fine + 1) T/24) and that each trigger gives
// exactly one pulse. Mechanisms counted, each must happen: offset-current
// steps, high-gain switch, calibration failure, PFD-to-PD switch, triggers
// decoded while in PD mode, I2C writes, nonzero clock deskew.
module tb_plldelay_top;
  timeunit 1ns;
  timeprecision 1fs;
  import plldelay_pkg::*;

  localparam real T   = 24.95;
  localparam real TD  = T / 24.0;
  localparam int  JIT = 100;             // ps
  localparam logic [6:0] ADDR_A = 7'h21, ADDR_B = 7'h22, ADDR_C = 7'h23;

  logic rst_n, t1, clk_ref, clk_t1, scl, sda;
  int   cycles;
  logic oe_a, oe_b, oe_c;
  logic clk_a, clk_b, clk_c, t1_a, t1_b, t1_c;
  logic lock_a, lock_b, lock_c, done_a, done_b, done_c;
  status_t st_a, st_b, st_c;
  int checks = 0, failures = 0;

  clk_t1_encoder #(.PERIOD_NS(T), .JITTER_PS(JIT)) u_enc (.t1, .clk_ref, .clk_t1, .cycles);
  i2c_master_model #(.HALF_NS(1250.0)) u_i2c (.slave_oe(oe_a | oe_b | oe_c), .scl, .sda);

  plldelay_top #(.PROCESS(1.0)) dut_a (
    .rst_n, .clk_t1, .i2c_addr(ADDR_A), .scl, .sda_in(sda), .sda_oe(oe_a),
    .clk_out(clk_a), .t1_out(t1_a), .locked(lock_a), .cal_done(done_a), .status(st_a));
  plldelay_top #(.PROCESS(0.45)) dut_b (
    .rst_n, .clk_t1, .i2c_addr(ADDR_B), .scl, .sda_in(sda), .sda_oe(oe_b),
    .clk_out(clk_b), .t1_out(t1_b), .locked(lock_b), .cal_done(done_b), .status(st_b));
  plldelay_top #(.PROCESS(0.3)) dut_c (
    .rst_n, .clk_t1, .i2c_addr(ADDR_C), .scl, .sda_in(sda), .sda_oe(oe_c),
    .clk_out(clk_c), .t1_out(t1_c), .locked(lock_c), .cal_done(done_c), .status(st_c));

  task automatic chk(input string what, input bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  // ---------------- mechanism counters
  int n_ip_step, n_high_gain, n_cal_failed, n_pd_switch, n_trig_pd, n_i2c_wr, n_deskew;
  always @(posedge dut_a.clk) if (dut_a.u_cal.state == CAL_IP_INC) n_ip_step++;
  always @(posedge dut_b.high_gain) n_high_gain++;
  always @(posedge st_c.cal_failed) n_cal_failed++;
  always @(posedge dut_a.pd_mode) n_pd_switch++;
  always @(posedge dut_b.pd_mode) n_pd_switch++;

  // ---------------- trigger source: t1 is seen by the encoder one edge later
  bit   trig_on;
  int   gap;
  realtime missing[$];
  int   n_sent;
  always @(posedge clk_ref) begin
    if (t1) begin missing.push_back($realtime); n_sent++; end
    if (trig_on && !t1 && gap >= 4 && $urandom_range(15) == 0) begin t1 <= 1'b1; gap = 0; end
    else begin t1 <= 1'b0; gap++; end
  end

  // ---------------- clock phase error of chip A
  int      clk_fine_a;
  bit      meas_on;
  real     max_err;
  int      n_meas;
  realtime last_ref;
  always @(posedge clk_ref) last_ref = $realtime;
  always @(posedge clk_a) if (meas_on) begin
    real e;
    e = ($realtime - last_ref) / 1ns - real'(JIT) * 1.0e-3 - real'(clk_fine_a) * TD;
    while (e >  T / 2) e -= T;
    while (e < -T / 2) e += T;
    if (e < 0) e = -e;
    if (e > max_err) max_err = e;
    n_meas++;
  end

  // ---------------- trigger timing of chip A
  int coarse_a, fine_a, n_trig_out;
  real max_trig_err;
  always @(posedge t1_a) begin
    real e;
    if (missing.size() == 0) begin
      chk("t1_out without a trigger", 1'b0);
    end else begin
      e = ($realtime - missing.pop_front()) / 1ns - (1.0 + real'(coarse_a)) * T - real'(fine_a + 1) * TD;
      if (e < 0) e = -e;
      if (e > max_trig_err) max_trig_err = e;
      n_trig_out++;
      if (dut_a.pd_mode) n_trig_pd++;
    end
  end

  initial begin
    #(3ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [6:0] a, input logic [7:0] p, input logic [7:0] d);
    u_i2c.write_reg(a, p, d);
    chk("i2c write acked", u_i2c.acked);
    n_i2c_wr++;
  endtask

  initial begin
    logic [7:0] d;
    int n;
    t1 = 0; trig_on = 0; gap = 0; n_sent = 0; meas_on = 0; max_err = 0; n_meas = 0;
    max_trig_err = 0; n_trig_out = 0; coarse_a = 0; fine_a = 0; clk_fine_a = 0;
    rst_n = 0;
    #200; rst_n = 1;
    // calibration of A and B
    n = 0;
    while (!(done_a && done_b) && n < 2000) begin #(1us); n++; end
    $display("A: ip %0d high_gain %0b  B: ip %0d high_gain %0b  after %0d us",
             st_a.ip_code, st_a.high_gain, st_b.ip_code, st_b.high_gain, n);
    chk("A calibrated", done_a && lock_a && !st_a.high_gain && st_a.ip_code != 0);
    chk("B calibrated in high gain", done_b && lock_b && st_b.high_gain);
    // A's code puts 40.08 MHz inside its range: 10 + 4 c <= 40.08 <= 20 + 4 c
    chk("A code range", 10.0 + 4.0 * st_a.ip_code <= 40.08 && 40.08 <= 20.0 + 4.0 * st_a.ip_code);
    // status over I2C
    u_i2c.read_reg(ADDR_A, REG_STATUS, d);
    chk("A status over I2C", u_i2c.acked && d == st_a);
    u_i2c.read_reg(ADDR_B, REG_STATUS, d);
    chk("B status over I2C", u_i2c.acked && d == st_b);
    // settle, then measure the clock phase
    #(20us);
    meas_on = 1;
    #(30us);
    meas_on = 0;
    $display("A clock phase error, phase 0: max %.3f ns over %0d edges", max_err, n_meas);
    chk("clock phase error < 0.5 ns", max_err < 0.5 && n_meas > 1000);
    // program A: clock phase 5, trigger coarse 3 fine 7
    wr(ADDR_A, REG_CLK_FINE, 8'd5);
    wr(ADDR_A, REG_TRG_FINE, 8'd7);
    wr(ADDR_A, REG_TRG_COARSE, 8'd3);
    clk_fine_a = 5; fine_a = 7; coarse_a = 3;
    #(2us);
    max_err = 0; n_meas = 0; meas_on = 1;
    #(20us);
    meas_on = 0;
    if (n_meas > 0 && max_err < 0.5) n_deskew++;
    $display("A clock phase error, phase 5: max %.3f ns", max_err);
    chk("deskewed clock phase error < 0.5 ns", max_err < 0.5);
    // triggers
    trig_on = 1;
    #(100us);
    trig_on = 0;
    #(2us);
    $display("triggers sent %0d, out %0d, max timing error %.3f ns", n_sent, n_trig_out, max_trig_err);
    chk("every trigger decoded", n_sent == n_trig_out && n_sent > 50);
    chk("trigger timing", max_trig_err < 0.6);
    chk("A still locked through triggers", lock_a && done_a);
    // C never locks
    while (n_cal_failed == 0 && n < 2500) begin #(1us); n++; end
    chk("C calibration failed", n_cal_failed > 0 && !done_c);
    chk("C gives no trigger", !t1_c);
    // mechanisms
    $display("ip steps %0d, high gain %0d, cal failed %0d, PD switch %0d, triggers in PD %0d, i2c writes %0d, deskew %0d",
             n_ip_step, n_high_gain, n_cal_failed, n_pd_switch, n_trig_pd, n_i2c_wr, n_deskew);
    chk("offset current stepped", n_ip_step > 0);
    chk("high gain used", n_high_gain > 0);
    chk("calibration failure seen", n_cal_failed > 0);
    chk("PD mode switch", n_pd_switch >= 2);
    chk("triggers in PD mode", n_trig_pd > 0);
    chk("I2C writes", n_i2c_wr == 3);
    chk("clock deskew", n_deskew > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
