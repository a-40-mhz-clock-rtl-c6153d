// tb_plldelay_full: one complete operation of the chip with every parameter at
// its default: reset, calibration (the loop must lock and switch to PD mode),
// programming of the clock and trigger delays over I2C, then random triggers
// on the CLK_T1 line. Checks: calibration result, clock phase error of
// clk_out against the ideal clock plus the selected phase (< 0.5 ns), one
// t1_out pulse per trigger at missing edge + (1 + coarse) T + (fine + 1) T/24,
// status read back over I2C.
module tb_plldelay_full;
  timeunit 1ns;
  timeprecision 1fs;
  import plldelay_pkg::*;

  localparam real T  = 24.95;
  localparam real TD = T / 24.0;
  localparam logic [6:0] ADDR = 7'h40;
  localparam int  CLK_FINE = 11, TRG_FINE = 20, TRG_COARSE = 15;

  logic rst_n, t1, clk_ref, clk_t1, scl, sda, sda_oe, clk_out, t1_out, locked, cal_done;
  status_t status;
  int cycles, checks = 0, failures = 0;

  clk_t1_encoder #(.PERIOD_NS(T)) u_enc (.t1, .clk_ref, .clk_t1, .cycles);
  i2c_master_model #(.HALF_NS(1250.0)) u_i2c (.slave_oe(sda_oe), .scl, .sda);
  plldelay_top dut (.rst_n, .clk_t1, .i2c_addr(ADDR), .scl, .sda_in(sda), .sda_oe,
                    .clk_out, .t1_out, .locked, .cal_done, .status);

  task automatic chk(input string what, input bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  bit trig_on = 0;
  int gap = 0, n_sent = 0, n_out = 0;
  realtime missing[$];
  always @(posedge clk_ref) begin
    if (t1) begin missing.push_back($realtime); n_sent++; end
    if (trig_on && !t1 && gap >= 4 && $urandom_range(9) == 0) begin t1 <= 1'b1; gap = 0; end
    else begin t1 <= 1'b0; gap++; end
  end

  bit meas_on = 0;
  real max_err = 0, max_trig_err = 0;
  int n_meas = 0;
  realtime last_ref;
  always @(posedge clk_ref) last_ref = $realtime;
  always @(posedge clk_out) if (meas_on) begin
    real e;
    e = ($realtime - last_ref) / 1ns - real'(CLK_FINE) * TD;
    while (e >  T / 2) e -= T;
    while (e < -T / 2) e += T;
    if (e < 0) e = -e;
    if (e > max_err) max_err = e;
    n_meas++;
  end
  always @(posedge t1_out) begin
    real e;
    if (missing.size() == 0) chk("t1_out without a trigger", 1'b0);
    else begin
      e = ($realtime - missing.pop_front()) / 1ns - (1.0 + TRG_COARSE) * T - (TRG_FINE + 1) * TD;
      if (e < 0) e = -e;
      if (e > max_trig_err) max_trig_err = e;
      n_out++;
    end
  end

  initial begin
    #(2ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    int n;
    t1 = 0;
    rst_n = 0; #200; rst_n = 1;
    n = 0;
    while (!cal_done && n < 1500) begin #(1us); n++; end
    $display("calibrated after %0d us: ip_code %0d high_gain %0b", n, status.ip_code, status.high_gain);
    chk("calibrated", cal_done && locked && dut.pd_mode && !status.cal_failed);
    u_i2c.write_reg(ADDR, REG_CLK_FINE, 8'(CLK_FINE));
    chk("ack", u_i2c.acked);
    u_i2c.write_reg(ADDR, REG_TRG_FINE, 8'(TRG_FINE));
    chk("ack", u_i2c.acked);
    u_i2c.write_reg(ADDR, REG_TRG_COARSE, 8'(TRG_COARSE));
    chk("ack", u_i2c.acked);
    u_i2c.read_reg(ADDR, REG_STATUS, d);
    chk("status", d == status && d[6]);
    #(10us);
    meas_on = 1; trig_on = 1;
    #(100us);
    trig_on = 0; meas_on = 0;
    #(1us);
    $display("clock phase error max %.3f ns; triggers %0d sent %0d out, max error %.3f ns",
             max_err, n_sent, n_out, max_trig_err);
    chk("clock phase error", max_err < 0.5 && n_meas > 3000);
    chk("triggers", n_sent == n_out && n_sent > 100);
    chk("trigger timing", max_trig_err < 0.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
