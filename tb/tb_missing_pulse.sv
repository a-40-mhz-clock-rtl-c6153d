// tb_missing_pulse: response of the locked loop to one isolated missing clock
// pulse (a single trigger), at default parameters. After calibration and
// settling, the phase error of clk_out (phase 0) against the ideal clock is
// recorded every cycle: 4 us before the missing pulse as the baseline, then
// 8 us after it. Checks: the peak deviation from the baseline stays below
// 0.5 ns, the error is back within 50 ps of the baseline mean in the last
// 2 us, and the trigger comes out. Repeated for 5 isolated triggers.
module tb_missing_pulse;
  timeunit 1ns;
  timeprecision 1fs;
  import plldelay_pkg::*;

  localparam real T = 24.95;

  logic rst_n, t1, clk_ref, clk_t1, sda_oe, clk_out, t1_out, locked, cal_done;
  status_t status;
  int cycles, checks = 0, failures = 0;

  clk_t1_encoder #(.PERIOD_NS(T)) u_enc (.t1, .clk_ref, .clk_t1, .cycles);
  plldelay_top dut (.rst_n, .clk_t1, .i2c_addr(7'h10), .scl(1'b1), .sda_in(1'b1), .sda_oe,
                    .clk_out, .t1_out, .locked, .cal_done, .status);

  task automatic chk(input string what, input bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  realtime last_ref;
  real err;               // latest phase error, ns (positive: clk_out late)
  always @(posedge clk_ref) last_ref = $realtime;
  always @(posedge clk_out) begin
    real e;
    e = ($realtime - last_ref) / 1ns;
    while (e >  T / 2) e -= T;
    while (e < -T / 2) e += T;
    err = e;
  end
  int n_t1 = 0;
  always @(posedge t1_out) n_t1++;

  initial begin
    #(2ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    real base, peak, tail, d;
    t1 = 0;
    rst_n = 0; #200; rst_n = 1;
    n = 0;
    while (!cal_done && n < 1500) begin #(1us); n++; end
    chk("calibrated", cal_done);
    #(20us);
    for (int k = 0; k < 5; k++) begin
      base = 0;
      repeat (160) begin @(posedge clk_ref); #1; base += err; end
      base /= 160.0;
      @(posedge clk_ref); t1 <= 1'b1;
      @(posedge clk_ref); t1 <= 1'b0;
      peak = 0; tail = 0;
      for (int i = 0; i < 320; i++) begin
        @(posedge clk_ref); #1;
        d = err - base;
        if (d < 0) d = -d;
        if (d > peak) peak = d;
        if (i >= 240) tail += err;
      end
      tail = tail / 80.0 - base;
      $display("missing pulse %0d: baseline %.3f ns, peak deviation %.3f ns, offset after 8 us %.3f ns",
               k, base, peak, tail);
      chk("peak phase error < 0.5 ns", peak < 0.5);
      chk("recovered", tail < 0.05 && tail > -0.05);
    end
    chk("all triggers out", n_t1 == 5 && locked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
