// tb_vco: checks the VCO model.
//  * the period for several (vc, ip_code, high_gain) settings against
//    f = F_BASE + ip_code*F_STEP + Kvco*vc (10 MHz, 4 MHz, 4 or 12 MHz/V)
//  * vc beyond the supply is clamped
//  * phase[k] rises k/24 of a period after phase[0], for every k
module tb_vco;
  timeunit 1ns;
  timeprecision 1fs;
  import plldelay_pkg::*;

  real                 vc;
  ip_code_t            ip_code;
  logic                high_gain;
  logic [N_PHASES-1:0] phase;
  int checks = 0, failures = 0;

  vco dut (.vc, .ip_code, .high_gain, .phase);

  task automatic check_freq(input real v, input int code, input bit hg);
    realtime t0, t1;
    real exp_f, got_f, vv;
    vc = v; ip_code = ip_code_t'(code); high_gain = hg;
    repeat (3) @(posedge phase[0]);
    t0 = $realtime;
    repeat (10) @(posedge phase[0]);
    t1 = $realtime;
    vv = (v > 2.5) ? 2.5 : ((v < 0.0) ? 0.0 : v);
    exp_f = 10.0e6 + code * 4.0e6 + (hg ? 12.0e6 : 4.0e6) * vv;
    got_f = 10.0 / (((t1 - t0) / 1ns) * 1.0e-9);
    checks++;
    if ((got_f - exp_f) / exp_f > 0.001 || (exp_f - got_f) / exp_f > 0.001) begin
      failures++;
      $display("FAIL vc=%.2f code=%0d hg=%0b: f=%.4f MHz expected %.4f", v, code, hg,
               got_f / 1e6, exp_f / 1e6);
    end
  endtask

  initial begin
    #(100us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, tk;
    real per;
    check_freq(1.25, 0, 0);
    check_freq(1.52, 6, 0);
    check_freq(0.0, 15, 0);
    check_freq(2.5, 3, 1);
    check_freq(1.0, 7, 1);
    check_freq(3.3, 2, 0);
    check_freq(-1.0, 9, 0);
    // phase spacing at 40 MHz: 10 + 6*4 + 4*1.5 = 40 MHz
    vc = 1.5; ip_code = 6; high_gain = 0;
    repeat (3) @(posedge phase[0]);
    per = 25.0;
    for (int k = 1; k < N_PHASES; k++) begin
      @(posedge phase[0]);
      t0 = $realtime;
      @(posedge phase[k]);
      tk = $realtime;
      checks++;
      if ((tk - t0) / 1ns - k * per / 24.0 > 0.01 || k * per / 24.0 - (tk - t0) / 1ns > 0.01) begin
        failures++;
        $display("FAIL phase %0d at %.3f ns, expected %.3f", k, (tk - t0) / 1ns, k * per / 24.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
