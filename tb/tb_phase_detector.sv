// tb_phase_detector: self-checking test of the double-mode phase detector.
//
// Reference and feedback clocks (25 ns period) are generated with a chosen
// offset; the testbench integrates the time UP and DN are high in each period
// and compares it with the expected pulse widths:
//   PFD mode, reference 3 ns early : UP 3 ns, DN 0
//   PFD mode, reference 2 ns late  : DN 2 ns, UP 0
//   PFD mode, missing ref pulse    : DN held for a whole period
//   PD mode, reference early/late  : UP/DN for one stage delay (1.04 ns)
//   PD mode, missing ref pulse     : DN for 1.04 ns
module tb_phase_detector;
  timeunit 1ns;
  timeprecision 1fs;

  localparam real T  = 25.0;
  localparam real TD = T / 24.0;

  logic rst_n, pd_mode, ref_clk, fb_clk, fb_late, up, dn;
  int checks = 0, failures = 0;

  phase_detector dut (.rst_n, .pd_mode, .ref_clk, .fb_clk, .fb_clk_late(fb_late), .up, .dn);

  // integrate UP and DN high time
  real up_time, dn_time;
  realtime t_prev;
  logic up_prev, dn_prev;
  initial begin
    up_time = 0; dn_time = 0; t_prev = 0; up_prev = 0; dn_prev = 0;
  end
  always @(up or dn) begin
    if (up_prev) up_time += ($realtime - t_prev) / 1ns;
    if (dn_prev) dn_time += ($realtime - t_prev) / 1ns;
    t_prev = $realtime; up_prev = up; dn_prev = dn;
  end
  task automatic flush();
    if (up_prev) up_time += ($realtime - t_prev) / 1ns;
    if (dn_prev) dn_time += ($realtime - t_prev) / 1ns;
    t_prev = $realtime;
  endtask

  // one period: fb edge at 5 ns, ref edge at 5 + ref_off ns (unless missing)
  task automatic period(input real ref_off, input bit ref_missing);
    fork
      begin
        #(5.0 * 1ns) fb_clk = 1;
        #(TD * 1ns)  fb_late = 1;
        #((T/2 - TD) * 1ns) fb_clk = 0;
        #(TD * 1ns)  fb_late = 0;
      end
      begin
        #((5.0 + ref_off) * 1ns) if (!ref_missing) ref_clk = 1;
        #((T/2) * 1ns) ref_clk = 0;
      end
    join
    #(((T - 5.0 - T/2 - TD - (ref_off > TD ? ref_off - TD : 0.0))) * 1ns);
  endtask

  task automatic check(input string what, input real got_up, input real got_dn,
                       input real exp_up, input real exp_dn);
    checks++;
    if ((got_up - exp_up) > 0.05 || (exp_up - got_up) > 0.05 ||
        (got_dn - exp_dn) > 0.05 || (exp_dn - got_dn) > 0.05) begin
      failures++;
      $display("FAIL %s: up %.3f dn %.3f, expected %.3f %.3f", what, got_up, got_dn, exp_up, exp_dn);
    end
  endtask

  task automatic measure(input string what, input real ref_off, input bit missing,
                         input real exp_up, input real exp_dn);
    flush(); up_time = 0; dn_time = 0;
    period(ref_off, missing);
    flush();
    check(what, up_time, dn_time, exp_up, exp_dn);
  endtask

  initial begin
    #(200us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; pd_mode = 0; ref_clk = 0; fb_clk = 0; fb_late = 0;
    #20; rst_n = 1; #20;
    // PFD mode
    repeat (2) period(0.0, 0);
    measure("pfd ref early", -3.0, 0, 3.0, 0.0);
    measure("pfd ref late", 2.0, 0, 0.0, 2.0);
    measure("pfd aligned", 0.0, 0, 0.0, 0.0);
    // missing reference pulse: DN from the fb edge until the next ref edge
    flush(); up_time = 0; dn_time = 0;
    period(0.0, 1);
    period(0.0, 0);
    flush();
    check("pfd missing pulse", up_time, dn_time, 0.0, T);
    // PD mode
    pd_mode = 1;
    period(0.0, 0);
    measure("pd ref early", -3.0, 0, TD, 0.0);
    measure("pd ref late", 2.0, 0, 0.0, TD);
    measure("pd missing pulse", 0.0, 1, 0.0, TD);
    measure("pd ref slightly early", -0.2, 0, TD, 0.0);
    // back to PFD: outputs start from idle
    pd_mode = 0;
    period(0.0, 0);
    measure("pfd again ref early", -1.5, 0, 1.5, 0.0);
    // reset clears
    rst_n = 0; #1; checks++;
    if (up || dn) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
