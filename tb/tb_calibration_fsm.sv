// tb_calibration_fsm: checks the auto-calibration sequence against a simple
// model of the PLL: the loop locks, LOCK_DELAY cycles after a setting is
// applied, only for the (ip_code, high_gain) pairs the scenario allows.
// For each scenario it checks the final code, gain, PD mode, cal_done and
// cal_failed, the order of the codes tried, and the number of cycles, worked
// out from the state sequence: one cycle each for RESET, IP_INIT, IP_INC,
// HOLD and HIGH, WAIT_CYCLES + 1 for WAIT and CHECK.
module tb_calibration_fsm;
  timeunit 1ns;
  timeprecision 1fs;
  import plldelay_pkg::*;

  localparam int W = 20;          // WAIT_CYCLES
  localparam int LOCK_DELAY = 5;

  logic clk = 0, rst_n, locked;
  ip_code_t ip_code;
  logic high_gain, pd_mode, cal_done, cal_failed;
  cal_state_t state;
  int checks = 0, failures = 0;

  calibration_fsm #(.WAIT_CYCLES(W)) dut (.clk, .rst_n, .locked, .ip_code, .high_gain,
                                          .pd_mode, .cal_done, .cal_failed, .state);

  always #12.5 clk = ~clk;

  // PLL model
  int good_code;   // code that locks, -1 for none
  bit good_hg;     // gain mode it needs
  bit force_unlock;
  int settle;
  ip_code_t last_code;
  logic last_hg;
  always @(posedge clk) begin
    if (ip_code != last_code || high_gain != last_hg) settle <= 0;
    else if (settle < 1000) settle <= settle + 1;
    last_code <= ip_code;
    last_hg   <= high_gain;
  end
  assign locked = !force_unlock && good_code >= 0 && int'(ip_code) == good_code &&
                  high_gain == good_hg && settle >= LOCK_DELAY;

  // codes tried, in order
  int tried[$];
  always @(posedge clk) if (state == CAL_WAIT && dut.wait_cnt == 0) tried.push_back(int'(ip_code));

  task automatic chk(input string what, input bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  task automatic run(input int code, input bit hg, output int cycles);
    good_code = code; good_hg = hg; force_unlock = 0;
    tried.delete();
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cycles = 0;
    while (!(state == CAL_END) && cycles < 100000) begin @(posedge clk); #1; cycles++; end
  endtask

  initial begin
    #(20ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, exp_cyc;
    // 1: lock at code 5, low gain
    run(5, 0, cyc);
    exp_cyc = 2 + 6 * (W + 1) + 5 + 1;
    chk("code 5 cycles", cyc == exp_cyc);
    if (cyc != exp_cyc) $display("  %0d cycles, expected %0d", cyc, exp_cyc);
    chk("code 5 result", ip_code == 5 && !high_gain && cal_done && pd_mode && !cal_failed);
    chk("code 5 sweep order", tried.size() == 6 && tried[0] == 0 && tried[5] == 5);
    repeat (50) @(posedge clk);
    #1 chk("code 5 stays", state == CAL_END && ip_code == 5 && cal_done);
    // loss of lock restarts the calibration from Ip0
    force_unlock = 1;
    @(posedge clk); #1;
    chk("restart on loss of lock", state == CAL_IP_INIT && !pd_mode && !cal_done);
    force_unlock = 0;
    tried.delete();
    cyc = 0;
    while (state != CAL_END && cyc < 100000) begin @(posedge clk); #1; cyc++; end
    chk("relock after restart", ip_code == 5 && cal_done && tried[0] == 0);

    // 2: lock at code 0 on the first try
    run(0, 0, cyc);
    exp_cyc = 2 + (W + 1) + 1;
    chk("code 0 cycles", cyc == exp_cyc);
    chk("code 0 result", ip_code == 0 && cal_done && tried.size() == 1);

    // 3: lock at the highest code, low gain: no HOLD state
    run(15, 0, cyc);
    exp_cyc = 2 + 16 * (W + 1) + 15;
    chk("code 15 cycles", cyc == exp_cyc);
    chk("code 15 result", ip_code == 15 && !high_gain && cal_done);

    // 4: lock only in high gain at code 3
    run(3, 1, cyc);
    exp_cyc = 2 + 16 * (W + 1) + 15 + 1 + 1 + 4 * (W + 1) + 3 + 1;
    chk("high gain cycles", cyc == exp_cyc);
    if (cyc != exp_cyc) $display("  %0d cycles, expected %0d", cyc, exp_cyc);
    chk("high gain result", ip_code == 3 && high_gain && cal_done && pd_mode);
    chk("high gain sweep", tried.size() == 20 && tried[15] == 15 && tried[16] == 0);

    // 5: never locks: calibration failed, then it starts over
    run(-1, 0, cyc);
    exp_cyc = 2 + 16 * (W + 1) + 15 + 1 + 1 + 16 * (W + 1) + 15;
    chk("failed cycles", cyc == exp_cyc);
    chk("failed flags", cal_failed && !cal_done && !pd_mode && high_gain);
    @(posedge clk); #1;
    chk("failed restarts", state == CAL_IP_INIT && cal_failed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
