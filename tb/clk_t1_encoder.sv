// clk_t1_encoder: behavioural model of the off-chip encoder that drives the
// CLK_T1 line (not part of the chip; used by the testbenches).
//
// It generates the machine clock clk_ref (period PERIOD_NS, 50 % duty, no
// jitter) and copies it to clk_t1, except that a clock pulse is suppressed in
// each cycle that starts with t1 high: the trigger is sent as a missing pulse.
// t1 is sampled at each rising edge of clk_ref, before a driver that changes it
// on that edge with a nonblocking assignment, so such a change removes the
// pulse of the following cycle. With JITTER_PS > 0 every clk_t1 pulse is
// delayed by JITTER_PS plus a uniformly distributed +/- JITTER_PS, so clk_t1
// lags clk_ref by JITTER_PS on average. cycles counts rising edges of clk_ref.
module clk_t1_encoder #(
  parameter real PERIOD_NS = 24.95,   // 40.08 MHz
  parameter int  JITTER_PS = 0
) (
  input  logic t1,
  output logic clk_ref,
  output logic clk_t1,
  output int   cycles
);
  timeunit 1ns;
  timeprecision 1fs;

  initial begin
    clk_ref = 1'b0;
    clk_t1  = 1'b0;
    cycles  = 0;
    forever begin
      #((PERIOD_NS / 2.0) * 1ns);
      clk_ref = 1'b1;
      cycles  = cycles + 1;
      if (!t1)
        fork
          begin
            real d;
            d = real'(JITTER_PS + ((JITTER_PS > 0) ?
                      int'($urandom_range(2 * JITTER_PS)) - JITTER_PS : 0)) * 1.0e-3;
            #(d * 1ns);
            clk_t1 = 1'b1;
            #((PERIOD_NS / 2.0) * 1ns);
            clk_t1 = 1'b0;
          end
        join_none
      #((PERIOD_NS / 2.0) * 1ns);
      clk_ref = 1'b0;
    end
  end
endmodule
