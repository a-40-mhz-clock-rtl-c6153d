// tb_loop_filter: checks the R-C1 || C2 loop filter model against closed-form
// results for a constant current step:
//  * during a long constant current I both capacitors ramp at I/(C1+C2) and
//    the resistor carries a constant drop, so vc = V0 + I t/(C1+C2) + I R (C1/(C1+C2))^2
//  * after the current stops, vc settles to V0 + Q/(C1+C2) (charge conservation)
//  * a negative current discharges the filter symmetrically
//  * vc is clamped to [0, VDD]; reset restores V_INIT
module tb_loop_filter;
  timeunit 1ns;
  timeprecision 1fs;

  localparam real R  = 33.0e3;
  localparam real C1 = 48.0e-12;
  localparam real C2 = 2.53e-12;
  localparam real V0 = 1.25;

  logic rst_n;
  real  i_in, vc;
  int   checks = 0, failures = 0;

  loop_filter dut (.rst_n, .i_in, .vc);

  task automatic near(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: vc %.4f expected %.4f", what, got, exp);
    end
  endtask

  initial begin
    #(200us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ramp_off;
    // resistor drop I*R*C1/(C1+C2), of which the C1/(C1+C2) share appears on vc
    ramp_off = 10.0e-6 * R * C1 / (C1 + C2) * C1 / (C1 + C2);
    rst_n = 0; i_in = 0.0; #10; rst_n = 1; #10;
    near("initial", vc, V0, 1.0e-6);
    // +10 uA for 1 us
    i_in = 10.0e-6;
    #1000;
    near("ramp", vc, V0 + 10.0e-6 * 1.0e-6 / (C1 + C2) + ramp_off, 0.01);
    i_in = 0.0;
    #2000;
    near("settled up", vc, V0 + 10.0e-6 * 1.0e-6 / (C1 + C2), 0.004);
    // -10 uA for 2 us
    i_in = -10.0e-6;
    #2000;
    i_in = 0.0;
    #2000;
    near("settled down", vc, V0 - 10.0e-6 * 1.0e-6 / (C1 + C2), 0.004);
    // many short pulses carry the same charge as one long one: 100 x 10 ns
    repeat (100) begin
      i_in = 10.0e-6; #10; i_in = 0.0; #15;
    end
    #2000;
    near("pulse train", vc, V0, 0.004);
    // clamp at VDD
    i_in = 10.0e-6; #20000;
    near("clamp high", vc, 2.5, 1.0e-9);
    i_in = -10.0e-6; #40000;
    near("clamp low", vc, 0.0, 1.0e-9);
    i_in = 0.0;
    rst_n = 0; #5;
    near("reset", vc, V0, 1.0e-9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
