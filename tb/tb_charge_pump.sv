// tb_charge_pump: checks the charge-pump current for all four UP/DN
// combinations against +/- I_CP (10 uA) and 0.
module tb_charge_pump;
  timeunit 1ns;
  timeprecision 1fs;

  logic up, dn;
  real  i_out;
  int   checks = 0, failures = 0;

  charge_pump dut (.up, .dn, .i_out);

  task automatic expect_i(input logic u, input logic d, input real exp);
    up = u; dn = d; #1;
    checks++;
    if (i_out - exp > 1.0e-9 || exp - i_out > 1.0e-9) begin
      failures++;
      $display("FAIL up=%0b dn=%0b i=%g expected %g", u, d, i_out, exp);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_i(0, 0, 0.0);
    expect_i(1, 0, 10.0e-6);
    expect_i(0, 1, -10.0e-6);
    expect_i(1, 1, 0.0);
    expect_i(1, 0, 10.0e-6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
