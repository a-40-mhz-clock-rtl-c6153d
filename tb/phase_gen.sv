// phase_gen: ideal 24-phase clock source for the testbenches. phase[k] is a
// 50 % duty clock of period PERIOD_NS, delayed by k*PERIOD_NS/24 from phase[0],
// whose first rising edge is at START_NS.
module phase_gen #(
  parameter real PERIOD_NS = 24.95,
  parameter real START_NS  = 10.0
) (
  output logic [23:0] phase
);
  timeunit 1ns;
  timeprecision 1fs;

  logic [11:0] ring;
  initial begin
    ring = '0;
    #(START_NS * 1ns);
    forever begin
      ring = {ring[10:0], ~ring[11]};
      #((PERIOD_NS / 24.0) * 1ns);
    end
  end
  assign phase = {~ring, ring};
endmodule
