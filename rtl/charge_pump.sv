// charge_pump: behavioural model of the PLL charge pump (analog).
//
// Two 10 uA current sources and four switches controlled by the phase detector:
// UP sources I_CP into the loop filter, DN sinks it, both or neither give no net
// current. The model outputs that current as a real number in amperes; the loop
// filter model integrates it. The 10 uA value follows the chip description;
// the current mismatch of a real pump is not modelled.
//
// Ports: up, dn (from the phase detector); i_out (A, positive into the filter).
module charge_pump #(
  parameter real I_CP = 10.0e-6
) (
  input  logic up,
  input  logic dn,
  output real  i_out
);
  timeunit 1ns;
  timeprecision 1fs;

  always_comb begin
    i_out = 0.0;
    if (up) i_out = i_out + I_CP;
    if (dn) i_out = i_out - I_CP;
  end
endmodule
