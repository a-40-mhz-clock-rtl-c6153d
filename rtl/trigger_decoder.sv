// trigger_decoder: recovers the first-level trigger T1 from CLK_T1.
//
// On the encoded line a trigger is sent by suppressing one clock pulse. With
// the PLL locked, VCO phase 0 rises with CLK_T1 and CLK_T1 is high a quarter
// period later, so the line is sampled on VCO phase 6 (clk_sample): a low
// sample is a missing pulse. The sample is retimed to clk (phase 0), and t1 is
// a one-cycle pulse for each missing clock pulse while enable is high (enable
// comes from the calibration, which holds the decoder off until lock).
//
// The coding scheme, and that the recovered trigger is delayed afterwards,
// follow the chip description; sampling a quarter period after the edge is
// this design's own choice.
//
// Ports: clk (VCO phase 0), clk_sample (VCO phase 6), rst_n async active low,
// enable, clk_t1 (encoded line), t1.
// Timing: a pulse missing at clk edge n gives t1 high from edge n+1 to n+2.
module trigger_decoder (
  input  logic clk,
  input  logic clk_sample,
  input  logic rst_n,
  input  logic enable,
  input  logic clk_t1,
  output logic t1
);
  timeunit 1ns;
  timeprecision 1fs;

  logic sample_s;

  always_ff @(posedge clk_sample or negedge rst_n)
    if (!rst_n) sample_s <= 1'b1;
    else        sample_s <= clk_t1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) t1 <= 1'b0;
    else        t1 <= enable & ~sample_s;
endmodule
