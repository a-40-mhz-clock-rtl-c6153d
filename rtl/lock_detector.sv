// lock_detector: decides whether the PLL is phase locked to CLK_T1.
//
// When locked, the rising edge of CLK_T1 lines up with the rising edge of VCO
// phase 0, so CLK_T1 is high a quarter period after that edge (sampled on VCO
// phase 6) and low a quarter period before the next one (phase 18). A missing
// pulse, i.e. a trigger, gives low at both points. A reference more than a
// quarter period off, or at another frequency, is seen high at phase 18.
// Each clk cycle is therefore classed as
//   good    : early sample 1, late sample 0
//   bad     : late sample 1
//   neutral : both 0 (a trigger, or no pulse)
// locked rises after LOCK_COUNT good cycles with no bad cycle between them
// (neutral cycles neither count nor break the run) and falls on any bad cycle.
// More than MAX_MISSING neutral cycles in a row (the line has stopped, since
// triggers are isolated missing pulses) also clear lock and the count.
//
// The chip description only says that the calibration checks whether lock was
// achieved; this detector and its sampling points are this design's own.
//
// Ports: clk (VCO phase 0, which also clocks the result), clk_early (phase 6),
// clk_late (phase 18), rst_n async active low, ref_in (CLK_T1), locked.
// Latency: a sample reaches the decision on the next clk edge after it is taken.
module lock_detector #(
  parameter int unsigned LOCK_COUNT  = 128,
  parameter int unsigned MAX_MISSING = 8
) (
  input  logic clk,
  input  logic clk_early,
  input  logic clk_late,
  input  logic rst_n,
  input  logic ref_in,
  output logic locked
);
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned CNT_W  = $clog2(LOCK_COUNT + 1);
  localparam int unsigned MISS_W = $clog2(MAX_MISSING + 2);

  logic early_s, late_s;      // samples in their own phase domains
  logic early_q, late_q;      // retimed to clk
  logic [CNT_W-1:0]  good_cnt;
  logic [MISS_W-1:0] miss_cnt;    // consecutive neutral cycles

  always_ff @(posedge clk_early or negedge rst_n)
    if (!rst_n) early_s <= 1'b0;
    else        early_s <= ref_in;

  always_ff @(posedge clk_late or negedge rst_n)
    if (!rst_n) late_s <= 1'b0;
    else        late_s <= ref_in;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      early_q <= 1'b0;
      late_q  <= 1'b0;
    end else begin
      early_q <= early_s;
      late_q  <= late_s;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      good_cnt <= '0;
      miss_cnt <= '0;
      locked   <= 1'b0;
    end else if (late_q) begin                 // bad cycle
      good_cnt <= '0;
      miss_cnt <= '0;
      locked   <= 1'b0;
    end else if (early_q) begin                // good cycle
      miss_cnt <= '0;
      if (good_cnt == CNT_W'(LOCK_COUNT)) locked <= 1'b1;
      else                                good_cnt <= good_cnt + 1'b1;
    end else if (miss_cnt == MISS_W'(MAX_MISSING)) begin  // line stopped
      good_cnt <= '0;
      locked   <= 1'b0;
    end else begin                             // neutral cycle
      miss_cnt <= miss_cnt + 1'b1;
    end
endmodule
