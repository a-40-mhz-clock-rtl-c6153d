// plldelay_pkg: constants and types shared by the PLL-Delay clock and trigger
// recovery chip.
//
// The VCO is a ring of 12 differential stages, so it offers 24 clock phases
// spaced one stage delay apart (1.04 ns at 40.08 MHz). Those numbers follow the
// chip description. The register map, the widths of the offset-current code and
// the state encoding of the calibration machine are this design's own choices.
package plldelay_pkg;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int unsigned N_STAGES = 12;              // VCO delay cells
  localparam int unsigned N_PHASES = 2 * N_STAGES;    // 24 phases, 1.04 ns apart
  localparam int unsigned PHASE_W  = 5;               // selects one of 24 phases
  localparam int unsigned COARSE_W = 4;               // trigger delay 0..15 cycles
  localparam int unsigned IP_W     = 4;               // VCO offset-current code

  // Phases used to sample CLK_T1: a quarter period after and before the rising
  // edge that the loop aligns phase 0 with.
  localparam int unsigned PH_EARLY_SAMPLE = N_PHASES / 4;      // 6
  localparam int unsigned PH_LATE_SAMPLE  = 3 * N_PHASES / 4;  // 18

  typedef logic [PHASE_W-1:0]  phase_sel_t;
  typedef logic [COARSE_W-1:0] coarse_t;
  typedef logic [IP_W-1:0]     ip_code_t;

  // I2C register pointers (8-bit registers)
  localparam logic [7:0] REG_CLK_FINE   = 8'h00;  // [4:0] clock phase, 0..23
  localparam logic [7:0] REG_TRG_FINE   = 8'h01;  // [4:0] trigger phase, 0..23
  localparam logic [7:0] REG_TRG_COARSE = 8'h02;  // [3:0] trigger delay, cycles
  localparam logic [7:0] REG_STATUS     = 8'h03;  // read only, see status_t

  typedef struct packed {
    logic     cal_failed;  // bit 7
    logic     cal_done;    // bit 6: calibration finished, chip functions on
    logic     high_gain;   // bit 5
    logic     locked;      // bit 4
    ip_code_t ip_code;     // bits 3:0
  } status_t;

  // Settings written over I2C.
  typedef struct packed {
    phase_sel_t clk_fine;
    phase_sel_t trg_fine;
    coarse_t    trg_coarse;
  } delay_cfg_t;

  // Calibration machine states, one per node of the state graph.
  typedef enum logic [2:0] {
    CAL_RESET   = 3'd0,  // power-on or reset
    CAL_IP_INIT = 3'd1,  // Ip = Ip0
    CAL_IP_INC  = 3'd2,  // Ip(n) = Ip(n-1) + 1
    CAL_WAIT    = 3'd3,  // give the loop time to lock
    CAL_CHECK   = 3'd4,  // lock achieved?
    CAL_HOLD    = 3'd5,  // Ip(n) = Ip(n-1): keep the code that locked
    CAL_HIGH    = 3'd6,  // switch the VCO to high gain
    CAL_END     = 3'd7   // end of calibration
  } cal_state_t;
endpackage
