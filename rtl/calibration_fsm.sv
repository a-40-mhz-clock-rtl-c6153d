// calibration_fsm: auto-calibration of the VCO offset current and gain.
//
// The low-gain VCO has a family of characteristics, one per offset-current
// code; only some of them pass through 40.08 MHz for a given chip, supply,
// temperature and radiation dose. After reset the machine tries the codes from
// the lowest up: for each it waits WAIT_CYCLES clock cycles so the loop can
// lock, then looks at the lock detector. The first code that locks is kept.
// If even the highest code does not lock, the VCO is switched to high gain and
// the sweep starts again from the lowest code. Once locked, the phase detector
// is switched from PFD to PD mode and cal_done enables the rest of the chip.
//
// States (one per node of the calibration state graph):
//   RESET -> IP_INIT (Ip = Ip0) -> WAIT -> CHECK
//   CHECK, no lock, Ip < max       -> IP_INC (Ip + 1) -> WAIT
//   CHECK, no lock, Ip = max, low  -> HIGH (high gain on) -> IP_INIT
//   CHECK, lock,    Ip < max       -> HOLD (keep Ip) -> END
//   CHECK, lock,    Ip = max       -> END
//   CHECK, no lock, Ip = max, high -> END with cal_failed set
//   END stays while locked; if lock is lost, or the sweep failed, calibration
//   starts again at IP_INIT (the "calibration failed" path).
// Taken from the chip description: the sweep order, the switch to high gain,
// the PD mode switch and the enabling of the chip once locked. This design's
// own choices: IP_INIT goes straight to WAIT so that Ip0 itself is tried (as
// the text says; the graph draws IP_INIT -> IP_INC), the failed case in high
// gain, restarting on loss of lock, keeping the gain mode across a restart,
// and the wait length.
//
// Ports: clk (VCO phase 0; the VCO runs even when unlocked), rst_n async active
// low, locked; ip_code, high_gain, pd_mode, cal_done, cal_failed, state.
module calibration_fsm
  import plldelay_pkg::*;
#(
  parameter int unsigned WAIT_CYCLES = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       locked,
  output ip_code_t   ip_code,
  output logic       high_gain,
  output logic       pd_mode,
  output logic       cal_done,
  output logic       cal_failed,
  output cal_state_t state
);
  timeunit 1ns;
  timeprecision 1fs;

  localparam ip_code_t IP_MAX = '1;
  localparam int unsigned WCNT_W = $clog2(WAIT_CYCLES + 1);

  logic [WCNT_W-1:0] wait_cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state      <= CAL_RESET;
      ip_code    <= '0;
      high_gain  <= 1'b0;
      cal_failed <= 1'b0;
      wait_cnt   <= '0;
    end else begin
      unique case (state)
        CAL_RESET: state <= CAL_IP_INIT;
        CAL_IP_INIT: begin
          ip_code  <= '0;
          wait_cnt <= '0;
          state    <= CAL_WAIT;
        end
        CAL_IP_INC: begin
          ip_code  <= ip_code + 1'b1;
          wait_cnt <= '0;
          state    <= CAL_WAIT;
        end
        CAL_WAIT: begin
          if (wait_cnt == WCNT_W'(WAIT_CYCLES - 1)) state <= CAL_CHECK;
          else                                      wait_cnt <= wait_cnt + 1'b1;
        end
        CAL_CHECK: begin
          if (locked) begin
            state <= (ip_code == IP_MAX) ? CAL_END : CAL_HOLD;
          end else if (ip_code != IP_MAX) begin
            state <= CAL_IP_INC;
          end else if (!high_gain) begin
            state <= CAL_HIGH;
          end else begin
            cal_failed <= 1'b1;
            state      <= CAL_END;
          end
        end
        CAL_HOLD: state <= CAL_END;
        CAL_HIGH: begin
          high_gain <= 1'b1;
          state     <= CAL_IP_INIT;
        end
        CAL_END: begin
          if (locked) cal_failed <= 1'b0;
          else        state      <= CAL_IP_INIT;
        end
        default: state <= CAL_RESET;
      endcase
    end

  assign pd_mode  = (state == CAL_END) && locked;
  assign cal_done = (state == CAL_END) && locked;
endmodule
