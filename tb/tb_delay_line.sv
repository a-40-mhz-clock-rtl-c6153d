// tb_delay_line: checks the clock and trigger deskew with ideal VCO phases.
//  * clk_out rises clk_fine * T/24 after phase 0, for all 24 settings, and
//    settings above 23 act as 23
//  * a trigger pulse on t1_in (launched on a phase-0 edge) appears on t1_out
//    trg_coarse*T + (trg_fine+1)*T/24 later, for every coarse value and a
//    range of fine values, and lasts one clock period
module tb_delay_line;
  timeunit 1ns;
  timeprecision 1fs;
  import plldelay_pkg::*;

  localparam real T  = 24.95;
  localparam real TD = T / 24.0;

  logic [23:0] phase;
  logic rst_n, t1_in, clk_out, t1_out;
  delay_cfg_t cfg;
  int checks = 0, failures = 0;

  phase_gen #(.PERIOD_NS(T), .START_NS(10.0)) u_ph (.phase);
  delay_line dut (.phase, .clk(phase[0]), .rst_n, .cfg, .t1_in, .clk_out, .t1_out);

  task automatic near(input string what, input real got, input real exp);
    checks++;
    if (got - exp > 0.01 || exp - got > 0.01) begin
      failures++;
      $display("FAIL %s: %.3f ns, expected %.3f", what, got, exp);
    end
  endtask

  initial begin
    #(200us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_rise, t_fall;
  always @(posedge t1_out) t_rise = $realtime;
  always @(negedge t1_out) t_fall = $realtime;

  initial begin
    realtime t0, t1, t2;
    int ff;
    rst_n = 0; t1_in = 0; cfg = '0;
    repeat (2) @(posedge phase[0]);
    rst_n = 1;
    // clock phase
    for (int k = 0; k < 26; k++) begin
      cfg.clk_fine = phase_sel_t'(k);
      @(negedge phase[0]); @(posedge phase[0]);
      t0 = $realtime;
      if (k != 0) @(posedge clk_out);
      t1 = $realtime;
      near($sformatf("clk_fine %0d", k), (t1 - t0) / 1ns, ((k > 23) ? 23 : k) * TD);
    end
    // trigger delay
    for (int c = 0; c < 16; c++) begin
      for (int f = 0; f < 24; f += 5) begin
        cfg.trg_coarse = coarse_t'(c);
        cfg.trg_fine   = phase_sel_t'((c == 15) ? 23 : f);
        repeat (20) @(posedge phase[0]);
        t1_in <= 1'b1;
        t0 = $realtime;             // t1_in changes on this edge
        @(posedge phase[0]);
        t1_in <= 1'b0;
        repeat (c + 3) @(posedge phase[0]);
        t1 = t_rise;
        t2 = t_fall;
        ff = int'(cfg.trg_fine);
        near($sformatf("trigger c=%0d f=%0d", c, ff), (t1 - t0) / 1ns,
             real'(c) * T + real'(ff + 1) * TD);
        near("trigger width", (t2 - t1) / 1ns, T);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
