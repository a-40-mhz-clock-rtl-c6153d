// tb_lock_detector: checks the lock detector with ideal VCO phases and a
// CLK_T1 source whose offset and frequency are set by the testbench.
//  * aligned reference: locked rises after exactly LOCK_COUNT+3 clock cycles
//    (2 sampling stages, LOCK_COUNT good cycles, 1 to set the flag)
//  * missing pulses (triggers) neither break nor advance lock
//  * a reference offset by 8 ns (a third of a period) drops lock
//  * a reference 1 MHz off in frequency never stays locked
//  * no reference at all never gives lock, and a reference that stops for
//    more than MAX_MISSING (8) cycles drops lock
module tb_lock_detector;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int  LOCK_COUNT = 16;
  localparam real T = 24.95;

  logic [23:0] phase;
  logic rst_n, ref_in, locked;
  int checks = 0, failures = 0;
  real ref_offset = 0.0;     // ns, reference edge relative to phase 0
  real ref_period = T;
  bit  ref_on = 0;
  bit  skip_next = 0;

  phase_gen #(.PERIOD_NS(T), .START_NS(10.0)) u_ph (.phase);

  lock_detector #(.LOCK_COUNT(LOCK_COUNT)) dut (
    .clk(phase[0]), .clk_early(phase[6]), .clk_late(phase[18]),
    .rst_n, .ref_in, .locked);

  // reference: either tied to phase 0 with a delay of ref_offset, or free
  // running with period ref_period
  bit free_run = 0;
  initial ref_in = 0;
  always @(posedge phase[0])
    if (!free_run)
      fork
        begin
          #(ref_offset * 1ns);
          if (ref_on && !skip_next) ref_in = 1;
          skip_next = 0;
          #((T / 2) * 1ns);
          ref_in = 0;
        end
      join_none
  initial
    forever begin
      wait (free_run);
      ref_in = 1; #((ref_period / 2) * 1ns);
      ref_in = 0; #((ref_period / 2) * 1ns);
    end

  task automatic chk(input string what, input bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  initial begin
    #(200us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst_n = 0;
    // reference edges 5 ns after each phase-0 edge, well inside the window
    ref_offset = 0.3;
    #50; rst_n = 1;
    repeat (40) @(posedge phase[0]);
    chk("no lock without reference", !locked);
    @(negedge phase[0]); ref_on = 1;
    n = 0;
    while (!locked && n < 200) begin @(posedge phase[0]); #1; n++; end
    #1;
    chk("lock time", n == LOCK_COUNT + 3);
    if (n != LOCK_COUNT + 3) $display("  locked after %0d cycles", n);
    // triggers: missing pulses keep lock
    repeat (5) begin
      @(negedge phase[0]); skip_next = 1;
      repeat (3) @(posedge phase[0]);
      #1 chk("lock kept over missing pulse", locked);
    end
    // large phase offset drops lock
    ref_offset = 8.0;
    repeat (6) @(posedge phase[0]);
    #1 chk("lock lost on phase error", !locked);
    repeat (100) @(posedge phase[0]);
    chk("no lock at phase error", !locked);
    // back in phase: locks again
    ref_offset = 0.3;
    repeat (LOCK_COUNT + 6) @(posedge phase[0]);
    #1 chk("relock", locked);
    // frequency error: 1 MHz off
    ref_period = 1000.0 / (1000.0 / T + 1.0);
    free_run = 1;
    n = 0;
    repeat (400) begin @(posedge phase[0]); #1 if (locked) n++; end
    chk("frequency error does not hold lock", n < 300);
    // the line stops: lock is lost MAX_MISSING + 3 edges after the first
    // missing pulse (2 edges to reach the decision, MAX_MISSING counts, 1 to clear)
    free_run = 0;
    ref_period = T;
    ref_offset = 0.3;
    repeat (LOCK_COUNT + 6) @(posedge phase[0]);
    #1 chk("relock before the line stops", locked);
    @(negedge phase[0]); ref_on = 0;
    n = 0;
    while (locked && n < 100) begin @(posedge phase[0]); #1; n++; end
    chk("lock lost when the line stops", !locked && n == 8 + 3);
    if (n != 11) $display("  lost after %0d cycles", n);
    // reset clears
    rst_n = 0; #1 chk("reset", !locked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
