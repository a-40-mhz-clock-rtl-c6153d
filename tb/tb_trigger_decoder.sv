// tb_trigger_decoder: drives the decoder with ideal VCO phases and a CLK_T1
// line from the encoder model, locked to phase 0. Triggers are sent at random
// cycles; each must come out as a one-cycle t1 pulse set on the clk edge
// after the one whose pulse was missing (sample on phase 6, retime on the
// next phase-0 edge). With enable low no trigger may come out.
module tb_trigger_decoder;
  timeunit 1ns;
  timeprecision 1fs;

  localparam real T = 24.95;

  logic [23:0] phase;
  logic rst_n, enable, clk_t1, t1, t1_req;
  int checks = 0, failures = 0;
  int cyc = 0;
  int sent[$];

  phase_gen #(.PERIOD_NS(T), .START_NS(10.0)) u_ph (.phase);

  // CLK_T1 follows phase 0, 0.2 ns late, with the pulse removed when t1_req
  always @(posedge phase[0]) begin
    cyc++;
    if (!t1_req) fork begin #(0.2ns) clk_t1 = 1; #((T / 2) * 1ns) clk_t1 = 0; end join_none
    else sent.push_back(cyc);
  end

  trigger_decoder dut (.clk(phase[0]), .clk_sample(phase[6]), .rst_n, .enable, .clk_t1, .t1);

  // check every cycle
  int got = 0;
  always @(posedge phase[0]) begin
    #1;
    if (rst_n) begin
      bit expect_t1;
      expect_t1 = enable_d2 && (sent.size() > 0 && sent[0] == cyc - 1);
      if (sent.size() > 0 && sent[0] <= cyc - 1) void'(sent.pop_front());
      checks++;
      if (t1 != expect_t1) begin
        failures++;
        $display("FAIL cycle %0d: t1=%0b expected %0b", cyc, t1, expect_t1);
      end
      if (t1) got++;
    end
  end
  logic enable_d1, enable_d2;
  always @(posedge phase[0]) begin enable_d1 <= enable; enable_d2 <= enable_d1; end

  initial begin
    #(100us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_sent;
    clk_t1 = 0; t1_req = 0; rst_n = 0; enable = 0;
    repeat (3) @(posedge phase[0]);
    #2 rst_n = 1;
    // disabled: triggers must not come out
    repeat (4) begin
      @(posedge phase[0]); #2 t1_req = 1;
      @(posedge phase[0]); #2 t1_req = 0;
      repeat (3) @(posedge phase[0]);
    end
    repeat (3) @(posedge phase[0]);
    enable = 1;
    repeat (3) @(posedge phase[0]);
    got = 0; n_sent = 0;
    // random triggers, including back-to-back ones
    repeat (300) begin
      @(posedge phase[0]); #2;
      t1_req = ($urandom_range(3) == 0);
      if (t1_req) n_sent++;
    end
    @(posedge phase[0]); #2 t1_req = 0;
    repeat (4) @(posedge phase[0]);
    checks++;
    if (got != n_sent) begin failures++; $display("FAIL %0d triggers out of %0d", got, n_sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
