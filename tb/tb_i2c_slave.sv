// tb_i2c_slave: checks the I2C slave with a bus master model (200 kHz SCL)
// against a reference copy of the register file kept by the testbench:
//  * writes to the three delay registers, read back one by one and two at a
//    time (pointer auto-increment), and seen on the cfg outputs
//  * a burst write of three registers
//  * the read-only status register returns the status input
//  * a frame for another device address is not acknowledged and changes
//    nothing
module tb_i2c_slave;
  timeunit 1ns;
  timeprecision 1fs;
  import plldelay_pkg::*;

  localparam logic [6:0] ADDR = 7'h35;

  logic clk = 0, rst_n, scl, sda, sda_oe;
  status_t status;
  delay_cfg_t cfg;
  int checks = 0, failures = 0;
  logic [7:0] model [4];

  always #12.475 clk = ~clk;

  i2c_slave dut (.clk, .rst_n, .dev_addr(ADDR), .scl, .sda_in(sda), .sda_oe, .status, .cfg);
  i2c_master_model #(.HALF_NS(2500.0)) m (.slave_oe(sda_oe), .scl, .sda);

  task automatic chk(input string what, input bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  task automatic compare_cfg();
    chk("cfg clk_fine", {3'b0, cfg.clk_fine} == model[0]);
    chk("cfg trg_fine", {3'b0, cfg.trg_fine} == model[1]);
    chk("cfg trg_coarse", {4'b0, cfg.trg_coarse} == model[2]);
  endtask

  initial begin
    #(50ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d, d0, d1;
    status = 8'hA6;
    model[0] = 0; model[1] = 0; model[2] = 0; model[3] = 8'hA6;
    rst_n = 0; #100; rst_n = 1; #1000;
    compare_cfg();
    // single writes
    for (int i = 0; i < 6; i++) begin
      logic [7:0] ptr, val;
      ptr = 8'($urandom_range(2));
      val = 8'($urandom_range(255));
      val = (ptr == 2) ? (val & 8'h0F) : (val & 8'h1F);
      m.write_reg(ADDR, ptr, val);
      chk("write acked", m.acked);
      model[ptr] = val;
      compare_cfg();
      m.read_reg(ADDR, ptr, d);
      chk("read acked", m.acked);
      chk($sformatf("read back reg %0d", ptr), d == model[ptr]);
    end
    // burst write from register 0
    m.acked = 1'b1;
    m.start();
    m.put_byte({ADDR, 1'b0});
    m.put_byte(8'h00);
    m.put_byte(8'h11);
    m.put_byte(8'h07);
    m.put_byte(8'h0C);
    m.stop();
    chk("burst acked", m.acked);
    model[0] = 8'h11; model[1] = 8'h07; model[2] = 8'h0C;
    compare_cfg();
    // two-byte read with auto-increment
    m.read_two(ADDR, 8'h01, d0, d1);
    chk("read_two", d0 == model[1] && d1 == model[2]);
    m.read_two(ADDR, 8'h02, d0, d1);
    chk("read_two status", d0 == model[2] && d1 == 8'hA6);
    // status follows its input
    status = 8'h5B;
    m.read_reg(ADDR, REG_STATUS, d);
    chk("status", d == 8'h5B);
    // writes to status are ignored
    m.write_reg(ADDR, REG_STATUS, 8'hFF);
    compare_cfg();
    // wrong device address
    m.write_reg(ADDR ^ 7'h01, 8'h00, 8'h03);
    chk("other address not acked", !m.acked);
    compare_cfg();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
