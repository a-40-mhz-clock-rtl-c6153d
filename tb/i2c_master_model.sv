// i2c_master_model: behavioural I2C bus master for the testbenches.
//
// Drives SCL and resolves the open-drain SDA line: sda is low when the master
// or the slave (slave_oe) pulls it. Tasks:
//   write_reg(addr, ptr, data)      S addr+W ptr data P
//   read_reg (addr, ptr, data)      S addr+W ptr Sr addr+R data(N) P
//   read_two (addr, ptr, d0, d1)    as read_reg with two bytes (A then N)
// Each task returns acked = 1 when every byte the slave had to acknowledge
// was acknowledged. HALF_NS is half an SCL period.
module i2c_master_model #(
  parameter real HALF_NS = 500.0
) (
  input  logic slave_oe,
  output logic scl,
  output logic sda
);
  timeunit 1ns;
  timeprecision 1fs;

  logic m_low;
  bit   acked;
  assign sda = ~(m_low | slave_oe);

  initial begin
    scl   = 1'b1;
    m_low = 1'b0;
  end

  task automatic quarter();
    #((HALF_NS / 2.0) * 1ns);
  endtask

  task automatic start();
    // SCL high; SDA released then pulled low
    m_low = 1'b0; quarter();
    scl = 1'b1;   quarter();
    m_low = 1'b1; quarter();
    scl = 1'b0;   quarter();
  endtask

  task automatic stop();
    m_low = 1'b1; quarter();
    scl = 1'b1;   quarter();
    m_low = 1'b0; quarter(); quarter();
  endtask

  task automatic put_bit(input logic b);
    m_low = ~b; quarter();
    scl = 1'b1; quarter(); quarter();
    scl = 1'b0; quarter();
  endtask

  task automatic get_bit(output logic b);
    m_low = 1'b0; quarter();
    scl = 1'b1;   quarter();
    b = sda;      quarter();
    scl = 1'b0;   quarter();
  endtask

  task automatic put_byte(input logic [7:0] d);
    logic a;
    for (int i = 7; i >= 0; i--) put_bit(d[i]);
    get_bit(a);
    if (a) acked = 1'b0;
  endtask

  task automatic get_byte(output logic [7:0] d, input logic ack);
    for (int i = 7; i >= 0; i--) get_bit(d[i]);
    put_bit(~ack);
  endtask

  task automatic write_reg(input logic [6:0] addr, input logic [7:0] ptr,
                           input logic [7:0] data);
    acked = 1'b1;
    start();
    put_byte({addr, 1'b0});
    put_byte(ptr);
    put_byte(data);
    stop();
  endtask

  task automatic read_reg(input logic [6:0] addr, input logic [7:0] ptr,
                          output logic [7:0] data);
    acked = 1'b1;
    start();
    put_byte({addr, 1'b0});
    put_byte(ptr);
    start();
    put_byte({addr, 1'b1});
    get_byte(data, 1'b0);
    stop();
  endtask

  task automatic read_two(input logic [6:0] addr, input logic [7:0] ptr,
                          output logic [7:0] d0, output logic [7:0] d1);
    acked = 1'b1;
    start();
    put_byte({addr, 1'b0});
    put_byte(ptr);
    start();
    put_byte({addr, 1'b1});
    get_byte(d0, 1'b1);
    get_byte(d1, 1'b0);
    stop();
  endtask
endmodule
