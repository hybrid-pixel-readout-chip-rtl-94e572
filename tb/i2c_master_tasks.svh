// Behavioural I2C bus master for the testbenches. Expects in scope:
// clk, m_scl, m_sda_oe (master pulls SDA low), sda_line (the wired-AND
// bus level) and an int Q (quarter bit period in clk cycles).
task automatic q_wait();
  repeat (Q) @(posedge clk);
endtask

task automatic i2c_start();
  m_sda_oe = 0; q_wait();
  m_scl = 1;    q_wait();
  m_sda_oe = 1; q_wait();
  m_scl = 0;    q_wait();
endtask

task automatic i2c_stop();
  m_sda_oe = 1; q_wait();
  m_scl = 1;    q_wait();
  m_sda_oe = 0; q_wait(); q_wait();
endtask

task automatic i2c_bit_out(input logic b);
  m_sda_oe = ~b; q_wait();
  m_scl = 1;     q_wait(); q_wait();
  m_scl = 0;     q_wait();
endtask

task automatic i2c_bit_in(output logic b);
  m_sda_oe = 0; q_wait();
  m_scl = 1;    q_wait();
  b = sda_line; q_wait();
  m_scl = 0;    q_wait();
endtask

// Sends a byte, returns 1 if the slave acknowledged.
task automatic i2c_write_byte(input logic [7:0] d, output logic ack);
  logic b;
  for (int i = 7; i >= 0; i--) i2c_bit_out(d[i]);
  i2c_bit_in(b);
  ack = ~b;
endtask

task automatic i2c_read_byte(input logic ack, output logic [7:0] d);
  logic b;
  for (int i = 7; i >= 0; i--) begin i2c_bit_in(b); d[i] = b; end
  i2c_bit_out(~ack);
endtask

// Register write of n bytes from buf starting at addr; returns all acks.
task automatic i2c_reg_write(input logic [6:0] dev, input logic [15:0] addr,
                             input logic [7:0] data[$], output logic ok);
  logic a;
  ok = 1;
  i2c_start();
  i2c_write_byte({dev, 1'b0}, a); ok &= a;
  i2c_write_byte(addr[15:8], a); ok &= a;
  i2c_write_byte(addr[7:0], a);  ok &= a;
  foreach (data[i]) begin i2c_write_byte(data[i], a); ok &= a; end
  i2c_stop();
endtask

task automatic i2c_reg_read(input logic [6:0] dev, input logic [15:0] addr,
                            input int n, output logic [7:0] data[$], output logic ok);
  logic a;
  logic [7:0] d;
  ok = 1;
  data = {};
  i2c_start();
  i2c_write_byte({dev, 1'b0}, a); ok &= a;
  i2c_write_byte(addr[15:8], a); ok &= a;
  i2c_write_byte(addr[7:0], a);  ok &= a;
  i2c_start();
  i2c_write_byte({dev, 1'b1}, a); ok &= a;
  for (int i = 0; i < n; i++) begin
    i2c_read_byte(i != n-1, d);
    data.push_back(d);
  end
  i2c_stop();
endtask
