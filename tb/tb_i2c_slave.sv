// tb_i2c_slave: self-checking test of the slow-control slave on an
// open-drain bus driven by a behavioural master (SCL at 1/80 of the system
// clock). A register array answers the slave's register port. Checks:
// multi-byte writes land at consecutive addresses, multi-byte reads with a
// repeated start return the array contents, a transfer to another chip
// address is not acknowledged and writes nothing, and each of the eight
// hard-wired addresses selects the slave.
module tb_i2c_slave;
  logic clk = 0, rst_n = 0;
  logic m_scl = 1, m_sda_oe = 0, s_sda_oe, sda_line;
  logic [2:0] chip_addr;
  logic [15:0] reg_addr;
  logic reg_wr;
  logic [7:0] reg_wdata, reg_rdata;
  logic [7:0] regs [65536];
  int Q = 20;
  int checks = 0, failures = 0, n_wr = 0;

  assign sda_line = ~(m_sda_oe | s_sda_oe);

  i2c_slave #(.DEV_ID(4'b0101)) dut (.clk, .rst_n, .scl_i(m_scl), .sda_i(sda_line),
    .sda_oe_o(s_sda_oe), .chip_addr_i(chip_addr), .reg_addr_o(reg_addr),
    .reg_wr_o(reg_wr), .reg_wdata_o(reg_wdata), .reg_rdata_i(reg_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) if (reg_wr) begin regs[reg_addr] <= reg_wdata; n_wr++; end
  assign reg_rdata = regs[reg_addr];
  initial for (int i = 0; i < 65536; i++) regs[i] = 8'hEE;

  `include "i2c_master_tasks.svh"

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok;
    logic [7:0] wd[$], rdq[$];
    logic [15:0] a;
    chip_addr = 3'b011;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    repeat (10) @(posedge clk);
    for (int t = 0; t < 12; t++) begin
      chip_addr = 3'(t);
      a = 16'($urandom);
      wd = {};
      for (int i = 0; i < 1 + t % 4; i++) wd.push_back(8'($urandom));
      i2c_reg_write({4'b0101, chip_addr}, a, wd, ok);
      chk(ok, "write acknowledged");
      foreach (wd[i]) chk(regs[a + 16'(i)] == wd[i], "written byte");
      i2c_reg_read({4'b0101, chip_addr}, a, wd.size(), rdq, ok);
      chk(ok, "read acknowledged");
      foreach (wd[i]) chk(rdq[i] == wd[i], "read byte");
    end
    // another chip's address: no acknowledge, nothing written
    n_wr = 0;
    wd = {8'h55};
    i2c_reg_write({4'b0101, chip_addr ^ 3'b001}, 16'h0042, wd, ok);
    chk(!ok, "foreign address not acknowledged");
    chk(n_wr == 0, "foreign address writes nothing");
    i2c_reg_write({4'b1101, chip_addr}, 16'h0042, wd, ok);
    chk(!ok, "wrong device id not acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
