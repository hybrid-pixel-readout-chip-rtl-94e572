// tb_slow_control_regs: self-checking test of the register file with two
// sub-matrices of 16 macro pixels each (4 mask bytes). Checks: CTRL reset
// value and write, mask bytes written and read back and mapped onto the
// mask outputs bit by bit, unmapped addresses read 0, live acquisition
// flags, sticky error flags, 16-bit hit counters counting random pulses,
// and CLR clearing flags and counters.
module tb_slow_control_regs;
  localparam int N_SUB = 2, NMP = 16;
  logic clk = 0, rst_n = 0;
  logic [15:0] addr;
  logic wr;
  logic [7:0] wdata, rdata;
  logic acq_en;
  logic [N_SUB*NMP-1:0] mask;
  logic [N_SUB-1:0] busy, fo, sbo, b2o, b1o, hw;
  int checks = 0, failures = 0;
  int cnt [N_SUB];

  slow_control_regs #(.N_SUB(N_SUB), .NMP(NMP)) dut (.clk, .rst_n, .reg_addr_i(addr),
    .reg_wr_i(wr), .reg_wdata_i(wdata), .reg_rdata_o(rdata), .acq_en_o(acq_en),
    .mp_mask_o(mask), .busy_i(busy), .fast_or_i(fo), .sb_ovf_i(sbo),
    .b2_drop_i(b2o), .b1_drop_i(b1o), .hit_wr_i(hw));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wreg(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  task automatic rreg(input logic [15:0] a, output logic [7:0] d);
    addr = a; #1;
    d = rdata;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] mb [4];
    logic [7:0] r0, r1, r2, r3;
    addr = 0; wr = 0; wdata = 0; busy = 0; fo = 0; sbo = 0; b2o = 0; b1o = 0; hw = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    @(negedge clk);
    rreg(16'h0000, r0); chk(acq_en == 1 && r0 == 8'h01, "CTRL reset value");
    wreg(16'h0000, 8'h00);
    rreg(16'h0000, r0); chk(acq_en == 0 && r0 == 8'h00, "CTRL write");
    wreg(16'h0000, 8'h01);
    for (int i = 0; i < 4; i++) begin mb[i] = 8'($urandom); wreg(16'h1000 + 16'(i), mb[i]); end
    for (int i = 0; i < 4; i++) begin rreg(16'h1000 + 16'(i), r0); chk(r0 == mb[i], "mask read back"); end
    for (int b = 0; b < 32; b++) chk(mask[b] == mb[b/8][b%8], "mask bit mapping");
    rreg(16'h1004, r0); rreg(16'h4321, r1); chk(r0 == 8'h00 && r1 == 8'h00, "unmapped reads 0");
    busy = 2'b10; fo = 2'b01; #1;
    rreg(16'h8000, r0); chk(r0 == 8'b0001_0010, "acquisition flags");
    // random status pulses
    cnt[0] = 0; cnt[1] = 0;
    for (int c = 0; c < 700; c++) begin
      @(negedge clk);
      hw  = 2'($urandom);
      sbo = (c == 100) ? 2'b01 : 2'b00;
      b2o = (c == 200) ? 2'b10 : 2'b00;
      b1o = (c == 300) ? 2'b10 : 2'b00;
      @(posedge clk);
      for (int s = 0; s < N_SUB; s++) if (hw[s]) cnt[s]++;
    end
    @(negedge clk); hw = 0; sbo = 0; b2o = 0; b1o = 0;
    @(negedge clk);
    rreg(16'h8001, r0); chk(r0 == 8'b0010_0001, "error flags sticky");
    rreg(16'h8002, r0); chk(r0 == 8'b0000_0010, "level-1 error flag");
    for (int s = 0; s < N_SUB; s++) begin
      rreg(16'h8011 + 16'(2*s), r1); rreg(16'h8010 + 16'(2*s), r0);
      chk({r1, r0} == 16'(cnt[s]), "hit counter");
    end
    wreg(16'h0000, 8'h03);
    rreg(16'h8001, r0); rreg(16'h8002, r1); rreg(16'h8010, r2); rreg(16'h8013, r3);
    chk(r0 == 0 && r1 == 0 && r2 == 0 && r3 == 0, "CLR clears flags and counters");
    chk(acq_en == 1, "CLR keeps ACQ_EN");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
