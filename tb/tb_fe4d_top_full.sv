// tb_fe4d_top_full: one complete operation of the chip at its full size,
// every parameter at its default: 4 sub-matrices of 80 x 256 pixels
// (320 x 256), 21-bit output words, scan buffer 8, level-2 barrels 8,
// level-1 barrels 128. The chip's settings are read over I2C; then, in one
// BC period, a pattern of hits is placed in every sub-matrix, including the
// corner pixels (column 79, row 255) and several zones of one column and of
// one macro pixel. After the next BC edge the output stream must carry, for
// each sub-matrix, its time-stamp word followed by exactly the expected
// hit words, built here from the word layout.
module tb_fe4d_top_full;
  import fe4d_pkg::*;
  localparam int N_SUB = 4, COLS = 80, ROWS = 256, W = 21;
  localparam logic [6:0] DEV = {4'b0101, 3'b001};
  logic rd_clk = 0, fast_clk = 0, bc = 0, rst_n = 0, clk;
  logic [N_SUB-1:0][ROWS-1:0][COLS-1:0] hit;
  logic m_scl = 1, m_sda_oe = 0, s_sda_oe, sda_line;
  logic [W-1:0] dout;
  logic valid, gfo;
  int Q = 8;
  int checks = 0, failures = 0;
  logic [W-1:0] words[$];

  assign clk = rd_clk;
  assign sda_line = ~(m_sda_oe | s_sda_oe);

  fe4d_top dut (
    .rd_clk, .fast_clk, .bc_clk(bc), .rst_n, .hit_i(hit), .scl_i(m_scl), .sda_i(sda_line),
    .sda_oe_o(s_sda_oe), .chip_addr_i(3'b001), .data_out_o(dout), .data_valid_o(valid),
    .global_fast_or_o(gfo));

  always #5 rd_clk = ~rd_clk;
  always #2 fast_clk = ~fast_clk;
  always @(posedge fast_clk) if (rst_n && valid) words.push_back(dout);

  `include "i2c_master_tasks.svh"

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok;
    logic [7:0] rq[$];
    logic [W-1:0] e[N_SUB][$], g[N_SUB][$];
    int cur;
    hit = '0;
    repeat (3) @(posedge rd_clk);
    #2 rst_n = 1;
    i2c_reg_read(DEV, 16'h0000, 1, rq, ok);
    chk(ok && rq[0] == 8'h01, "CTRL over I2C");
    // BC edge 1 starts period 1
    @(negedge rd_clk) bc = 1;
    repeat (10) @(negedge rd_clk);
    bc = 0;
    // hits of period 1
    for (int s = 0; s < N_SUB; s++) begin
      logic [ROWS-1:0][COLS-1:0] h;
      h = '0;
      h[255][79] = 1'b1;                     // corner
      h[0][0] = 1'b1;                        // other corner
      h[8*s + 3][17] = 1'b1;                 // one pixel, zone depends on s
      h[64*s + 9][40] = 1'b1;                // same column, two zones
      h[64*s + 10][40] = 1'b1;
      h[64*s + 63][40] = 1'b1;
      h[130][2*s + 1] = 1'b1;                // both columns of one MP
      h[131][2*s] = 1'b1;
      @(negedge rd_clk);
      hit[s] = h;
      // expected words
      e[s] = {};
      for (int x = 0; x < COLS; x++)
        for (int z = 0; z < ROWS / 8; z++)
          if (h[z*8 +: 8] != 0) begin
            logic [7:0] pat;
            for (int i = 0; i < 8; i++) pat[i] = h[z*8 + i][x];
            if (pat != 0) e[s].push_back({1'b0, 2'(z / 8), 3'(z % 8), 7'(x), pat});
          end
      @(negedge rd_clk);
      hit[s] = '0;
    end
    repeat (20) @(negedge rd_clk);
    chk(gfo, "global fast-OR");
    // BC edge 2 ends period 1: freeze, time stamp 1, readout
    bc = 1;
    repeat (400) @(negedge rd_clk);
    // decode
    cur = -1;
    foreach (words[i]) begin
      if (words[i][W-1]) begin
        chk(words[i][7:0] == 8'd1 && words[i][W-2:10] == 0, $sformatf("time-stamp word %h", words[i]));
        cur = int'(words[i][9:8]);
      end else begin
        chk(cur >= 0, "hit after a time stamp");
        if (cur >= 0) g[cur].push_back(words[i]);
      end
    end
    for (int s = 0; s < N_SUB; s++) begin
      g[s].sort(); e[s].sort();
      chk(e[s].size() == 7 && g[s] == e[s], "hit words of sub-matrix");
      if (g[s] != e[s]) $display("sub %0d: got %p expected %p", s, g[s], e[s]);
    end
    chk(!gfo, "all macro pixels reset after readout");
    $display("words=%0d", words.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
