// tb_fe4d_top: end-to-end test of the chip at the 128 x 32 test-chip size
// (two sub-matrices of 64 x 32 pixels, which gives exactly the 20-bit
// output words). Read clock 10 time units, fast clock 4 (slowed to 40 in
// the stress phase), BC period 80 read clocks, slow control through a
// behavioural I2C master on the open-drain bus.
//
//  1. Status read over I2C, then one MP of sub-matrix 1 is masked over I2C.
//  2. Exact phase: random hits in both sub-matrices per BC period; the
//     output stream is decoded like a receiver (a time-stamp word names the
//     sub-matrix and the time of the hit words that follow); for every
//     (sub-matrix, period) the set of hit words must equal the set built
//     here from the injected pixels, without the masked MP. Hits also land
//     on frozen MPs during scans; they must not appear.
//  3. ACQ_EN cleared over I2C: hits give no output; set again.
//  4. The hit counter of sub-matrix 0, read over I2C, must equal the hit
//     words received from it.
//  5. Stress: short BC period, dense hits, slow fast clock: the error
//     flags read over I2C must show scan-buffer, level-2 and level-1
//     overflow in both sub-matrices, and the stream must stay decodable.
// Each mechanism is counted and a failure is counted for one that never
// happened: MP freeze with hits lost on frozen MPs, column skipping, marker
// wait, masking, time-stamp repeat at the output, and the three overflows.
module tb_fe4d_top;
  import fe4d_pkg::*;
  localparam int N_SUB = 2, COLS = 64, ZPS = 1, ROWS = 32, W = 20;
  localparam int NMPX = 32, NMPY = 4, NMP = NMPX * NMPY;
  localparam logic [6:0] DEV = {4'b0101, 3'b110};
  logic rd_clk = 0, fast_clk = 0, bc = 0, rst_n = 0, clk;
  logic [N_SUB-1:0][ROWS-1:0][COLS-1:0] hit;
  logic m_scl = 1, m_sda_oe = 0, s_sda_oe, sda_line;
  logic [W-1:0] dout;
  logic valid, gfo;
  int Q = 10;
  int checks = 0, failures = 0;
  int bc_period = 80, edges = 0, fast_half = 2;
  logic [W-1:0] words[$];
  // mechanism counters
  int n_frozen_hit = 0, n_skip = 0, n_repeat = 0, n_mask = 0;
  int n_sbo = 0, n_b2o = 0, n_b1o = 0, n_freeze = 0;

  assign clk = rd_clk;
  assign sda_line = ~(m_sda_oe | s_sda_oe);

  fe4d_top #(.N_SUB(N_SUB), .COLS(COLS), .ZPS(ZPS)) dut (
    .rd_clk, .fast_clk, .bc_clk(bc), .rst_n, .hit_i(hit), .scl_i(m_scl), .sda_i(sda_line),
    .sda_oe_o(s_sda_oe), .chip_addr_i(3'b110), .data_out_o(dout), .data_valid_o(valid),
    .global_fast_or_o(gfo));

  always #5 rd_clk = ~rd_clk;
  initial forever begin #(fast_half) fast_clk = ~fast_clk; end

  `include "i2c_master_tasks.svh"

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #203;
    forever begin
      bc = 1; edges++;
      repeat (bc_period / 2) @(posedge rd_clk);
      #3 bc = 0;
      repeat (bc_period - bc_period / 2) @(posedge rd_clk);
      #3;
    end
  end

  always @(posedge fast_clk) if (rst_n && valid) words.push_back(dout);

  // mechanism monitors (read-clock domain)
  always @(posedge rd_clk) begin
    if (dut.g_sub[0].u_sub.sb_ovf_o || dut.g_sub[1].u_sub.sb_ovf_o) n_sbo++;
    if (dut.g_sub[0].u_sub.b2_drop_o || dut.g_sub[1].u_sub.b2_drop_o) n_b2o++;
    if (dut.g_sub[0].u_sub.b1_drop_o || dut.g_sub[1].u_sub.b1_drop_o) n_b1o++;
    if (dut.g_sub[0].u_sub.u_sweep.freeze_o != '0) n_freeze++;
    if (dut.g_sub[0].u_sub.u_sweep.mark_o &&
        dut.g_sub[0].u_sub.u_sweep.head_cols != '1) n_skip++;
  end
  always @(posedge fast_clk) if (dut.u_out.ts_repeat_o) n_repeat++;

  // decoded stream: key = sub*256 + ts  ->  hit words
  logic [W-1:0] got[int][$];
  logic [W-1:0] exp_store[int][$];
  int dec_idx = 0, cur_key = -1;
  task automatic decode();
    for (; dec_idx < words.size(); dec_idx++) begin
      logic [W-1:0] w;
      w = words[dec_idx];
      if (w[W-1]) cur_key = int'(w[9:8]) * 256 + int'(w[7:0]);
      else begin
        chk(cur_key >= 0, "hit word after a time stamp");
        got[cur_key].push_back(w);
      end
    end
  endtask

  // inject random hits for n read clocks at density p/10000; records them
  logic [N_SUB-1:0][ROWS-1:0][COLS-1:0] injected;
  task automatic inject(input int n, input int p);
    injected = '0;
    for (int c = 0; c < n; c++) begin
      @(negedge rd_clk);
      for (int s = 0; s < N_SUB; s++)
        for (int y = 0; y < ROWS; y++)
          for (int x = 0; x < COLS; x++)
            hit[s][y][x] = ($urandom_range(9999) < p);
      // hits that land on frozen MPs are lost; the others are kept
      #1;
      for (int y = 0; y < ROWS; y++)
        for (int x = 0; x < COLS; x++) begin
          if (hit[0][y][x] && dut.g_sub[0].u_sub.frozen[y/8][x/2]) n_frozen_hit++;
          else if (hit[0][y][x]) injected[0][y][x] = 1'b1;
          if (hit[1][y][x] && dut.g_sub[1].u_sub.frozen[y/8][x/2]) n_frozen_hit++;
          else if (hit[1][y][x]) injected[1][y][x] = 1'b1;
        end
    end
    @(negedge rd_clk) hit = '0;
  endtask

  initial begin
    logic ok;
    logic [7:0] d[$], rq[$];
    logic [N_SUB-1:0][NMPY-1:0][NMPX-1:0] masked;
    logic [W-1:0] e[$];
    int k, n_exp_sub0, mk_sub, mk_y, mk_x, mk_idx;
    hit = '0;
    masked = '0;
    repeat (3) @(posedge rd_clk);
    #2 rst_n = 1;
    repeat (10) @(posedge rd_clk);
    // 1. slow control
    i2c_reg_read(DEV, 16'h0000, 1, rq, ok);
    chk(ok && rq[0] == 8'h01, "CTRL after reset");
    mk_sub = 1; mk_y = 2; mk_x = 5;
    mk_idx = mk_sub * NMP + mk_y * NMPX + mk_x;
    d = {8'(1 << (mk_idx % 8))};
    i2c_reg_write(DEV, 16'h1000 + 16'(mk_idx / 8), d, ok);
    chk(ok, "mask write");
    masked[mk_sub][mk_y][mk_x] = 1'b1;
    chk(dut.u_regs.mp_mask_o[mk_idx] && $countones(dut.u_regs.mp_mask_o) == 1, "mask applied");
    // 2. exact phase
    n_exp_sub0 = 0;
    for (int r = 0; r < 25; r++) begin
      logic [N_SUB-1:0][ROWS-1:0][COLS-1:0] ph;
      @(posedge bc);
      k = edges;
      // a few hits while the previous period's MPs are still frozen,
      // after the time counter has advanced
      repeat (5) @(posedge rd_clk);
      inject(8, 20);
      ph = injected;
      repeat (25) @(posedge rd_clk);
      inject(30, 2 + 3 * (r % 3));
      ph |= injected;
      for (int s = 0; s < N_SUB; s++) begin
        logic [W-1:0] ex[$];
        ex = {};
        for (int x = 0; x < COLS; x++)
          for (int sp = 0; sp < N_SPARS; sp++) begin
            logic [7:0] pat;
            for (int i = 0; i < 8; i++) pat[i] = ph[s][sp*8 + i][x];
            if (masked[s][sp][x/2]) begin if (pat != 0) n_mask++; pat = '0; end
            if (pat != 0) ex.push_back({1'b0, 2'(sp), 3'd0, 6'(x), pat});
          end
        got[s*256 + (k % 256)] = {};
        if (s == 0) n_exp_sub0 += ex.size();
        // stored for comparison after the readout
        exp_store[s*256 + (k % 256)] = ex;
      end
    end
    repeat (300) @(posedge rd_clk);
    decode();
    foreach (exp_store[key]) begin
      logic [W-1:0] g[$];
      g = {};
      if (got.exists(key)) g = got[key];
      e = exp_store[key];
      g.sort(); e.sort();
      chk(g == e, "hit words of (sub-matrix, period)");
      if (g != e) $display("key %0d: got %0d words, expected %0d", key, g.size(), e.size());
    end
    // 3. acquisition disabled
    d = {8'h00};
    i2c_reg_write(DEV, 16'h0000, d, ok);
    begin
      int n_before;
      n_before = words.size();
      inject(50, 50);
      repeat (300) @(posedge rd_clk);
      chk(words.size() == n_before, "no data with ACQ_EN cleared");
    end
    d = {8'h01};
    i2c_reg_write(DEV, 16'h0000, d, ok);
    // 4. rate counter of sub-matrix 0
    i2c_reg_read(DEV, 16'h8010, 2, rq, ok);
    chk(ok && {rq[1], rq[0]} == 16'(n_exp_sub0), "hit counter of sub-matrix 0");
    // 5. stress
    bc_period = 8;
    fast_half = 20;
    inject(1500, 900);
    bc_period = 80;
    fast_half = 2;
    repeat (3000) @(posedge rd_clk);
    i2c_reg_read(DEV, 16'h8001, 2, rq, ok);
    chk(ok && rq[0] == 8'h33, "scan-buffer and level-2 overflow flags");
    chk(rq[1] == 8'h03, "level-1 overflow flags");
    decode();
    chk(n_freeze > 0, "MPs frozen");
    chk(n_frozen_hit > 0, "hits on frozen MPs (lost)");
    chk(n_skip > 0, "empty columns skipped");
    chk(n_mask > 0, "masked MP hit");
    chk(n_repeat > 0, "time stamp repeated at the output");
    chk(n_sbo > 0 && n_b2o > 0 && n_b1o > 0, "overflows happened");
    $display("words=%0d freeze=%0d frozen_hits=%0d skip=%0d mask=%0d repeat=%0d sbo=%0d b2o=%0d b1o=%0d",
             words.size(), n_freeze, n_frozen_hit, n_skip, n_mask, n_repeat, n_sbo, n_b2o, n_b1o);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
