// tb_submatrix_readout: end-to-end test of one sub-matrix readout at a
// reduced size: 16 columns x 32 rows (8 x 4 macro pixels, one zone per
// sparsifier), scan buffer 4, level-2 barrels 8, level-1 barrel 16.
// Read clock 10 time units, fast clock 4, BC period 60 read clocks.
//
// Phase A (exact): in each BC period, after the previous scan is over,
// random pixels are hit; one MP is masked. At the next BC edge those MPs
// are frozen and read out. The fast-clock side drains the level-1 barrel;
// the stream must hold, per BC period k, the time-stamp word of k followed
// by exactly the expected set of hit words (built here from the injected
// pixels and the word layout). The latency from the BC edge to the last
// word of a period is checked against a bound derived from the scan rate
// of one column per clock.
// Phase B (stress): BC period of 6 read clocks, dense hits, output side
// stalled for a while: scan-buffer overflow, level-2 and level-1 barrel
// overflow must all be reported, the stream must stay well formed and
// every hit word must name pixels that were hit.
module tb_submatrix_readout;
  import fe4d_pkg::*;
  localparam int COLS = 16, ZPS = 1, ROWS = 32, NMPX = 8, NMPY = 4, W = 18;
  logic rd_clk = 0, fast_clk = 0, rst_n = 0, bc = 0;
  logic [ROWS-1:0][COLS-1:0] hit;
  logic [NMPY-1:0][NMPX-1:0] mask;
  logic rd, empty, fo, busy, sbo, b2o, b1o, hwr;
  logic [W-1:0] dout;
  int checks = 0, failures = 0;
  int bc_period = 60, edges = 0;
  logic stall = 0;
  logic [W-1:0] words[$];
  longint word_time[$];
  longint edge_time[int];
  logic [W-1:0] expq[int][$];
  logic [ROWS-1:0][COLS-1:0] ever_hit;
  int n_sbo = 0, n_b2o = 0, n_b1o = 0, n_hwr = 0;

  submatrix_readout #(.COLS(COLS), .ZPS(ZPS), .SB_DEPTH(4), .B2_DEPTH(8), .B1_DEPTH(16)) dut (
    .rd_clk, .fast_clk, .rst_n, .bc_clk(bc), .sub_addr_i(2'd2), .hit_i(hit), .mask_i(mask),
    .rd_i(rd), .dout_o(dout), .empty_o(empty), .fast_or_o(fo), .busy_o(busy),
    .sb_ovf_o(sbo), .b2_drop_o(b2o), .b1_drop_o(b1o), .hit_wr_o(hwr));

  always #5 rd_clk = ~rd_clk;
  always #2 fast_clk = ~fast_clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // BC clock
  initial begin
    #203;
    forever begin
      bc = 1; edges++; edge_time[edges] = $time;
      repeat (bc_period / 2) @(posedge rd_clk);
      #3 bc = 0;
      repeat (bc_period - bc_period / 2) @(posedge rd_clk);
      #3;
    end
  end

  // fast-clock reader
  always @(negedge fast_clk) rd <= !empty && !stall && rst_n;
  always @(posedge fast_clk) if (rd && !empty) begin words.push_back(dout); word_time.push_back($time); end

  always @(posedge rd_clk) begin
    if (sbo) n_sbo++;
    if (b2o) n_b2o++;
    if (b1o) n_b1o++;
    if (hwr) n_hwr++;
  end

  function automatic logic [W-1:0] ts_word(int k);
    logic [W-1:0] w;
    w = '0; w[W-1] = 1'b1; w[9:8] = 2'd2; w[7:0] = 8'(k);
    return w;
  endfunction

  initial begin
    int k, idx, start_b;
    logic [W-1:0] got[$], e[$];
    logic [ROWS-1:0][COLS-1:0] period_hits;
    hit = '0; mask = '0; ever_hit = '0;
    mask[1][3] = 1'b1;
    repeat (3) @(posedge rd_clk);
    #2 rst_n = 1;
    // ---------------- phase A ----------------
    for (int r = 0; r < 30; r++) begin
      @(posedge bc);
      k = edges;                       // time stamp of this period
      repeat (30) @(posedge rd_clk);
      period_hits = '0;
      for (int c = 0; c < 18; c++) begin
        @(negedge rd_clk);
        for (int y = 0; y < ROWS; y++)
          for (int x = 0; x < COLS; x++)
            hit[y][x] = ($urandom_range(1500) < ((r % 3) + 1));
        period_hits |= hit;
      end
      @(negedge rd_clk) hit = '0;
      ever_hit |= period_hits;
      // expected words of period k
      expq[k] = {};
      for (int x = 0; x < COLS; x++)
        for (int s = 0; s < N_SPARS; s++) begin
          logic [7:0] pat;
          for (int i = 0; i < 8; i++) pat[i] = period_hits[s*8 + i][x];
          if (mask[s][x/2]) pat = '0;
          if (pat != 0) expq[k].push_back({1'b0, 2'(s), 3'd0, 4'(x), pat});
        end
    end
    repeat (200) @(posedge rd_clk);
    // check phase A stream
    idx = 0;
    foreach (expq[kk]) begin
      if (expq[kk].size() == 0) continue;
      chk(idx < words.size() && words[idx] == ts_word(kk), "time-stamp word of period");
      idx++;
      got = {};
      while (idx < words.size() && !words[idx][W-1]) begin got.push_back(words[idx]); idx++; end
      e = expq[kk];
      got.sort(); e.sort();
      chk(got == e, "hit words of period");
      if (got != e) $display("period %0d: got %p expected %p", kk, got, e);
      // latency: BC edge -> last word, bounded by sync + one column per clock
      chk(word_time[idx-1] - edge_time[kk+1] <= 10 * (4 + 1 + COLS + 4*8) + 60, "readout latency");
    end
    chk(idx == words.size(), "no extra words");
    chk(n_sbo == 0 && n_b2o == 0 && n_b1o == 0, "no losses in phase A");
    // ---------------- phase B ----------------
    start_b = words.size();
    bc_period = 6;
    for (int c = 0; c < 1500; c++) begin
      @(negedge rd_clk);
      stall = (c >= 300 && c < 700);
      for (int y = 0; y < ROWS; y++)
        for (int x = 0; x < COLS; x++)
          hit[y][x] = ($urandom_range(100) < 8);
      ever_hit |= hit;
    end
    @(negedge rd_clk) hit = '0; stall = 0;
    bc_period = 60;
    repeat (600) @(posedge rd_clk);
    chk(!busy && empty, "readout drained");
    chk(n_sbo > 0, "scan-buffer overflow reported");
    chk(n_b2o > 0, "level-2 overflow reported");
    chk(n_b1o > 0, "level-1 overflow reported");
    chk(start_b < words.size() && words[start_b][W-1], "phase B starts with a time stamp");
    begin
      logic [7:0] last_ts;
      last_ts = words[start_b][7:0];
      for (int i = start_b + 1; i < words.size(); i++) begin
        if (words[i][W-1]) begin
          chk(words[i][7:0] != last_ts && words[i][9:8] == 2'd2, "new time stamp per sequence");
          last_ts = words[i][7:0];
        end else begin
          int s, x;
          s = int'(words[i][16:15]); x = int'(words[i][11:8]);
          chk(words[i][7:0] != 0, "non-empty pattern");
          for (int b = 0; b < 8; b++)
            if (words[i][b]) chk(ever_hit[s*8 + b][x], "hit word names hit pixels");
        end
      end
    end
    $display("words=%0d sb_ovf=%0d b2_ovf=%0d b1_ovf=%0d", words.size(), n_sbo, n_b2o, n_b1o);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
