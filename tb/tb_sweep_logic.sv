// tb_sweep_logic: self-checking test of the sweep logic with a scan
// buffer of depth 4 on a 4 x 2 macro-pixel array (8 pixel columns). The
// macro pixels are modelled in the testbench (fast-OR set by random hits
// while not frozen, freeze and clear taken from the sweep). An independent
// model of the freeze / time-stamp / scan rules predicts, every cycle, the
// freeze and clear masks, the scan-buffer push and overflow, the marker
// cycle and its time stamp, the column and MP-row enables, and the pop.
// Empty MP columns must be skipped, scans must not start while the
// barrels have no room, and scan-buffer overflows must occur.
module tb_sweep_logic;
  import fe4d_pkg::*;
  localparam int NMPX = 4, NMPY = 2, DEPTH = 4, SBW = 8 + NMPX*NMPY;
  logic clk = 0, rst_n = 0;
  logic tick, b2_ready;
  logic [7:0] ts;
  logic [NMPY-1:0][NMPX-1:0] fo, frz, freeze, clear;
  logic sb_push, sb_pop, sb_full, sb_empty, col_en, mark, sb_ovf, busy;
  logic [SBW-1:0] sb_din, sb_head;
  logic [2:0] col;
  logic [NMPY-1:0] out_en;
  logic [7:0] mark_ts;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_skip = 0, n_wait = 0, n_scans = 0;

  typedef struct { logic [7:0] ts; logic [NMPY-1:0][NMPX-1:0] map; } entry_t;
  entry_t mq[$];
  int     mlist[$];
  logic   mscan, mhalf;

  sweep_logic #(.NMPX(NMPX), .NMPY(NMPY)) dut (.clk, .rst_n, .bc_tick_i(tick), .ts_i(ts),
    .fast_or_i(fo), .frozen_i(frz), .freeze_o(freeze), .clear_o(clear),
    .sb_push_o(sb_push), .sb_din_o(sb_din), .sb_full_i(sb_full), .sb_empty_i(sb_empty),
    .sb_head_i(sb_head), .sb_pop_o(sb_pop), .col_en_o(col_en), .col_o(col),
    .out_en_o(out_en), .b2_ready_i(b2_ready), .mark_o(mark), .mark_ts_o(mark_ts),
    .sb_ovf_o(sb_ovf), .busy_o(busy));

  scan_buffer #(.DEPTH(DEPTH), .W(SBW)) u_sb (.clk, .rst_n, .push_i(sb_push), .din_i(sb_din),
    .pop_i(sb_pop), .dout_o(sb_head), .full_o(sb_full), .empty_o(sb_empty));

  always #5 clk = ~clk;

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

  initial begin
    logic [NMPY-1:0][NMPX-1:0] newly, e_clear, e_freeze;
    logic [NMPY-1:0] e_out;
    logic e_mark, e_pop, e_push, e_ovf;
    int k, period;
    tick = 0; ts = 0; fo = '0; frz = '0; b2_ready = 1;
    mscan = 0; mhalf = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      period = ((cyc / 2000) % 2) ? 3 : 12;   // short BC periods overflow the buffer
      tick = (cyc % period == 0);
      b2_ready = ($urandom_range(4) != 0);
      #1;
      // expected outputs from the model state
      newly    = fo & ~frz;
      e_push   = tick && (newly != '0) && (mq.size() < DEPTH);
      e_ovf    = tick && (newly != '0) && (mq.size() == DEPTH);
      e_freeze = e_push ? newly : '0;
      e_mark   = !mscan && mq.size() > 0 && b2_ready;
      e_clear  = '0; e_out = '0; e_pop = 0;
      if (mscan) begin
        k = mlist[0];
        for (int my = 0; my < NMPY; my++) e_out[my] = mq[0].map[my][k];
        if (mhalf) for (int my = 0; my < NMPY; my++) e_clear[my][k] = mq[0].map[my][k];
        e_pop = mhalf && mlist.size() == 1;
        chk(col_en && int'(col) == 2*k + int'(mhalf), "column");
        chk(out_en == e_out, "MP row enables");
      end else begin
        chk(!col_en, "no column outside a scan");
      end
      chk(sb_push == e_push, "push");
      chk(sb_ovf == e_ovf, "overflow");
      chk(freeze == e_freeze, "freeze");
      chk(clear == e_clear, "clear");
      chk(mark == e_mark, "mark");
      chk(sb_pop == e_pop, "pop");
      if (e_mark) chk(mark_ts == mq[0].ts, "marker time stamp");
      if (e_push) chk(sb_din == {ts, newly}, "entry");
      if (!mscan && mq.size() > 0 && !b2_ready) n_wait++;
      if (e_ovf) n_ovf++;
      // model update at the edge
      @(posedge clk);
      if (mscan) begin
        if (mhalf) begin
          void'(mlist.pop_front());
          if (mlist.size() == 0) begin mscan = 0; void'(mq.pop_front()); end
        end
        mhalf = ~mhalf;
      end else if (e_mark) begin
        logic [NMPX-1:0] cols;
        cols = '0;
        for (int my = 0; my < NMPY; my++) cols |= mq[0].map[my];
        for (int x = 0; x < NMPX; x++) if (cols[x]) mlist.push_back(x);
        if (!cols[0] || mlist.size() < NMPX) n_skip++;
        mscan = 1; mhalf = 0; n_scans++;
      end
      if (e_push) mq.push_back('{ts, newly});
      #1;
      frz = (frz | e_freeze) & ~e_clear;
      fo  = fo & ~e_clear;
      if (tick) ts++;
      for (int my = 0; my < NMPY; my++)
        for (int x = 0; x < NMPX; x++)
          if (!frz[my][x] && $urandom_range(15) == 0) fo[my][x] = 1;
    end
    chk(n_ovf > 0, "scan-buffer overflow happened");
    chk(n_skip > 0, "empty columns were skipped");
    chk(n_wait > 0, "scan waited for barrel room");
    chk(n_scans > 100, "scans ran");
    $display("scans=%0d overflows=%0d waits=%0d", n_scans, n_ovf, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
