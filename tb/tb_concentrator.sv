// tb_concentrator: self-checking test of the concentrator with four
// level-2 barrels modelled as queues. Each barrel is loaded with 60 scans:
// a time-stamp word (the same in all four) followed by a random number of
// uniquely numbered hit words. The level-1 side is randomly full. Checks:
// the output is TS(0), hits of scan 0, TS(1), ... with every hit of a scan
// either written or reported lost while it came before the next time
// stamp; a hit is lost only when the level-1 barrel is full; a time-stamp
// word is never lost and is written once per scan.
module tb_concentrator;
  localparam int N = 4, W = 21, NSCAN = 60;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][W-1:0] head;
  logic [N-1:0] rd_s;
  logic [N-1:0] empty, rd;
  logic l1_full, l1_wr, drop, tsw;
  logic [W-1:0] l1_data;
  logic [W-1:0] q[N][$];
  int scan_of[int];       // hit id -> scan number
  int remaining[NSCAN];
  int checks = 0, failures = 0, cur = -1, n_drop = 0, n_hits = 0;

  concentrator #(.N(N), .W(W)) dut (.clk, .rst_n, .head_i(head), .empty_i(empty),
    .rd_o(rd), .l1_full_i(l1_full), .l1_wr_o(l1_wr), .l1_data_o(l1_data),
    .drop_o(drop), .ts_o(tsw));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic update_heads();
    for (int i = 0; i < N; i++) begin
      empty[i] = (q[i].size() == 0);
      head[i]  = empty[i] ? '0 : q[i][0];
    end
  endtask

  initial begin
    int id, nh;
    logic [W-1:0] w;
    id = 0;
    for (int s = 0; s < NSCAN; s++) begin
      remaining[s] = 0;
      for (int i = 0; i < N; i++) begin
        q[i].push_back({1'b1, 10'd0, 2'd1, 8'(s)});
        nh = $urandom_range(0, 6);
        for (int h = 0; h < nh; h++) begin
          q[i].push_back({1'b0, (W-1)'(id)});
          scan_of[id] = s;
          remaining[s]++;
          id++;
        end
      end
    end
    l1_full = 0;
    update_heads();
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      l1_full = ($urandom_range(5) == 0);
      #1;
      for (int i = 0; i < N; i++) chk(!(rd[i] && empty[i]), "no read of an empty barrel");
      chk(!(drop && !l1_full), "loss only when level-1 is full");
      chk(!(l1_wr && l1_full), "no write when full");
      if (tsw) begin
        chk(rd == '1, "time stamp removed from all barrels");
        if (cur >= 0) chk(remaining[cur] == 0, "scan complete before next time stamp");
        cur++;
        chk(l1_data == {1'b1, 10'd0, 2'd1, 8'(cur)}, "time-stamp word");
      end else if (l1_wr || drop) begin
        chk($onehot(rd), "one hit per clock");
        w = l1_data;
        id = int'(w[W-2:0]);
        chk(!w[W-1] && scan_of.exists(id) && scan_of[id] == cur, "hit belongs to current scan");
        if (scan_of.exists(id)) begin remaining[scan_of[id]]--; scan_of.delete(id); end
        if (drop) n_drop++; else n_hits++;
      end else begin
        chk(rd == '0, "no pop without output");
      end
      rd_s = rd;
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) if (rd_s[i]) void'(q[i].pop_front());
      update_heads();
      if (cur == NSCAN-1 && remaining[cur] == 0) break;
    end
    chk(cur == NSCAN-1, "all scans passed");
    chk(n_drop > 0, "level-1 overflow happened");
    $display("hits=%0d dropped=%0d", n_hits, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
