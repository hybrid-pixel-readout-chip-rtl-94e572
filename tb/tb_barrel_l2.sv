// tb_barrel_l2: self-checking test of the level-2 barrel (depth 8, up to 8
// words written per clock, one read per clock). A queue model stores the
// words that fit in the free space of the start of the clock and counts
// the rest as lost; the head word, empty flag, free count and the number
// dropped are compared each cycle. Bursts of 8-word writes force
// overflows, which must happen.
module tb_barrel_l2;
  localparam int DEPTH = 8, NIN = 8, W = 21;
  logic clk = 0, rst_n = 0, rd, empty;
  logic [3:0] n, drop;
  logic [NIN-1:0][W-1:0] wdata;
  logic [W-1:0] dout;
  logic [3:0] free;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_drop = 0, n_multi = 0;

  barrel_l2 #(.DEPTH(DEPTH), .NIN(NIN), .W(W)) dut (.clk, .rst_n, .n_i(n), .wdata_i(wdata),
    .rd_i(rd), .dout_o(dout), .empty_o(empty), .free_o(free), .drop_o(drop));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fit, e_drop;
    n = 0; rd = 0; wdata = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      n = ($urandom_range(3) == 0) ? 4'($urandom_range(NIN)) : 4'd0;
      if ((cyc / 300) % 3 == 2) n = 4'($urandom_range(1, NIN));
      for (int i = 0; i < NIN; i++) wdata[i] = W'($urandom);
      rd = !empty && ($urandom_range(1) == 1);
      #1;
      chk(empty == (q.size() == 0), "empty");
      chk(int'(free) == DEPTH - q.size(), "free");
      if (q.size() > 0) chk(dout == q[0], "head");
      fit = DEPTH - q.size();
      if (fit > int'(n)) fit = int'(n);
      e_drop = int'(n) - fit;
      chk(int'(drop) == e_drop, "drop count");
      if (e_drop > 0) n_drop++;
      if (fit > 1) n_multi++;
      @(posedge clk);
      if (rd) void'(q.pop_front());
      for (int i = 0; i < fit; i++) q.push_back(wdata[i]);
    end
    chk(n_drop > 0 && n_multi > 0, "overflow and multi-word writes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
