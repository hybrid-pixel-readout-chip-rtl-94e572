// tb_scan_buffer: self-checking test of the scan buffer (depth 8) against
// a queue model: random pushes and pops, never a push when full nor a pop
// when empty (the sweep guarantees this), with full/empty flags and the
// head word compared every cycle; the buffer is filled to full and drained
// to empty several times.
module tb_scan_buffer;
  localparam int DEPTH = 8, W = 24;
  logic clk = 0, rst_n = 0, push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  scan_buffer #(.DEPTH(DEPTH), .W(W)) dut (.clk, .rst_n, .push_i(push), .din_i(din),
    .pop_i(pop), .dout_o(dout), .full_o(full), .empty_o(empty));

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
    int bias;
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      bias = ((cyc / 200) % 2) ? 3 : 1;
      chk(full == (q.size() == DEPTH), "full flag");
      chk(empty == (q.size() == 0), "empty flag");
      if (q.size() > 0) chk(dout == q[0], "head word");
      if (full) n_full++;
      if (empty) n_empty++;
      push = !full && ($urandom_range(3) < bias);
      pop  = !empty && ($urandom_range(3) >= bias);
      din  = W'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    chk(n_full > 10 && n_empty > 10, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
