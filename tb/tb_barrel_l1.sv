// tb_barrel_l1: self-checking test of the dual-clock level-1 barrel
// (depth 128). Writes on a 15 ns clock, reads on a 5 ns clock, both
// random; the read side must return every written word in order. Phases
// where the reader stops make the FIFO fill, and the writer must then see
// full and never lose a word.
module tb_barrel_l1;
  localparam int DEPTH = 128, W = 21;
  logic wclk = 0, rclk = 0, rst_n = 0, wr, rd, full, empty;
  logic [W-1:0] din, dout;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_written = 0, n_read = 0, n_full = 0;
  logic rd_stop = 0;

  barrel_l1 #(.DEPTH(DEPTH), .W(W)) dut (.rst_n, .wclk, .wr_i(wr), .din_i(din),
    .full_o(full), .rclk, .rd_i(rd), .dout_o(dout), .empty_o(empty));

  always #7.5 wclk = ~wclk;
  always #2.5 rclk = ~rclk;

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

  // writer
  initial begin
    wr = 0; din = '0;
    #20 rst_n = 1;
    while (n_written < 3000) begin
      @(negedge wclk);
      if (full) n_full++;
      wr  = !full && ($urandom_range(3) != 0);
      din = W'($urandom);
      @(posedge wclk);
      if (wr) begin q.push_back(din); n_written++; end
    end
    @(negedge wclk) wr = 0;
  end

  // reader
  initial begin
    rd = 0;
    #20;
    forever begin
      @(negedge rclk);
      rd_stop = (($time / 4000) % 3) == 1;
      if (rd && q.size() > 0) ;
      rd = !empty && !rd_stop && ($urandom_range(3) == 0);
      if (rd) begin
        chk(q.size() > 0, "read only what was written");
        if (q.size() > 0) begin
          chk(dout == q[0], "data order");
          void'(q.pop_front());
        end
        n_read++;
      end
      if (n_read == 3000) begin
        chk(n_full > 0, "full reached");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
