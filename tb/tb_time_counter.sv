// tb_time_counter: self-checking test of the BCO time counter. A BC clock
// asynchronous to the read clock (period 37 read-clock periods plus a
// fraction) is applied; every bc_tick must come 2 to 4 read-clock cycles
// after a BC rising edge, exactly one per edge, and the time stamp must
// count the ticks modulo 256 (the run wraps it).
module tb_time_counter;
  logic clk = 0, rst_n = 0, bc = 0, tick;
  logic [7:0] ts;
  int checks = 0, failures = 0;
  int edges = 0, ticks = 0;
  realtime last_edge;

  time_counter #(.TS_W(8)) dut (.clk, .rst_n, .bc_clk_i(bc), .bc_tick_o(tick), .ts_o(ts));

  always #5 clk = ~clk;
  initial begin
    #33;
    forever begin
      #93.7 bc = 1;
      edges++;
      last_edge = $realtime;
      #93.7 bc = 0;
    end
  end

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
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    while (ticks < 300) begin
      @(posedge clk);
      chk(ts == 8'(ticks), "time stamp value");
      if (tick) begin
        ticks++;
        chk(ticks == edges, "one tick per BC edge");
        chk($realtime - last_edge >= 10 && $realtime - last_edge <= 40, "tick latency");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
