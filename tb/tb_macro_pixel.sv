// tb_macro_pixel: self-checking test of one row of macro pixels at its
// default size (40 MPs, 80 pixel columns x 8 rows). A reference model of the
// latches and freeze flags is updated with the same random stimulus (hits,
// mask, freeze, clear per MP); every cycle the fast-OR and frozen flags of
// all MPs and the bus output for a random column and enables are compared
// with it, both before and after the inputs change.
module tb_macro_pixel;
  import fe4d_pkg::*;
  localparam int N = 40, COLS = 2 * N, XW = $clog2(COLS);
  logic clk = 0, rst_n = 0;
  logic [MP_H-1:0][COLS-1:0] hit, m_pix;
  logic [N-1:0] mask, freeze, clear, fast_or, frozen, m_frz;
  logic col_en, out_en;
  logic [XW-1:0] col;
  logic [MP_H-1:0] bus;
  int checks = 0, failures = 0;
  int n_frozen_drop = 0, n_bus = 0;

  macro_pixel dut (.clk, .rst_n, .hit_i(hit), .mask_i(mask), .freeze_i(freeze),
    .clear_i(clear), .col_en_i(col_en), .col_i(col), .out_en_i(out_en),
    .fast_or_o(fast_or), .frozen_o(frozen), .bus_o(bus));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [MP_H-1:0] exp_bus();
    logic [MP_H-1:0] b;
    for (int r = 0; r < MP_H; r++)
      b[r] = col_en && out_en && int'(col) < COLS && m_pix[r][col];
    return b;
  endfunction

  task automatic check_state();
    for (int m = 0; m < N; m++) begin
      logic any;
      any = 1'b0;
      for (int r = 0; r < MP_H; r++) any |= (m_pix[r][2*m +: 2] != 0);
      chk(fast_or[m] === any, "fast_or");
      chk(frozen[m] === m_frz[m], "frozen");
    end
    chk(bus === exp_bus(), "bus");
    if (bus != 0) n_bus++;
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hit = '0; mask = '0; freeze = '0; clear = '0; out_en = 0; col_en = 0; col = '0;
    m_pix = '0; m_frz = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check_state();
      // new stimulus
      for (int r = 0; r < MP_H; r++)
        for (int c = 0; c < COLS; c++) hit[r][c] = ($urandom_range(40) == 0);
      for (int m = 0; m < N; m++) begin
        mask[m]   = ($urandom_range(15) == 0);
        freeze[m] = ($urandom_range(7) == 0);
        clear[m]  = ($urandom_range(11) == 0);
      end
      col_en = ($urandom_range(3) != 0);
      col    = XW'($urandom_range(COLS + 10));
      out_en = ($urandom_range(3) != 0);
      #1;
      check_state();
      // model update at the next edge
      for (int m = 0; m < N; m++) begin
        for (int r = 0; r < MP_H; r++) begin
          if (m_frz[m] && hit[r][2*m +: 2] != 0) n_frozen_drop++;
          if (!m_frz[m] && !mask[m]) m_pix[r][2*m +: 2] |= hit[r][2*m +: 2];
          if (clear[m]) m_pix[r][2*m +: 2] = '0;
        end
        if (clear[m]) m_frz[m] = 1'b0;
        else if (freeze[m]) m_frz[m] = 1'b1;
      end
    end
    chk(n_frozen_drop > 0, "hits on a frozen MP were exercised");
    chk(n_bus > 100, "bus carried data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
