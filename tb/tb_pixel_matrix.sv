// tb_pixel_matrix: self-checking test of a small sub-matrix (8 x 16
// pixels, 4 x 2 macro pixels). Random hits, masks, freezes and clears are
// applied to the matrix and to a reference model of every pixel latch;
// the fast-OR and frozen flags of every MP and the column bus for random
// column / MP-row enables are compared with the model each cycle.
module tb_pixel_matrix;
  import fe4d_pkg::*;
  localparam int COLS = 8, ROWS = 16, NMPX = COLS/MP_W, NMPY = ROWS/MP_H;
  logic clk = 0, rst_n = 0;
  logic [ROWS-1:0][COLS-1:0] hit;
  logic [NMPY-1:0][NMPX-1:0] mask, freeze, clear, fast_or, frozen;
  logic col_en;
  logic [2:0] col;
  logic [NMPY-1:0] out_en;
  logic [ROWS-1:0] bus;
  logic [ROWS-1:0][COLS-1:0] m_pix;
  logic [NMPY-1:0][NMPX-1:0] m_frz;
  int checks = 0, failures = 0;

  pixel_matrix #(.COLS(COLS), .ROWS(ROWS)) dut (.clk, .rst_n, .hit_i(hit),
    .mask_i(mask), .freeze_i(freeze), .clear_i(clear), .col_en_i(col_en),
    .col_i(col), .out_en_i(out_en), .fast_or_o(fast_or), .frozen_o(frozen),
    .bus_o(bus));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ROWS-1:0] exp_bus();
    logic [ROWS-1:0] b;
    b = '0;
    if (col_en)
      for (int r = 0; r < ROWS; r++)
        if (out_en[r/MP_H]) b[r] = m_pix[r][col];
    return b;
  endfunction

  initial begin
    hit = '0; mask = '0; freeze = '0; clear = '0; col_en = 0; col = 0; out_en = '0;
    m_pix = '0; m_frz = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      for (int my = 0; my < NMPY; my++)
        for (int mx = 0; mx < NMPX; mx++) begin
          logic any;
          any = 0;
          for (int r = 0; r < MP_H; r++)
            for (int c = 0; c < MP_W; c++) any |= m_pix[my*MP_H+r][mx*MP_W+c];
          chk(fast_or[my][mx] == any, "fast_or");
          chk(frozen[my][mx] == m_frz[my][mx], "frozen");
        end
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          hit[r][c] = ($urandom_range(40) == 0);
      mask   = 8'($urandom) & 8'($urandom);
      freeze = 8'($urandom) & 8'($urandom);
      clear  = 8'($urandom) & 8'($urandom) & 8'($urandom);
      col_en = $urandom_range(1);
      col    = 3'($urandom);
      out_en = 2'($urandom);
      #1;
      chk(bus == exp_bus(), "bus");
      for (int my = 0; my < NMPY; my++)
        for (int mx = 0; mx < NMPX; mx++)
          for (int r = 0; r < MP_H; r++)
            for (int c = 0; c < MP_W; c++) begin
              int rr, cc;
              rr = my*MP_H + r; cc = mx*MP_W + c;
              if (clear[my][mx]) m_pix[rr][cc] = 0;
              else if (!m_frz[my][mx] && !mask[my][mx] && hit[rr][cc]) m_pix[rr][cc] = 1;
            end
      for (int my = 0; my < NMPY; my++)
        for (int mx = 0; mx < NMPX; mx++)
          if (clear[my][mx]) m_frz[my][mx] = 0;
          else if (freeze[my][mx]) m_frz[my][mx] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
