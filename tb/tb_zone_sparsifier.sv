// tb_zone_sparsifier: self-checking test of the zone sparsifier (8 zones
// of 8 pixels, 80-column X field). Random columns with a random number of
// hit zones are applied; the expected hit words are built independently
// from the field layout (MSB 0, sparsifier address, Y zone, X, pattern) and
// compared with the packed output, as is the count. Time-stamp words
// (mark) and idle cycles are checked too.
module tb_zone_sparsifier;
  import fe4d_pkg::*;
  localparam int COLS = 80, ZONES = 8, XW = 7, W = 21;
  logic valid, mark;
  logic [63:0] pix;
  logic [XW-1:0] col;
  logic [1:0] sp, sub;
  logic [7:0] ts;
  logic [3:0] n;
  logic [ZONES-1:0][W-1:0] words;
  int checks = 0, failures = 0;

  zone_sparsifier #(.COLS(COLS), .ZONES(ZONES)) dut (.valid_i(valid), .pix_i(pix),
    .col_i(col), .spars_addr_i(sp), .mark_i(mark), .ts_i(ts), .sub_addr_i(sub),
    .n_o(n), .words_o(words));

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
    int k;
    logic [W-1:0] e;
    for (int t = 0; t < 3000; t++) begin
      valid = 1; mark = 0;
      col = XW'($urandom_range(COLS-1));
      sp  = 2'($urandom); sub = 2'($urandom); ts = 8'($urandom);
      pix = '0;
      for (int z = 0; z < ZONES; z++)
        if ($urandom_range(7) < (t % 8)) pix[z*8 +: 8] = 8'($urandom_range(1, 255));
      if (t % 50 == 0) pix = '1;
      if (t % 10 == 3) valid = 0;
      if (t % 10 == 7) mark = 1;
      #1;
      if (mark) begin
        e = '0; e[20] = 1'b1; e[9:8] = sub; e[7:0] = ts;
        chk(n == 1, "mark count");
        chk(words[0] == e, "time stamp word");
      end else if (!valid) begin
        chk(n == 0, "idle count");
      end else begin
        k = 0;
        for (int z = 0; z < ZONES; z++) begin
          if (pix[z*8 +: 8] != 0) begin
            e = {1'b0, sp, 3'(z), col, pix[z*8 +: 8]};
            chk(words[k] == e, "hit word");
            k++;
          end
        end
        chk(int'(n) == k, "hit count");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
