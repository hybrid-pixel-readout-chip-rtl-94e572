// tb_output_stage: self-checking test of the common output stage with four
// level-1 barrels modelled as queues. Barrel s holds 40 sequences: a
// time-stamp word of sub-matrix s followed by 0-5 hit words tagged with s
// and a serial number; barrels are randomly shown empty to mimic late
// arrival. The output is decoded like a receiver does: a time-stamp word
// selects the sub-matrix of the hit words after it. Every word of every
// barrel must come out once, in order, attributed to the right sub-matrix,
// and any time-stamp word that is not the next one of its barrel must be a
// repeat of that barrel's last one. Repeats must occur.
module tb_output_stage;
  localparam int N = 4, W = 21, NSEQ = 40;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][W-1:0] head;
  logic [N-1:0] rd_s;
  logic [N-1:0] empty, rd, hide;
  logic [W-1:0] dout;
  logic valid, rep;
  logic [W-1:0] q[N][$];
  logic [W-1:0] last_ts[N];
  int checks = 0, failures = 0, n_rep = 0, cur = -1, total = 0, got = 0;

  output_stage #(.N(N), .W(W)) dut (.clk, .rst_n, .head_i(head), .empty_i(empty),
    .rd_o(rd), .data_out_o(dout), .data_valid_o(valid), .ts_repeat_o(rep));

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
      empty[i] = (q[i].size() == 0) || hide[i];
      head[i]  = (q[i].size() == 0) ? '0 : q[i][0];
    end
  endtask

  // Expected words, per barrel, in order, as they leave the barrels.
  logic [W-1:0] exp_q[N][$];

  initial begin
    int nh, sn;
    sn = 0;
    for (int s = 0; s < N; s++) begin
      for (int k = 0; k < NSEQ; k++) begin
        q[s].push_back({1'b1, 10'd0, 2'(s), 8'(k)});
        nh = $urandom_range(0, 5);
        for (int h = 0; h < nh; h++) begin
          q[s].push_back({1'b0, 2'(s), 10'(sn), 8'hA5});
          sn++;
        end
      end
      total += q[s].size();
      exp_q[s] = q[s];
      last_ts[s] = '0;
    end
    hide = '0;
    update_heads();
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    for (int cyc = 0; cyc < 20000 && got < total; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) hide[i] = ($urandom_range(3) == 0);
      update_heads();
      #1;
      for (int i = 0; i < N; i++) chk(!(rd[i] && empty[i]), "no read of an empty barrel");
      if (valid) begin
        if (dout[W-1]) begin
          int s;
          s = int'(dout[9:8]);
          if (exp_q[s].size() > 0 && exp_q[s][0] == dout) begin
            void'(exp_q[s].pop_front());
            got++;
            last_ts[s] = dout;
            chk(!rep, "repeat flag on a new time stamp");
          end else begin
            chk(dout == last_ts[s], "repeated time stamp is the last one");
            chk(rep, "repeat flag");
            n_rep++;
          end
          cur = s;
        end else begin
          chk(cur >= 0 && int'(dout[W-2 -: 2]) == cur, "hit attributed to its sub-matrix");
          if (cur >= 0) begin
            chk(exp_q[cur].size() > 0 && exp_q[cur][0] == dout, "hit order");
            if (exp_q[cur].size() > 0) void'(exp_q[cur].pop_front());
            got++;
          end
        end
      end
      rd_s = rd;
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) if (rd_s[i]) void'(q[i].pop_front());
      update_heads();
    end
    repeat (2) @(posedge clk);
    chk(got == total, "all words delivered");
    chk(n_rep > 0, "time stamps were repeated");
    $display("words=%0d repeats=%0d", got, n_rep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
