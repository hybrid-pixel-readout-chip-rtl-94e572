// output_stage: common output stage, queuing the streams of the sub-matrix
// readouts onto one output bus on the fast clock.
//
// Each level-1 barrel holds a time-sorted stream of its sub-matrix: a
// time-stamp word (which carries the sub-matrix address) followed by hit
// words (which do not). The stage serves one barrel at a time and moves to
// the next non-empty one, round robin, when the barrel it serves is empty or
// shows a new time-stamp word. So that each hit word can still be traced to
// its sub-matrix, when it comes back to a barrel in the middle of a hit
// sequence it first repeats that barrel's last time-stamp word. One word
// per fast clock; data_out_o and data_valid_o are registered. The switching
// rule and the repeated time stamp are this design's choices.
module output_stage #(
  parameter int N = 4,
  parameter int W = 21
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0][W-1:0] head_i,
  input  logic [N-1:0]        empty_i,
  output logic [N-1:0]        rd_o,
  output logic [W-1:0]        data_out_o,
  output logic                data_valid_o,
  output logic                ts_repeat_o   // a time-stamp word was repeated
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0]       cur_q;
  logic                open_q;         // last word sent came from cur_q
  logic [N-1:0][W-1:0] last_ts_q;
  logic                others;
  logic                found;
  logic [IW:0]                  idx;
  logic [IW-1:0]       nxt;
  logic                emit, repeat_ts;
  logic [W-1:0]        word;

  always_comb begin
    others = 1'b0;
    for (int i = 0; i < N; i++) if (i != int'(cur_q) && !empty_i[i]) others = 1'b1;
    found = 1'b0;
    nxt   = cur_q;
    for (int j = 1; j <= N; j++) begin
      idx = (IW+1)'(cur_q) + (IW+1)'(j);
      if (int'(idx) >= N) idx = idx - (IW+1)'(N);
      if (!found && !empty_i[idx]) begin
        found = 1'b1;
        nxt   = IW'(idx);
      end
    end

    rd_o      = '0;
    emit      = 1'b0;
    repeat_ts = 1'b0;
    word      = head_i[cur_q];
    if (!empty_i[cur_q] && (!head_i[cur_q][W-1] || !others || !open_q)) begin
      emit = 1'b1;
      if (!head_i[cur_q][W-1] && !open_q) begin
        repeat_ts = 1'b1;
        word      = last_ts_q[cur_q];
      end else begin
        rd_o[cur_q] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q        <= '0;
      open_q       <= 1'b0;
      last_ts_q    <= '0;
      data_out_o   <= '0;
      data_valid_o <= 1'b0;
      ts_repeat_o  <= 1'b0;
    end else begin
      data_valid_o <= emit;
      ts_repeat_o  <= repeat_ts;
      if (emit) begin
        data_out_o <= word;
        open_q     <= 1'b1;
        if (word[W-1]) last_ts_q[cur_q] <= word;
      end else if (found && nxt != cur_q) begin
        cur_q  <= nxt;
        open_q <= 1'b0;
      end
    end
  end
endmodule
