// concentrator: merges the level-2 barrels of a sub-matrix into its level-1
// barrel, one word per clock.
//
// Every level-2 barrel holds, per scan, a time-stamp word followed by that
// scan's hits from its sparsifier. When all barrels show a time-stamp word
// at their head, the previous scan is complete everywhere: the concentrator
// removes the four copies and writes one time-stamp word to the level-1
// barrel, waiting while that barrel is full. Otherwise it takes one hit word
// per clock, round robin, from the barrels whose head is a hit word. A
// barrel showing the next time stamp waits for the others. A hit word that
// finds the level-1 barrel full is lost (drop_o), which is the level-1
// overflow inefficiency; time-stamp words are never lost, so the stream
// stays decodable. Hit order within one time stamp is not kept across
// barrels. The merging rule is this design's own; the architecture names the
// concentrator without giving its insides.
module concentrator #(
  parameter int N = 4,
  parameter int W = 21
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N-1:0][W-1:0] head_i,
  input  logic [N-1:0]       empty_i,
  output logic [N-1:0]       rd_o,
  input  logic               l1_full_i,
  output logic               l1_wr_o,
  output logic [W-1:0]       l1_data_o,
  output logic               drop_o,
  output logic               ts_o       // a time-stamp word was written
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] rr_q;          // barrel served last
  logic [N-1:0]  is_hit, is_ts;
  logic          all_ts;
  logic          found;
  logic [IW:0]            idx;
  logic [IW-1:0] sel;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      is_hit[i] = !empty_i[i] && !head_i[i][W-1];
      is_ts[i]  = !empty_i[i] &&  head_i[i][W-1];
    end
    all_ts = &is_ts;

    found = 1'b0;
    sel   = '0;
    for (int j = 1; j <= N; j++) begin
      idx = (IW+1)'(rr_q) + (IW+1)'(j);
      if (int'(idx) >= N) idx = idx - (IW+1)'(N);
      if (!found && is_hit[idx]) begin
        found = 1'b1;
        sel   = IW'(idx);
      end
    end

    rd_o      = '0;
    l1_wr_o   = 1'b0;
    l1_data_o = head_i[0];
    drop_o    = 1'b0;
    ts_o      = 1'b0;
    if (all_ts) begin
      if (!l1_full_i) begin
        rd_o    = '1;
        l1_wr_o = 1'b1;
        ts_o    = 1'b1;
      end
    end else if (found) begin
      rd_o[sel] = 1'b1;
      l1_data_o = head_i[sel];
      l1_wr_o   = !l1_full_i;
      drop_o    = l1_full_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_q <= '0;
    else if (!all_ts && found) rr_q <= sel;
  end
endmodule
