// slow_control_regs: register file behind the slow-control slave.
//
// One set of read/write registers (chip settings and the macro-pixel
// masks) and one set of read-only registers (acquisition flags, error flags
// and rate counters), on the 16-bit register pointer of the I2C-like slave.
// Register map (byte registers; addresses are this design's choice):
//   0x0000 CTRL  RW  bit0 ACQ_EN (1 after reset: pixels take hits),
//                    bit1 CLR: writing 1 clears counters and error flags
//   0x1000+i MASK RW  bit b masks MP number 8*i+b; MP number is
//                    sub*NMP + row*NMPX + col (row, col of the MP)
//   0x8000 ACQ   RO  bit s busy of sub-matrix s, bit 4+s its fast-OR
//   0x8001 ERR0  RO  bit s scan-buffer overflow seen, bit 4+s L2 overflow seen
//   0x8002 ERR1  RO  bit s L1 overflow seen
//   0x8010+2s/+2s+1 RO  16-bit count of hit words of sub-matrix s (low, high)
// Unmapped addresses read 0. Flags and counters are sticky until CLR;
// counters wrap. N_SUB may be at most 4.
module slow_control_regs #(
  parameter int N_SUB = 4,
  parameter int NMP   = 1280,             // macro pixels per sub-matrix
  localparam int NM   = N_SUB * NMP,
  localparam int NMB  = (NM + 7) / 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      reg_addr_i,
  input  logic             reg_wr_i,
  input  logic [7:0]       reg_wdata_i,
  output logic [7:0]       reg_rdata_o,
  output logic             acq_en_o,
  output logic [NM-1:0]    mp_mask_o,
  input  logic [N_SUB-1:0] busy_i,
  input  logic [N_SUB-1:0] fast_or_i,
  input  logic [N_SUB-1:0] sb_ovf_i,
  input  logic [N_SUB-1:0] b2_drop_i,
  input  logic [N_SUB-1:0] b1_drop_i,
  input  logic [N_SUB-1:0] hit_wr_i
);
  logic [NMB*8-1:0]             mask_q;
  logic [N_SUB-1:0]             sb_err, b2_err, b1_err;
  logic [N_SUB-1:0][15:0]       hit_cnt;
  logic                         clr;

  assign clr = reg_wr_i && reg_addr_i == 16'h0000 && reg_wdata_i[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acq_en_o <= 1'b1;
      mask_q   <= '0;
    end else if (reg_wr_i) begin
      if (reg_addr_i == 16'h0000) acq_en_o <= reg_wdata_i[0];
      for (int i = 0; i < NMB; i++)
        if (int'(reg_addr_i) == 'h1000 + i) mask_q[i*8 +: 8] <= reg_wdata_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sb_err  <= '0;
      b2_err  <= '0;
      b1_err  <= '0;
      hit_cnt <= '0;
    end else if (clr) begin
      sb_err  <= '0;
      b2_err  <= '0;
      b1_err  <= '0;
      hit_cnt <= '0;
    end else begin
      sb_err <= sb_err | sb_ovf_i;
      b2_err <= b2_err | b2_drop_i;
      b1_err <= b1_err | b1_drop_i;
      for (int s = 0; s < N_SUB; s++)
        if (hit_wr_i[s]) hit_cnt[s] <= hit_cnt[s] + 1'b1;
    end
  end

  always_comb begin
    int a;
    a = int'(reg_addr_i);
    reg_rdata_o = '0;
    if (a == 'h0000) reg_rdata_o = {7'd0, acq_en_o};
    if (a >= 'h1000 && a < 'h1000 + NMB) reg_rdata_o = mask_q[(a - 'h1000)*8 +: 8];
    for (int s = 0; s < N_SUB; s++) begin
      if (a == 'h8000) begin
        reg_rdata_o[s]     = busy_i[s];
        reg_rdata_o[4 + s] = fast_or_i[s];
      end
      if (a == 'h8001) begin
        reg_rdata_o[s]     = sb_err[s];
        reg_rdata_o[4 + s] = b2_err[s];
      end
      if (a == 'h8002) reg_rdata_o[s] = b1_err[s];
      if (a == 'h8010 + 2*s) reg_rdata_o = hit_cnt[s][7:0];
      if (a == 'h8011 + 2*s) reg_rdata_o = hit_cnt[s][15:8];
    end
  end

  assign mp_mask_o = mask_q[NM-1:0];

  initial assert (N_SUB <= 4) else $error("slow_control_regs: at most 4 sub-matrices");
endmodule
