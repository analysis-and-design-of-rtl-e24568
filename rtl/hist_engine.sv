// hist_engine: histogram calculation engine (one for the pixel-count
// histogram h_c, one for the pixel-intensity histogram h'_c).
//
// The engine walks the integral region (IR) of one stripe in raster order,
// one column position x per cycle, and for every position computes the
// integral histogram IH(x,y) of the region "columns 0..x of the IR, rows
// y-WIN+1..y". The integral origin slides down with the window, so the
// recurrence is
//
//   IH(x,y) = IH(x-1,y) + IH(x,y-1) - IH(x-1,y-1) + Bin(I_S) - Bin(I_Q)
//
// with S = pixel (x,y) entering and Q = pixel (x,y-WIN) leaving the window
// rows. Bin(p) is a one-hot histogram holding `val` in the bin of the
// guidance pixel (val = 1 for h_c, val = J for h'_c). The window histogram
// whose bottom-right corner is S is then the two-term difference
//
//   h(x,y) = IH(x,y) - IH(x-WIN,y)             (zero IH left of the IR)
//
// Datapath (after the architecture): SBA I adds Bin(I_S) to IH(x,y-1),
// SBA II subtracts Bin(I_Q) from IH(x-1,y), an adder array subtracts
// IH(x-1,y-1) and adds the two, and a subtractor array extracts h.
// IH(x-1,y) and IH(x-1,y-1) come from two delay buffers (the results of the
// previous cycle), so only IH(x,y-1) and IH(x-WIN,y) are read from memory.
// The memory holds one IR row, split by column parity into two banks; since
// WIN is odd the two reads always fall in different banks, and IH(x-1,y) is
// written back over IH(x-1,y-1), which is no longer needed.
//
// Interface: one position per cycle while in_vld is high; x must count
// 0..IRW-1 along a row without gaps (idle cycles may follow the row end).
// first_row marks the first row of a stripe (no row above). s_en/q_en are
// low when S or Q lies outside the frame. The window histogram of a
// position appears on out_hist two cycles after its inputs (LAT = 2).
// Choices of this design: bins use modulo-2^HW arithmetic; out-of-frame
// pixels simply contribute nothing.
module hist_engine #(
  parameter int unsigned NB    = 64,    // bins
  parameter int unsigned IRW   = 90,    // integral-region width, WIN + WS - 1
  parameter int unsigned WIN   = 31,    // window width |S| (odd)
  parameter int unsigned VAL_W = 8,     // integral value width (1 for h_c)
  parameter int unsigned HW    = 12,    // bin width
  localparam int unsigned BW   = $clog2(NB),
  localparam int unsigned XW   = $clog2(IRW),
  localparam int unsigned DEPTH = (IRW + 1) / 2,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_vld,
  input  logic [XW-1:0]         in_x,
  input  logic                  in_first_row,
  input  logic                  s_en,
  input  logic [BW-1:0]         s_bin,
  input  logic [VAL_W-1:0]      s_val,
  input  logic                  q_en,
  input  logic [BW-1:0]         q_bin,
  input  logic [VAL_W-1:0]      q_val,
  output logic                  out_vld,
  output logic [NB-1:0][HW-1:0] out_hist
);

  localparam int unsigned HIST_W = NB * HW;
  typedef logic [NB-1:0][HW-1:0] hist_t;

  // ---------------------------------------------------------------- stage 1
  // Issue the reads of IH(x,y-1) (S') and IH(x-WIN,y) (R).
  logic          r_ok;            // R lies inside the IR
  logic [XW-1:0] r_x;
  logic [AW-1:0] raddr [2];
  logic [1:0]    re;

  always_comb begin
    r_ok = in_x >= XW'(WIN);
    r_x  = in_x - XW'(WIN);
    for (int k = 0; k < 2; k++) begin
      if (in_x[0] == k[0]) begin
        raddr[k] = AW'(in_x >> 1);
        re[k]    = in_vld;
      end else begin
        raddr[k] = AW'(r_x >> 1);
        re[k]    = in_vld && r_ok;
      end
    end
  end

  // Stage-2 copies of the position and its pixels.
  logic          p_vld, p_first, p_r_ok, p_s_en, p_q_en;
  logic [XW-1:0] p_x;
  logic [BW-1:0] p_s_bin, p_q_bin;
  logic [VAL_W-1:0] p_s_val, p_q_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_vld <= 1'b0;
    end else begin
      p_vld <= in_vld;
    end
  end

  always_ff @(posedge clk) begin
    p_x     <= in_x;
    p_first <= in_first_row;
    p_r_ok  <= r_ok;
    p_s_en  <= s_en;
    p_s_bin <= s_bin;
    p_s_val <= s_val;
    p_q_en  <= q_en;
    p_q_bin <= q_bin;
    p_q_val <= q_val;
  end

  // ------------------------------------------------------ memory and buffers
  logic [HIST_W-1:0] rdata [2];
  hist_t         dly_d;       // delay buffer: IH(x-1,y)   (also the write data)
  hist_t         dly_dp;      // delay buffer: IH(x-1,y-1)
  logic          wr_en;
  logic [XW-1:0] wr_x;

  for (genvar k = 0; k < 2; k++) begin : g_bank
    ih_bank #(.DEPTH(DEPTH), .WIDTH(HIST_W)) u_bank (
      .clk   (clk),
      .re    (re[k]),
      .raddr (raddr[k]),
      .rdata (rdata[k]),
      .we    (wr_en && wr_x[0] == k[0]),
      .waddr (AW'(wr_x >> 1)),
      .wdata (dly_d)
    );
  end

  // ---------------------------------------------------------------- stage 2
  hist_t ih_sp, ih_r, ih_d, ih_dp, ih1, ih2, ih_s, h;

  always_comb begin
    ih_sp = p_first ? '0 : hist_t'(rdata[p_x[0]]);
    ih_r  = p_r_ok  ? hist_t'(rdata[~p_x[0]]) : '0;
    ih_d  = (p_x == '0) ? '0 : dly_d;
    ih_dp = (p_x == '0) ? '0 : dly_dp;
  end

  sba #(.NB(NB), .HW(HW), .VAL_W(VAL_W)) u_sba1 (
    .hist_i (ih_sp), .en (p_s_en), .sub (1'b0), .bin (p_s_bin), .val (p_s_val),
    .hist_o (ih1)
  );

  sba #(.NB(NB), .HW(HW), .VAL_W(VAL_W)) u_sba2 (
    .hist_i (ih_d), .en (p_q_en), .sub (1'b1), .bin (p_q_bin), .val (p_q_val),
    .hist_o (ih2)
  );

  // Adder arrays: IH_S = IH1 + (IH2 - IH_D'), then h = IH_S - IH_R.
  always_comb begin
    for (int b = 0; b < NB; b++) begin
      ih_s[b] = ih1[b] + (ih2[b] - ih_dp[b]);
      h[b]    = ih_s[b] - ih_r[b];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en   <= 1'b0;
      out_vld <= 1'b0;
    end else begin
      wr_en   <= p_vld;
      out_vld <= p_vld;
    end
  end

  always_ff @(posedge clk) begin
    if (p_vld) begin
      dly_d  <= ih_s;
      dly_dp <= ih_sp;
      wr_x   <= p_x;
    end
    out_hist <= h;
  end

endmodule
