// jbf_core: computing core of the JBF accelerator.
//
// Two histogram calculation engines run side by side on the same stream of
// integral-region positions: one integrates the constant 1 into the bin of
// the guidance pixel (pixel-count histogram h_c, HW bits per bin), the other
// integrates the source pixel J (pixel-intensity histogram h'_c, HW+8 bits
// per bin). Their window histograms feed the convolution engine, which
// weights them with the range kernel of the window's centre pixel I_c and
// divides. One position enters and one result leaves per cycle.
//
// HW is the smallest width that holds the largest bin count, WIN*IRW
// (31*90 = 2790 -> 12 bits at the default size).
// Timing: out_* follow in_* by LAT = 2 (engines) + 11 (convolution) = 13
// cycles. in_vld marks a slot of the position stream; in_pos marks a slot
// that holds a real position (only those integrate). The tag and in_ic
// travel with the slot and come out with its result; out_vld is the
// delayed slot flag. The result is meaningful only where the whole window lies in the
// integral region, which the caller tracks in the tag.
module jbf_core #(
  parameter int unsigned NB    = 64,
  parameter int unsigned WIN   = 31,
  parameter int unsigned WS    = 60,
  parameter int unsigned TBL_N = 32,
  parameter int unsigned G_W   = 8,
  parameter int unsigned TAG_W = 1,
  localparam int unsigned PIX_W = 8,
  localparam int unsigned IRW  = WIN + WS - 1,
  localparam int unsigned XW   = $clog2(IRW),
  localparam int unsigned HW   = $clog2(WIN * IRW + 1),
  localparam int unsigned HPW  = HW + PIX_W,
  localparam int unsigned TAW  = $clog2(TBL_N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tbl_we,
  input  logic [TAW-1:0]   tbl_waddr,
  input  logic [G_W-1:0]   tbl_wdata,
  input  logic             in_vld,      // a slot: tag and in_ic are meaningful
  input  logic             in_pos,      // the slot carries a real IR position
  input  logic [XW-1:0]    in_x,
  input  logic             in_first_row,
  input  logic             s_en,        // pixel S inside the frame
  input  logic [PIX_W-1:0] s_i,         // guidance I_S
  input  logic [PIX_W-1:0] s_j,         // source   J_S
  input  logic             q_en,        // pixel Q inside the frame
  input  logic [PIX_W-1:0] q_i,
  input  logic [PIX_W-1:0] q_j,
  input  logic [PIX_W-1:0] in_ic,       // guidance pixel at the window centre
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_vld,
  output logic [PIX_W-1:0] out_pix,
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned BW = $clog2(NB);
  localparam int unsigned SHIFT = PIX_W - BW;   // intensity -> bin

  logic [NB-1:0][HW-1:0]  h;
  logic [NB-1:0][HPW-1:0] hp;
  logic [1:0]             slot_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slot_d <= '0;
    else        slot_d <= {slot_d[0], in_vld};
  end

  hist_engine #(.NB(NB), .IRW(IRW), .WIN(WIN), .VAL_W(1), .HW(HW)) u_hist_hc (
    .clk (clk), .rst_n (rst_n),
    .in_vld (in_vld & in_pos), .in_x (in_x), .in_first_row (in_first_row),
    .s_en (s_en), .s_bin (BW'(s_i >> SHIFT)), .s_val (1'b1),
    .q_en (q_en), .q_bin (BW'(q_i >> SHIFT)), .q_val (1'b1),
    .out_vld (), .out_hist (h)
  );

  hist_engine #(.NB(NB), .IRW(IRW), .WIN(WIN), .VAL_W(PIX_W), .HW(HPW)) u_hist_hpc (
    .clk (clk), .rst_n (rst_n),
    .in_vld (in_vld & in_pos), .in_x (in_x), .in_first_row (in_first_row),
    .s_en (s_en), .s_bin (BW'(s_i >> SHIFT)), .s_val (s_j),
    .q_en (q_en), .q_bin (BW'(q_i >> SHIFT)), .q_val (q_j),
    .out_vld (), .out_hist (hp)
  );

  // Carry I_c and the tag past the two engine stages.
  logic [1:0][PIX_W-1:0] ic_d;
  logic [1:0][TAG_W-1:0] tag_d;

  always_ff @(posedge clk) begin
    ic_d  <= {ic_d[0], in_ic};
    tag_d <= {tag_d[0], in_tag};
  end

  conv_engine #(.NB(NB), .HW(HW), .HPW(HPW), .TBL_N(TBL_N), .G_W(G_W), .TAG_W(TAG_W)) u_conv (
    .clk (clk), .rst_n (rst_n),
    .tbl_we (tbl_we), .tbl_waddr (tbl_waddr), .tbl_wdata (tbl_wdata),
    .in_vld (slot_d[1]), .in_ic (ic_d[1]), .in_h (h), .in_hp (hp), .in_tag (tag_d[1]),
    .out_vld (out_vld), .out_pix (out_pix), .out_tag (out_tag)
  );

endmodule
