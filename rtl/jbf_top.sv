// jbf_top: real-time integral-histogram joint bilateral filter.
//
// Filters a source image J (8-bit) guided by an image I (8-bit) with a
// WIN x WIN box space kernel and a Gaussian range kernel:
//   O(c) = sum_{q in window(c)} g(|I_c - I_q|) J_q / sum g(|I_c - I_q|)
// with intensities quantised to NB bins. Images live in off-chip memory on
// a 64-bit bus; only one row of integral histograms of a narrow stripe is
// kept on chip (about 23 KB at the default size).
//
// Structure: the interface (access_ctrl, five in_pingpong input buffers for
// I_c, I_S, J_S, I_Q, J_Q and one out_pingpong result buffer) streams one
// integral-region position per cycle into the core (jbf_core: two histogram
// engines and the convolution engine); results return to memory as 8-pixel
// packets.
//
// Use: load the range-weight table (tbl_*: entry d = round(255 *
// exp(-d^2 / 2 sigma_r^2)), d = 0..TBL_N-1), set the frame size
// (frame_m x frame_n, at most M x N, width at least WS) and
// base_i/base_j/base_o, and pulse `start` while busy is low. `done` pulses
// when the last result has been written. A frame takes
// ceil(frame_n/WS) * (frame_m + WIN/2) * ceil((WIN+WS-1)/8) * 8 + 8*DRAIN + 1
// cycles from start to done (3,363,881 for HD1080p, 59.5 frames/s at
// 200 MHz).
// Bus: one request per cycle (bus_req), read data returns in order with its
// id within 3 cycles (bus_rsp). Pixels outside the frame are left out of
// the windows (the window is clipped at frame borders).
module jbf_top
  import jbf_pkg::*;
#(
  parameter int unsigned M     = DEF_M,
  parameter int unsigned N     = DEF_N,
  parameter int unsigned WIN   = DEF_WIN,
  parameter int unsigned WS    = DEF_WS,
  parameter int unsigned NB    = DEF_NB,
  parameter int unsigned TBL_N = DEF_TBL_N,
  parameter int unsigned G_W   = DEF_G_W,
  parameter int unsigned DRAIN = 5,
  localparam int unsigned TAW  = $clog2(TBL_N),
  localparam int unsigned IRW  = WIN + WS - 1,
  localparam int unsigned XW   = $clog2(IRW),
  localparam int unsigned LW   = $clog2(LANES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [15:0]       frame_m,
  input  logic [15:0]       frame_n,
  input  logic [ADDR_W-1:0] base_i,
  input  logic [ADDR_W-1:0] base_j,
  input  logic [ADDR_W-1:0] base_o,
  output logic              busy,
  output logic              done,
  input  logic              tbl_we,
  input  logic [TAW-1:0]    tbl_waddr,
  input  logic [G_W-1:0]    tbl_wdata,
  output bus_req_t          bus_req,
  input  bus_rsp_t          bus_rsp
);

  // ------------------------------------------------------------- interface
  logic [4:0]        ib_mask_we, ib_data_we;
  logic [LANES-1:0]  ib_mask;
  logic              ib_swap;
  logic              ob_pending, ob_ack;
  logic [ADDR_W-1:0] ob_addr;
  logic [LANES-1:0][PIX_W-1:0] ob_data;
  logic [LANES-1:0]  ob_be;
  logic              give_slot, give_pos, give_first_row;
  logic [XW-1:0]     give_x;
  logic [LW-1:0]     give_lane;
  logic [ADDR_W-1:0] give_paddr;

  access_ctrl #(.M(M), .N(N), .WIN(WIN), .WS(WS), .DRAIN(DRAIN)) u_ctrl (
    .clk (clk), .rst_n (rst_n), .start (start), .frame_m (frame_m), .frame_n (frame_n),
    .base_i (base_i), .base_j (base_j), .base_o (base_o),
    .busy (busy), .done (done),
    .bus_req (bus_req), .bus_rsp (bus_rsp),
    .ib_mask_we (ib_mask_we), .ib_mask (ib_mask), .ib_data_we (ib_data_we), .ib_swap (ib_swap),
    .ob_pending (ob_pending), .ob_addr (ob_addr), .ob_data (ob_data), .ob_be (ob_be), .ob_ack (ob_ack),
    .give_slot (give_slot), .give_pos (give_pos), .give_x (give_x),
    .give_first_row (give_first_row), .give_lane (give_lane), .give_paddr (give_paddr)
  );

  // Input buffers, one per read slot: I_c, I_S, J_S, I_Q, J_Q.
  logic [4:0][PIX_W-1:0] g_pix;
  logic [4:0]            g_en;

  for (genvar k = 0; k < 5; k++) begin : g_ib
    in_pingpong #(.LANES(LANES), .PIX_W(PIX_W)) u_ib (
      .clk (clk), .rst_n (rst_n),
      .mask_we (ib_mask_we[k]), .mask (ib_mask),
      .data_we (ib_data_we[k]), .data (bus_rsp.rdata),
      .swap (ib_swap), .give_lane (give_lane),
      .give_pix (g_pix[k]), .give_en (g_en[k])
    );
  end

  // ------------------------------------------------------------------ core
  res_tag_t in_tag, out_tag;
  logic     res_vld;
  pix_t     res_pix;

  always_comb begin
    in_tag.en    = g_en[SLOT_IC];
    in_tag.lane  = 3'(give_lane);
    in_tag.paddr = give_paddr;
  end

  jbf_core #(.NB(NB), .WIN(WIN), .WS(WS), .TBL_N(TBL_N), .G_W(G_W),
             .TAG_W($bits(res_tag_t))) u_core (
    .clk (clk), .rst_n (rst_n),
    .tbl_we (tbl_we), .tbl_waddr (tbl_waddr), .tbl_wdata (tbl_wdata),
    .in_vld (give_slot), .in_pos (give_pos), .in_x (give_x), .in_first_row (give_first_row),
    .s_en (g_en[SLOT_IS]), .s_i (g_pix[SLOT_IS]), .s_j (g_pix[SLOT_JS]),
    .q_en (g_en[SLOT_IQ]), .q_i (g_pix[SLOT_IQ]), .q_j (g_pix[SLOT_JQ]),
    .in_ic (g_pix[SLOT_IC]), .in_tag (in_tag),
    .out_vld (res_vld), .out_pix (res_pix), .out_tag (out_tag)
  );

  out_pingpong #(.LANES(LANES), .PIX_W(PIX_W), .ADDR_W(ADDR_W)) u_ob (
    .clk (clk), .rst_n (rst_n),
    .in_vld (res_vld), .in_en (out_tag.en), .in_lane (LW'(out_tag.lane)),
    .in_addr (out_tag.paddr), .in_pix (res_pix),
    .give_pending (ob_pending), .give_addr (ob_addr), .give_data (ob_data), .give_be (ob_be),
    .ack (ob_ack)
  );

endmodule
