// in_pingpong: 2x8-pixel ping-pong input buffer of the interface.
//
// Two 8-pixel halves alternate between Update mode (being filled from the
// 64-bit bus) and Give mode (handing one pixel per cycle to the core). A
// word arriving from the bus is loaded into the Update half in one cycle
// (data_we); meanwhile the Give half serves lane give_lane. `swap` exchanges
// the modes, once per 8-cycle pipeline tile, after the Update half has been
// loaded and the Give half emptied, so loading and giving never stall.
//
// Besides the pixels each half keeps a per-lane valid mask, written by the
// access controller when it issues the read (mask_we). A lane whose pixel
// lies outside the frame has mask 0 and reaches the core as give_en = 0.
// Masks reset to 0; the data halves need no reset.
module in_pingpong #(
  parameter int unsigned LANES = 8,
  parameter int unsigned PIX_W = 8,
  localparam int unsigned LW   = $clog2(LANES)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        mask_we,
  input  logic [LANES-1:0]            mask,
  input  logic                        data_we,
  input  logic [LANES-1:0][PIX_W-1:0] data,
  input  logic                        swap,
  input  logic [LW-1:0]               give_lane,
  output logic [PIX_W-1:0]            give_pix,
  output logic                        give_en
);

  logic [1:0][LANES-1:0][PIX_W-1:0] buf_data;
  logic [1:0][LANES-1:0]            buf_mask;
  logic                             upd;       // index of the Update half

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd      <= 1'b0;
      buf_mask <= '0;
    end else begin
      if (mask_we) buf_mask[upd] <= mask;
      if (swap)    upd <= ~upd;
    end
  end

  always_ff @(posedge clk) begin
    if (data_we) buf_data[upd] <= data;
  end

  assign give_pix = buf_data[~upd][give_lane];
  assign give_en  = buf_mask[~upd][give_lane];

endmodule
