// out_pingpong: 2x8-pixel ping-pong output buffer of the interface.
//
// Results leave the core one per cycle, each tagged with its lane (0..7)
// inside an 8-pixel output packet, a lane-enable and the packet's pixel
// address. The Update half collects the eight lanes; the result carrying
// lane 7 closes the packet and swaps the halves, so the full packet waits in
// the Give half (give_pending) until the access controller writes it to the
// bus in its output slot and pulses `ack`. Lanes whose enable is low are
// not written (byte enables); a packet with no enabled lane is dropped.
//
// One packet closes every 8 cycles and the controller has one output slot
// every 8 cycles, so the Give half is always free again in time; an
// assertion checks this. ack in the cycle of a swap retires the old packet.
module out_pingpong #(
  parameter int unsigned LANES  = 8,
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned ADDR_W = 32,
  localparam int unsigned LW    = $clog2(LANES)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_vld,
  input  logic                        in_en,
  input  logic [LW-1:0]               in_lane,
  input  logic [ADDR_W-1:0]           in_addr,
  input  logic [PIX_W-1:0]            in_pix,
  output logic                        give_pending,
  output logic [ADDR_W-1:0]           give_addr,
  output logic [LANES-1:0][PIX_W-1:0] give_data,
  output logic [LANES-1:0]            give_be,
  input  logic                        ack
);

  logic [1:0][LANES-1:0][PIX_W-1:0] buf_data;
  logic [1:0][LANES-1:0]            buf_be;
  logic [1:0][ADDR_W-1:0]           buf_addr;
  logic                             upd;
  logic [LANES-1:0]                 be_next;
  logic                             close;

  always_comb begin
    be_next = buf_be[upd];
    be_next[in_lane] = in_en;
    close = in_vld && in_lane == LW'(LANES - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd          <= 1'b0;
      buf_be       <= '0;
      give_pending <= 1'b0;
    end else begin
      if (in_vld) buf_be[upd][in_lane] <= in_en;
      if (close) begin
        upd          <= ~upd;
        buf_be[~upd] <= '0;           // next Update half starts empty
        give_pending <= |be_next;
      end else if (ack) begin
        give_pending <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_vld) begin
      buf_data[upd][in_lane] <= in_pix;
      buf_addr[upd]          <= in_addr;
    end
  end

  assign give_addr = buf_addr[~upd];
  assign give_data = buf_data[~upd];
  assign give_be   = buf_be[~upd];

  // A packet may only close once the previous one has been written.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    close |-> (!give_pending || ack));

endmodule
