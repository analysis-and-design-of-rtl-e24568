// access_ctrl: access controller and scheduler of the interface.
//
// The frame is cut into vertical stripes of WS columns. Each stripe is swept
// row by row over its integral region (IR): the stripe widened by HALF =
// WIN/2 columns on both sides, IRW = WIN + WS - 1 columns in all. A row of
// the IR is split into NT = ceil(IRW/8) pipeline tiles of 8 positions, and
// every tile takes exactly 8 cycles. Rows run from 0 to M+HALF-1 so that the
// windows centred on the last HALF frame rows are also completed.
//
// Within a tile a six-state round-robin FSM owns the 64-bit bus:
//   state 0  read 8 pixels of I_c  (window centres, row y-HALF)
//   state 1  read 8 pixels of I_S  (entering pixels,  row y)
//   state 2  read 8 pixels of J_S
//   state 3  read 8 pixels of I_Q  (leaving pixels,   row y-WIN)
//   state 4  read 8 pixels of J_Q
//   state 5  write the 8-pixel result packet waiting in the output buffer,
//            then hold until the tile's 8 cycles are over.
// At each read the controller also writes the 8-lane valid mask (pixel
// inside the frame and inside the IR; for I_c, window fully inside the IR
// and centre row inside the frame) into the buffer's Update half; a read
// whose mask is all zero is not issued. Read data returns tagged with the
// slot number and is steered into that buffer; it must arrive before the
// tile ends (read latency up to 7 - 4 = 3 cycles). At the last cycle of a
// tile all input buffers swap, and during the next tile the controller
// feeds the core one position per cycle (give_*), lane = cycle in tile.
// After the last tile DRAIN empty tiles flush the core and the output
// buffer; then `done` pulses for one cycle.
//
// Frame layout (this design's choice): I, J and the result O are
// frame_m x frame_n arrays of 8-bit pixels, row-major, at pixel addresses
// base_i/base_j/base_o; 8-pixel accesses may start at any pixel address.
// The frame size is read at `start`; M and N are the largest frame the
// counters hold. A frame width that is not a multiple of WS ends with a
// narrower stripe (its extra columns are masked). The result packet of a
// tile covers the centre columns of its 8 positions.
// Cycles per frame: NS * (frame_m + HALF) * NT * 8 + DRAIN * 8 + 1 (start to
// done), NS = ceil(frame_n / WS).
module access_ctrl
  import jbf_pkg::*;
#(
  parameter int unsigned M     = DEF_M,
  parameter int unsigned N     = DEF_N,
  parameter int unsigned WIN   = DEF_WIN,
  parameter int unsigned WS    = DEF_WS,
  parameter int unsigned DRAIN = 5,
  localparam int unsigned HALF = WIN / 2,
  localparam int unsigned IRW  = WIN + WS - 1,
  localparam int unsigned XW   = $clog2(IRW),
  localparam int unsigned NT   = (IRW + LANES - 1) / LANES,
  localparam int unsigned ROWS = M + HALF,
  localparam int unsigned LW   = $clog2(LANES)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [15:0]             frame_m,   // frame height, 1..M
  input  logic [15:0]             frame_n,   // frame width, WS..N
  input  logic [ADDR_W-1:0]       base_i,
  input  logic [ADDR_W-1:0]       base_j,
  input  logic [ADDR_W-1:0]       base_o,
  output logic                    busy,
  output logic                    done,
  // off-chip bus
  output bus_req_t                bus_req,
  input  bus_rsp_t                bus_rsp,
  // input buffers, indexed by slot 0..4
  output logic [4:0]              ib_mask_we,
  output logic [LANES-1:0]        ib_mask,
  output logic [4:0]              ib_data_we,
  output logic                    ib_swap,
  // output buffer
  input  logic                    ob_pending,
  input  logic [ADDR_W-1:0]       ob_addr,
  input  logic [BUS_W-1:0]        ob_data,
  input  logic [LANES-1:0]        ob_be,
  output logic                    ob_ack,
  // position stream to the core
  output logic                    give_slot,     // a tile slot (also while draining)
  output logic                    give_pos,      // a real IR position
  output logic [XW-1:0]           give_x,
  output logic                    give_first_row,
  output logic [LW-1:0]           give_lane,
  output logic [ADDR_W-1:0]       give_paddr     // result packet address
);

  localparam int unsigned YW = $clog2(ROWS + 1);
  localparam int unsigned TW = (NT > 1) ? $clog2(NT) : 1;
  localparam int unsigned DW = $clog2(DRAIN + 1);
  localparam int unsigned CW = ADDR_W + 2;          // signed address math
  typedef logic signed [CW-1:0] saddr_t;

  // ----------------------------------------------------------- tile counters
  logic          running, sweeping;  // sweeping: tiles still carry real work
  logic [15:0]   stripe_col;        // first frame column of the stripe
  logic [YW-1:0] fm;                 // frame size latched at start
  logic [15:0]   fn;
  logic [YW-1:0] y;
  logic [TW-1:0] t;
  logic [LW-1:0] c;                  // cycle in tile = lane given to the core
  logic [DW-1:0] drain_cnt;
  slot_e         state;
  logic          tile_end;

  assign tile_end = running && c == LW'(LANES - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      sweeping  <= 1'b0;
      stripe_col <= '0;
      fm        <= '0;
      fn        <= '0;
      y         <= '0;
      t         <= '0;
      c         <= '0;
      drain_cnt <= '0;
      state     <= SLOT_IC;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running   <= 1'b1;
          sweeping  <= 1'b1;
          stripe_col <= '0;
          fm        <= YW'(frame_m);
          fn        <= frame_n;
          y         <= '0;
          t         <= '0;
          c         <= '0;
          drain_cnt <= '0;
          state     <= SLOT_IC;
        end
      end else begin
        c <= c + 1'b1;
        // round-robin FSM: 0..5, hold in 5 until the tile ends
        if (tile_end)               state <= SLOT_IC;
        else if (state != SLOT_OUT) state <= slot_e'(state + 3'd1);
        if (tile_end) begin
          if (sweeping) begin
            if (t == TW'(NT - 1)) begin
              t <= '0;
              if (y == fm + YW'(HALF - 1)) begin
                y <= '0;
                if (stripe_col + 16'(WS) >= fn) sweeping   <= 1'b0;
                else                           stripe_col <= stripe_col + 16'(WS);
              end else begin
                y <= y + 1'b1;
              end
            end else begin
              t <= t + 1'b1;
            end
          end else if (drain_cnt == DW'(DRAIN - 1)) begin
            running <= 1'b0;
            done    <= 1'b1;
          end else begin
            drain_cnt <= drain_cnt + 1'b1;
          end
        end
      end
    end
  end

  assign busy = running;

  // ------------------------------------------------- geometry of this tile
  saddr_t        col0;        // frame column of lane 0 of an entering pixel
  logic [LANES-1:0] m_s, m_q, m_c;
  saddr_t        row_s, row_q, row_c;

  always_comb begin
    col0  = saddr_t'(stripe_col) - saddr_t'(HALF) + saddr_t'(t) * saddr_t'(LANES);
    row_s = saddr_t'(y);
    row_q = saddr_t'(y) - saddr_t'(WIN);
    row_c = saddr_t'(y) - saddr_t'(HALF);
    for (int l = 0; l < LANES; l++) begin
      logic [XW:0] xl;
      saddr_t      col;
      logic        in_ir, col_ok;
      xl     = (XW+1)'(t) * (XW+1)'(LANES) + (XW+1)'(l);
      col    = col0 + saddr_t'(l);
      in_ir  = xl < (XW+1)'(IRW);
      col_ok = col >= 0 && col < saddr_t'(fn);
      m_s[l] = sweeping && in_ir && col_ok && row_s < saddr_t'(fm);
      m_q[l] = sweeping && in_ir && col_ok && row_q >= 0;
      m_c[l] = sweeping && in_ir && xl >= (XW+1)'(WIN - 1) && row_c >= 0
               && col - saddr_t'(HALF) < saddr_t'(fn);
    end
  end

  // ------------------------------------------------------------- bus slots
  saddr_t a_s_off, a_q_off, a_c_off;

  always_comb begin
    a_s_off = row_s * saddr_t'(fn) + col0;
    a_q_off = row_q * saddr_t'(fn) + col0;
    a_c_off = row_c * saddr_t'(fn) + col0 - saddr_t'(HALF);

    bus_req    = '0;
    ib_mask_we = '0;
    ib_mask    = '0;
    ob_ack     = 1'b0;
    if (running) begin
      unique case (state)
        SLOT_IC: begin
          ib_mask = m_c;
          bus_req.addr = ADDR_W'(saddr_t'(base_i) + a_c_off);
        end
        SLOT_IS: begin
          ib_mask = m_s;
          bus_req.addr = ADDR_W'(saddr_t'(base_i) + a_s_off);
        end
        SLOT_JS: begin
          ib_mask = m_s;
          bus_req.addr = ADDR_W'(saddr_t'(base_j) + a_s_off);
        end
        SLOT_IQ: begin
          ib_mask = m_q;
          bus_req.addr = ADDR_W'(saddr_t'(base_i) + a_q_off);
        end
        SLOT_JQ: begin
          ib_mask = m_q;
          bus_req.addr = ADDR_W'(saddr_t'(base_j) + a_q_off);
        end
        SLOT_OUT: begin
          if (c == LW'(SLOT_OUT) && ob_pending) begin
            bus_req.req   = 1'b1;
            bus_req.we    = 1'b1;
            bus_req.addr  = ob_addr;
            bus_req.wdata = ob_data;
            bus_req.be    = ob_be;
            ob_ack        = 1'b1;
          end
        end
        default: ;
      endcase
      if (state != SLOT_OUT) begin
        ib_mask_we[state] = 1'b1;
        bus_req.req       = |ib_mask;
        bus_req.id        = state;
      end
    end
  end

  always_comb begin
    ib_data_we = '0;
    if (bus_rsp.rvalid && bus_rsp.rid < 3'd5) ib_data_we[bus_rsp.rid] = 1'b1;
  end

  assign ib_swap = tile_end;

  // ------------------------------------------------- position stream (give)
  logic          g_slot, g_sweep, g_first;
  logic [TW-1:0] g_t;
  saddr_t        g_poff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_slot  <= 1'b0;
      g_sweep <= 1'b0;
    end else if (tile_end || !running) begin
      g_slot  <= running;
      g_sweep <= running && sweeping;
    end
  end

  always_ff @(posedge clk) begin
    if (tile_end) begin
      g_t     <= t;
      g_first <= y == '0;
      g_poff  <= a_c_off;
    end
  end

  logic [XW:0] g_x;
  assign g_x            = (XW+1)'(g_t) * (XW+1)'(LANES) + (XW+1)'(c);
  assign give_slot      = g_slot;
  assign give_pos       = g_sweep && g_x < (XW+1)'(IRW);
  assign give_x         = XW'(g_x);
  assign give_first_row = g_first;
  assign give_lane      = c;
  assign give_paddr     = ADDR_W'(saddr_t'(base_o) + g_poff);

  // ------------------------------------------------------------ protocol
  a_rsp_in_tile: assert property (@(posedge clk) disable iff (!rst_n)
    bus_rsp.rvalid |-> bus_rsp.rid < 3'd5);

  a_frame_size: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !running) |-> (frame_m >= 16'd1 && frame_m <= 16'(M) && frame_n >= 16'(WS) && frame_n <= 16'(N)));
  if (WIN % 2 != 1) begin : g_bad_win
    $error("window width WIN must be odd");
  end

endmodule
