// tb_access_ctrl: the access controller at a reduced size (M=6, N=32,
// WIN=5, WS=16: two stripes, IR of 20 columns = 3 tiles). A cycle-by-cycle
// model walks stripes, rows (M + WIN/2 per stripe), tiles and the 8 cycles
// of each tile and checks: the read in slots 0..4 (id, pixel address, valid
// mask, no request when the mask is empty), the mask write into the right
// buffer, the output write in slot 5 only when a packet is pending (with
// the packet's address, data and enables, and the ack), the buffer swap on
// the last cycle of every tile, the position stream of the previous tile
// (x, first row, lane, position valid, packet address), the drain tiles and
// the total frame time. Read responses are steered by id into ib_data_we.
module tb_access_ctrl;
  import jbf_pkg::*;
  localparam int M = 6, N = 32, WIN = 5, WS = 16, DRAIN = 5;
  localparam int HALF = WIN / 2, IRW = WIN + WS - 1, NT = (IRW + 7) / 8, NS = N / WS;
  localparam int BI = 1000, BJ = 3000, BO = 5000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  logic [4:0] ib_mask_we, ib_data_we;
  logic [7:0] ib_mask;
  logic ib_swap;
  logic ob_pending = 1'b0;
  logic [31:0] ob_addr = '0;
  logic [63:0] ob_data = '0;
  logic [7:0] ob_be = '0;
  logic ob_ack;
  logic give_slot, give_pos, give_first_row;
  logic [4:0] give_x;
  logic [2:0] give_lane;
  logic [31:0] give_paddr;
  int checks = 0, failures = 0, n_pend = 0, n_skip = 0;

  access_ctrl #(.M(M), .N(N), .WIN(WIN), .WS(WS), .DRAIN(DRAIN)) dut (
    .clk, .rst_n, .start, .frame_m (16'(M)), .frame_n (16'(N)), .base_i (32'(BI)), .base_j (32'(BJ)), .base_o (32'(BO)),
    .busy, .done, .bus_req, .bus_rsp, .ib_mask_we, .ib_mask, .ib_data_we, .ib_swap,
    .ob_pending, .ob_addr, .ob_data, .ob_be, .ob_ack,
    .give_slot, .give_pos, .give_x, .give_first_row, .give_lane, .give_paddr
  );
  always #5 clk = ~clk;

  // bus responses: id echoed two cycles later
  bus_rsp_t p1;
  always_ff @(posedge clk) begin
    p1 <= '{rvalid: bus_req.req && !bus_req.we, rid: bus_req.id, rdata: 64'(bus_req.addr)};
    bus_rsp <= p1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [7:0] lane_mask(int kind, int s, int y, int t);
    logic [7:0] m;
    for (int l = 0; l < 8; l++) begin
      int x, col;
      x = 8 * t + l;
      col = s * WS - HALF + x;
      case (kind)
        0: m[l] = x < IRW && x >= WIN - 1 && y >= HALF;
        1: m[l] = x < IRW && col >= 0 && col < N && y < M;
        default: m[l] = x < IRW && col >= 0 && col < N && y >= WIN;
      endcase
    end
    return m;
  endfunction

  initial begin
    int prev_valid, prev_t, prev_y, prev_s;
    int resp_q [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    prev_valid = 0; prev_t = 0; prev_y = 0; prev_s = 0;
    for (int tile = 0; tile < NS * (M + HALF) * NT + DRAIN; tile++) begin
      int s, y, t, sweep;
      sweep = tile < NS * (M + HALF) * NT;
      s = tile / ((M + HALF) * NT);
      y = (tile / NT) % (M + HALF);
      t = tile % NT;
      for (int c = 0; c < 8; c++) begin
        logic [7:0] em;
        int ea, base;
        // output buffer stimulus: sometimes a packet is pending
        if (c == 0) begin
          ob_pending = 1'($urandom);
          ob_addr = $urandom; ob_data = {$urandom, $urandom}; ob_be = 8'($urandom);
        end
        #1;
        check(busy, "busy low during frame");
        if (c < 5 && sweep) begin
          int kind, row;
          kind = (c == 0) ? 0 : (c <= 2) ? 1 : 2;
          em = lane_mask(kind, s, y, t);
          base = (c == 0 || c == 1 || c == 3) ? BI : BJ;
          row = (c == 0) ? y - HALF : (c <= 2) ? y : y - WIN;
          ea = base + row * N + s * WS - HALF + 8 * t - ((c == 0) ? HALF : 0);
          check(ib_mask_we == 5'(1 << c) && ib_mask == em,
                $sformatf("tile %0d c %0d mask_we=%b mask=%b expected %b", tile, c, ib_mask_we, ib_mask, em));
          check(bus_req.req == (em != 0), $sformatf("tile %0d c %0d req=%0d", tile, c, bus_req.req));
          if (em == 0) n_skip++;
          if (em != 0) begin
            check(!bus_req.we && bus_req.id == 3'(c) && bus_req.addr == 32'(ea),
                  $sformatf("tile %0d c %0d addr=%0d expected %0d", tile, c, bus_req.addr, ea));
            resp_q.push_back(c);
          end
        end else if (c == 5) begin
          check(bus_req.req == ob_pending && ob_ack == ob_pending, "slot 5 write/ack");
          if (ob_pending) begin
            n_pend++;
            check(bus_req.we && bus_req.addr == ob_addr && bus_req.wdata == ob_data && bus_req.be == ob_be,
                  "slot 5 write contents");
          end
        end else if (c < 5) begin
          check(!bus_req.req && ib_mask_we == 5'(1 << c) && ib_mask == 0, "drain tile clears masks");
        end else begin
          check(!bus_req.req && !ob_ack && ib_mask_we == 0, "idle slot");
        end
        // read data steering
        if (bus_rsp.rvalid) begin
          check(resp_q.size() > 0 && ib_data_we == 5'(1 << resp_q[0]), "response steering");
          if (resp_q.size() > 0) void'(resp_q.pop_front());
        end else check(ib_data_we == 0, "spurious data_we");
        check(ib_swap == (c == 7), "swap timing");
        // position stream of the previous tile
        check(give_slot == (tile > 0) && give_lane == 3'(c), "give slot/lane");
        if (tile > 0) begin
          int gx;
          gx = 8 * prev_t + c;
          check(give_pos == (prev_valid && gx < IRW), $sformatf("tile %0d c %0d give_pos", tile, c));
          if (give_pos) begin
            check(give_x == 5'(gx) && give_first_row == (prev_y == 0), "give x/first row");
            check(give_paddr == 32'(BO + (prev_y - HALF) * N + prev_s * WS - 2 * HALF + 8 * prev_t), "give packet address");
          end
        end
        @(negedge clk);
      end
      prev_valid = sweep; prev_t = t; prev_y = y; prev_s = s;
    end
    check(done, "done pulse at end of drain");
    @(negedge clk);
    check(!busy && !done, "idle after done");
    check(n_pend > 0 && n_skip > 0, "pending writes and skipped reads both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
