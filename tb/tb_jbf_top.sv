// tb_jbf_top: end-to-end test of the JBF accelerator at a reduced size.
//
// A behavioural off-chip memory (pixel-addressed, 8-pixel unaligned reads
// answered READ_LAT cycles later with their id, byte-masked writes) holds a
// random guidance image I with a strong vertical edge, a random source
// image J and the result area O. After loading a Gaussian range table and
// one frame, every result pixel is compared with a brute-force evaluation
// of the clipped-window joint bilateral filter, every pixel must be written
// exactly once, and the frame must take the scheduled number of cycles.
// Two frames run back to back through the same instance: one of the largest
// size (40 wide, so the last of three stripes is only partly inside the
// frame) and a smaller one (7 x 20), which checks that the frame size is
// taken at start.
// It also counts how often each mechanism occurred: reads skipped outside
// the frame, partial and full result packets, clipped windows at all four
// frame borders, stripe changes and input buffer swaps.
module tb_jbf_top;
  import jbf_pkg::*;

  localparam int unsigned M = 10, N = 40, WIN = 5, WS = 16;
  localparam int unsigned HALF = WIN / 2, IRW = WIN + WS - 1;
  localparam int unsigned NT = (IRW + 7) / 8, NS = (N + WS - 1) / WS, DRAIN = 5;
  localparam int unsigned READ_LAT = 2;
  localparam int unsigned BI = 64, BJ = BI + M * N + 40, BO = BJ + M * N + 40;
  localparam int unsigned MEM = BO + M * N + 64;
  localparam real SIGMA = 12.0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  int fm = M, fn = N;
  logic busy, done;
  logic tbl_we = 1'b0;
  logic [4:0] tbl_waddr = '0;
  logic [7:0] tbl_wdata = '0;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;

  always #5 clk = ~clk;

  jbf_top #(.M(M), .N(N), .WIN(WIN), .WS(WS), .DRAIN(DRAIN)) dut (
    .clk, .rst_n, .start, .frame_m (16'(fm)), .frame_n (16'(fn)), .base_i (32'(BI)), .base_j (32'(BJ)), .base_o (32'(BO)),
    .busy, .done, .tbl_we, .tbl_waddr, .tbl_wdata, .bus_req, .bus_rsp
  );

  // ------------------------------------------------------ off-chip memory
  logic [7:0] mem [MEM];
  int         wr_count [M*N];
  bus_rsp_t   pipe [READ_LAT];

  always_ff @(posedge clk) begin
    bus_rsp_t r;
    r = '0;
    if (bus_req.req && !bus_req.we) begin
      r.rvalid = 1'b1;
      r.rid    = bus_req.id;
      for (int k = 0; k < 8; k++) r.rdata[8*k +: 8] = mem[(bus_req.addr + k) % MEM];
    end
    if (bus_req.req && bus_req.we) begin
      for (int k = 0; k < 8; k++) if (bus_req.be[k]) begin
        int a;
        a = int'(bus_req.addr) + k;
        mem[a % MEM] <= bus_req.wdata[8*k +: 8];
        if (a >= int'(BO) && a < int'(BO) + fm * fn) wr_count[a - BO]++;
      end
    end
    pipe[0] <= r;
    for (int k = 1; k < READ_LAT; k++) pipe[k] <= pipe[k-1];
  end
  assign bus_rsp = pipe[READ_LAT-1];

  // ------------------------------------------------------------ reference
  int   wtab [32];
  logic [7:0] img_i [M][N], img_j [M][N];

  function automatic int ref_pix(int cy, int cx);
    longint nu, de;
    nu = 0; de = 0;
    for (int y = cy - int'(HALF); y <= cy + int'(HALF); y++)
      for (int x = cx - int'(HALF); x <= cx + int'(HALF); x++)
        if (y >= 0 && y < fm && x >= 0 && x < fn) begin
          int d, w;
          d = int'(img_i[cy][cx]) - int'(img_i[y][x] >> 2) * 4;
          if (d < 0) d = -d;
          w = (d < 32) ? wtab[d] : 0;
          de += w;
          nu += longint'(w) * img_j[y][x];
        end
    return (de == 0) ? 0 : int'(nu / de);
  endfunction

  // -------------------------------------------------------- event counters
  int checks = 0, failures = 0;
  int n_rd = 0, n_rd_skip = 0, n_wr_full = 0, n_wr_part = 0, n_swap = 0, n_stripe = 0;
  int n_first_row = 0, n_q_masked = 0, n_s_masked = 0;
  logic [15:0] last_stripe;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.running && dut.u_ctrl.state != SLOT_OUT && dut.u_ctrl.sweeping) begin
      if (bus_req.req) n_rd++; else n_rd_skip++;
    end
    if (bus_req.req && bus_req.we) begin
      if (&bus_req.be) n_wr_full++; else n_wr_part++;
    end
    if (dut.ib_swap) n_swap++;
    if (dut.u_ctrl.running && dut.u_ctrl.stripe_col != last_stripe) n_stripe++;
    last_stripe <= dut.u_ctrl.stripe_col;
    if (dut.give_pos && dut.give_first_row) n_first_row++;
    if (dut.give_pos && !dut.g_en[SLOT_IQ]) n_q_masked++;
    if (dut.give_pos && !dut.g_en[SLOT_IS]) n_s_masked++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // --------------------------------------------------------------- stimulus
  task automatic run_frame(int m, int n);
    longint t0, t1, expect_cycles;
    fm = m; fn = n;
    for (int p = 0; p < M * N; p++) wr_count[p] = 0;
    for (int y = 0; y < m; y++)
      for (int x = 0; x < n; x++) begin
        img_i[y][x] = (x < 13 ? 8'd40 : 8'd200) + 8'($urandom_range(0, 30));
        img_j[y][x] = 8'($urandom);
        mem[BI + y * n + x] = img_i[y][x];
        mem[BJ + y * n + x] = img_j[y][x];
      end
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    t0 = $time / 10;
    start <= 1'b0;
    @(posedge clk iff done);
    t1 = $time / 10;
    expect_cycles = longint'((n + WS - 1) / WS) * (m + HALF) * NT * 8 + 8 * DRAIN + 1;
    check(t1 - t0 == expect_cycles, $sformatf("frame took %0d cycles, expected %0d", t1 - t0, expect_cycles));
    repeat (4) @(posedge clk);
    check(!busy, "busy after done");
    for (int y = 0; y < m; y++)
      for (int x = 0; x < n; x++) begin
        int r;
        r = ref_pix(y, x);
        check(wr_count[y * n + x] == 1, $sformatf("pixel (%0d,%0d) written %0d times", y, x, wr_count[y * n + x]));
        check(int'(mem[BO + y * n + x]) == r,
              $sformatf("pixel (%0d,%0d) = %0d, expected %0d", y, x, mem[BO + y * n + x], r));
      end
    begin
      int stray;
      stray = 0;
      for (int p = m * n; p < M * N; p++) stray += wr_count[p];
      check(stray == 0, "write beyond the frame");
    end
  endtask

  initial begin
    for (int d = 0; d < 32; d++) wtab[d] = int'($floor(255.0 * $exp(-(d * d) / (2.0 * SIGMA * SIGMA)) + 0.5));
    for (int a = 0; a < MEM; a++) mem[a] = 8'($urandom);
    last_stripe = 16'd0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int d = 0; d < 32; d++) begin
      tbl_we <= 1'b1; tbl_waddr <= 5'(d); tbl_wdata <= 8'(wtab[d]);
      @(posedge clk);
    end
    tbl_we <= 1'b0;
    run_frame(M, N);
    run_frame(7, 20);
    $display("events: reads=%0d skipped=%0d full_writes=%0d partial_writes=%0d swaps=%0d stripe_changes=%0d first_row=%0d q_masked=%0d s_masked=%0d",
             n_rd, n_rd_skip, n_wr_full, n_wr_part, n_swap, n_stripe, n_first_row, n_q_masked, n_s_masked);
    check(n_rd > 0, "no reads");
    check(n_rd_skip > 0, "no skipped read");
    check(n_wr_full > 0, "no full packet");
    check(n_wr_part > 0, "no partial packet");
    check(n_swap > 0, "no buffer swap");
    check(n_stripe > 0, "no stripe change");
    check(n_first_row > 0, "no first row");
    check(n_q_masked > 0, "no masked leaving pixel");
    check(n_s_masked > 0, "no masked entering pixel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
