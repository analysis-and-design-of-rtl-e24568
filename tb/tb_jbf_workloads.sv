// tb_jbf_workloads: the standard video resolutions below HD1080p through the
// JBF accelerator at its default parameters (sized for 1920x1080, 31x31
// window, 60-pixel stripes, 64 bins), selected at run time with
// frame_m/frame_n: CIF 352x288, VGA 640x480 and HD720p 1280x720, one frame
// each, back to back without reset.
//
// A behavioural off-chip memory (pixel-addressed, 8-pixel unaligned reads
// answered READ_LAT cycles later with their id, byte-masked writes) holds
// random images I (blocky, so the range kernel matters) and J. For each
// frame the testbench checks
//   * the frame time: ceil(n/60) * (m + 15) * 96 + 41 cycles, start to done;
//   * every result pixel written exactly once and nothing written outside
//     the result image;
//   * result pixels against a brute-force clipped-window joint bilateral
//     filter: every pixel of the CIF frame, and for the larger frames the
//     borders, the narrow last stripe, stripe seams and random pixels.
// None of these widths is a multiple of 60, so every frame ends with a
// partly masked stripe.
module tb_jbf_workloads;
  import jbf_pkg::*;

  localparam int unsigned WIN = DEF_WIN, WS = DEF_WS;
  localparam int unsigned HALF = WIN / 2, IRW = WIN + WS - 1;
  localparam int unsigned NT = (IRW + 7) / 8, DRAIN = 5;
  localparam int unsigned READ_LAT = 3;
  localparam int unsigned MAXP = 1280 * 720;
  localparam int unsigned BI = 100, BJ = BI + MAXP + 40, BO = BJ + MAXP + 40;
  localparam int unsigned MEM = BO + MAXP + 64;
  localparam real SIGMA = 16.0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic tbl_we = 1'b0;
  logic [4:0] tbl_waddr = '0;
  logic [7:0] tbl_wdata = '0;
  logic [15:0] fm = '0, fn = '0;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;

  always #5 clk = ~clk;

  jbf_top dut (
    .clk, .rst_n, .start, .frame_m (fm), .frame_n (fn), .base_i (32'(BI)), .base_j (32'(BJ)), .base_o (32'(BO)),
    .busy, .done, .tbl_we, .tbl_waddr, .tbl_wdata, .bus_req, .bus_rsp
  );

  // ------------------------------------------------------ off-chip memory
  logic [7:0] mem [MEM];
  int         wr_count [MAXP];
  int         stray = 0;
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
        if (a >= int'(BO) && a < int'(BO) + int'(fm) * int'(fn)) wr_count[a - BO]++;
        else stray++;
      end
    end
    pipe[0] <= r;
    for (int k = 1; k < READ_LAT; k++) pipe[k] <= pipe[k-1];
  end
  assign bus_rsp = pipe[READ_LAT-1];

  // ------------------------------------------------------------ reference
  int wtab [32];

  function automatic int ref_pix(int m, int n, int cy, int cx);
    longint nu, de;
    int ic;
    nu = 0; de = 0;
    ic = int'(mem[BI + cy * n + cx]);
    for (int y = cy - int'(HALF); y <= cy + int'(HALF); y++)
      for (int x = cx - int'(HALF); x <= cx + int'(HALF); x++)
        if (y >= 0 && y < m && x >= 0 && x < n) begin
          int d, w;
          d = ic - int'(mem[BI + y * n + x] >> 2) * 4;
          if (d < 0) d = -d;
          w = (d < 32) ? wtab[d] : 0;
          de += w;
          nu += longint'(w) * mem[BJ + y * n + x];
        end
    return (de == 0) ? 0 : int'(nu / de);
  endfunction

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic check_pix(int m, int n, int y, int x);
    int r;
    r = ref_pix(m, n, y, x);
    check(int'(mem[BO + y * n + x]) == r,
          $sformatf("%0dx%0d pixel (%0d,%0d) = %0d, expected %0d", n, m, y, x, mem[BO + y * n + x], r));
  endtask

  task automatic run_frame(string name, int m, int n, bit exhaustive);
    longint t0, t1, expect_cycles;
    int nbad, ns, last_col;
    ns = (n + int'(WS) - 1) / int'(WS);
    last_col = (ns - 1) * int'(WS);
    for (int y = 0; y < m; y++)
      for (int x = 0; x < n; x++) begin
        mem[BI + y * n + x] = ((x / 23 + y / 17) % 3 == 0 ? 8'd30 : (x / 23 + y / 17) % 3 == 1 ? 8'd120 : 8'd210)
                              + 8'($urandom_range(0, 24));
        mem[BJ + y * n + x] = 8'($urandom);
      end
    for (int p = 0; p < MAXP; p++) wr_count[p] = 0;
    stray = 0;
    @(posedge clk);
    fm <= 16'(m); fn <= 16'(n);
    start <= 1'b1;
    @(posedge clk);
    t0 = $time / 10;
    start <= 1'b0;
    @(posedge clk iff done);
    t1 = $time / 10;
    expect_cycles = longint'(ns) * (m + HALF) * NT * 8 + 8 * DRAIN + 1;
    check(t1 - t0 == expect_cycles, $sformatf("%s took %0d cycles, expected %0d", name, t1 - t0, expect_cycles));
    repeat (4) @(posedge clk);
    check(!busy, "busy after done");
    nbad = 0;
    for (int p = 0; p < m * n; p++) if (wr_count[p] != 1) nbad++;
    check(nbad == 0, $sformatf("%s: %0d pixels not written exactly once", name, nbad));
    check(stray == 0, $sformatf("%s: %0d bytes written outside the result image", name, stray));
    if (exhaustive) begin
      for (int y = 0; y < m; y++)
        for (int x = 0; x < n; x++) check_pix(m, n, y, x);
    end else begin
      for (int k = 0; k < 2400; k++) begin
        int y, x;
        case (k % 6)
          0: begin y = (k / 6) % 2 == 0 ? $urandom_range(0, 2) : m - 1 - $urandom_range(0, 2); x = $urandom_range(0, n - 1); end
          1: begin y = $urandom_range(0, m - 1); x = (k / 6) % 2 == 0 ? $urandom_range(0, 2) : n - 1 - $urandom_range(0, 2); end
          2: begin y = $urandom_range(0, m - 1); x = int'(WS) * $urandom_range(1, ns - 1) - (k / 6) % 2; end
          3: begin y = $urandom_range(0, m - 1); x = $urandom_range(last_col, n - 1); end
          default: begin y = $urandom_range(0, m - 1); x = $urandom_range(0, n - 1); end
        endcase
        check_pix(m, n, y, x);
      end
    end
    $display("%s %0dx%0d: %0d cycles = %0.1f frames/s at 200 MHz", name, n, m, t1 - t0, 200.0e6 / real'(t1 - t0));
  endtask

  // --------------------------------------------------------------- stimulus
  initial begin
    for (int d = 0; d < 32; d++) wtab[d] = int'($floor(255.0 * $exp(-(d * d) / (2.0 * SIGMA * SIGMA)) + 0.5));
    for (int a = 0; a < MEM; a++) mem[a] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int d = 0; d < 32; d++) begin
      tbl_we <= 1'b1; tbl_waddr <= 5'(d); tbl_wdata <= 8'(wtab[d]);
      @(posedge clk);
    end
    tbl_we <= 1'b0;
    run_frame("CIF", 288, 352, 1'b1);
    run_frame("VGA", 480, 640, 1'b0);
    run_frame("HD720p", 720, 1280, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
