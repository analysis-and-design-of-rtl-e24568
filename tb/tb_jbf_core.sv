// tb_jbf_core: the computing core (two histogram engines and the
// convolution engine) at a reduced window (WIN=5, WS=10, 64 bins). Two
// stripes of random guidance/source pixels, some marked outside the frame,
// are streamed as integral-region positions with idle gaps and idle slots.
// For every position whose window lies inside the region the result is
// compared with a brute-force joint bilateral filter over that window, and
// must come out LAT = 13 cycles later with its tag; every slot's out_vld
// must follow in_vld by the same latency.
module tb_jbf_core;
  localparam int unsigned NB = 64, WIN = 5, WS = 10, IRW = WIN + WS - 1, ROWS = 12;
  localparam int unsigned LAT = 13, TAG_W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tbl_we = 1'b0;
  logic [4:0] tbl_waddr = '0;
  logic [7:0] tbl_wdata = '0;
  logic in_vld = 0, in_pos = 0, in_first_row = 0, s_en = 0, q_en = 0;
  logic [3:0] in_x = '0;
  logic [7:0] s_i = '0, s_j = '0, q_i = '0, q_j = '0, in_ic = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic out_vld;
  logic [7:0] out_pix;
  logic [TAG_W-1:0] out_tag;
  int checks = 0, failures = 0;
  int wtab [32];
  int pe [ROWS][IRW], pi [ROWS][IRW], pj [ROWS][IRW];
  int exp_pix [$], exp_tag [$], exp_t [$], exp_chk [$];
  int cyc = 0;

  jbf_core #(.NB(NB), .WIN(WIN), .WS(WS), .TAG_W(TAG_W)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (exp_t.size() > 0 && exp_t[0] == cyc) begin
      checks++;
      if (!out_vld || int'(out_tag) != exp_tag[0] || (exp_chk[0] != 0 && int'(out_pix) != exp_pix[0])) begin
        failures++;
        if (failures < 10) $display("FAIL: cycle %0d vld=%0d pix=%0d tag=%0d expected pix=%0d tag=%0d",
                                    cyc, out_vld, out_pix, out_tag, exp_pix[0], exp_tag[0]);
      end
      void'(exp_pix.pop_front()); void'(exp_tag.pop_front()); void'(exp_t.pop_front()); void'(exp_chk.pop_front());
    end else if (out_vld) begin
      checks++; failures++;
      $display("FAIL: unexpected out_vld at cycle %0d", cyc);
    end
  end

  function automatic int ref_pix(int y, int x);
    longint nu, de;
    int ic;
    nu = 0; de = 0;
    ic = pi[y - WIN/2][x - WIN/2];
    for (int yy = y - int'(WIN) + 1; yy <= y; yy++)
      for (int xx = x - int'(WIN) + 1; xx <= x; xx++)
        if (pe[yy][xx] != 0) begin
          int d, w;
          d = ic - (pi[yy][xx] / 4) * 4;
          if (d < 0) d = -d;
          w = (d < 32) ? wtab[d] : 0;
          de += w;
          nu += longint'(w) * pj[yy][xx];
        end
    return (de == 0) ? 0 : int'(nu / de);
  endfunction

  initial begin
    for (int d = 0; d < 32; d++) wtab[d] = int'($floor(255.0 * $exp(-(d * d) / (2.0 * 9.0 * 9.0)) + 0.5));
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < 32; d++) begin
      @(negedge clk);
      tbl_we = 1; tbl_waddr = 5'(d); tbl_wdata = 8'(wtab[d]);
    end
    @(negedge clk);
    tbl_we = 0;
    for (int stripe = 0; stripe < 2; stripe++) begin
      for (int y = 0; y < ROWS; y++)
        for (int x = 0; x < IRW; x++) begin
          pe[y][x] = ($urandom_range(0, 5) != 0);
          pi[y][x] = (x < 7) ? $urandom_range(0, 60) : $urandom_range(100, 255);
          pj[y][x] = $urandom_range(0, 255);
        end
      for (int y = 0; y < ROWS; y++) begin
        for (int x = 0; x < IRW; x++) begin
          int full;
          @(negedge clk);
          in_vld = 1; in_pos = 1; in_x = 4'(x); in_first_row = (y == 0);
          s_en = pe[y][x] != 0; s_i = 8'(pi[y][x]); s_j = 8'(pj[y][x]);
          q_en = (y >= WIN) && pe[y-WIN][x] != 0;
          q_i = (y >= WIN) ? 8'(pi[y-WIN][x]) : 8'($urandom);
          q_j = (y >= WIN) ? 8'(pj[y-WIN][x]) : 8'($urandom);
          full = (x >= WIN - 1) && (y >= WIN - 1);
          in_ic = full ? 8'(pi[y - WIN/2][x - WIN/2]) : 8'($urandom);
          in_tag = TAG_W'($urandom);
          exp_tag.push_back(int'(in_tag));
          exp_t.push_back(cyc + LAT);
          exp_chk.push_back(full);
          exp_pix.push_back(full ? ref_pix(y, x) : 0);
        end
        repeat ($urandom_range(0, 3)) begin
          @(negedge clk);
          in_vld = 1'($urandom); in_pos = 0; in_x = 4'($urandom); in_tag = TAG_W'($urandom);
          if (in_vld) begin
            exp_tag.push_back(int'(in_tag)); exp_t.push_back(cyc + LAT); exp_chk.push_back(0); exp_pix.push_back(0);
          end
        end
      end
    end
    @(negedge clk);
    in_vld = 0; in_pos = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_t.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_t.size());
    end
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
