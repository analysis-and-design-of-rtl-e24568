// tb_hist_engine: the histogram calculation engine (intensity variant,
// VAL_W = 8) at a reduced size. Two stripes of random pixels are streamed
// in raster order with random idle gaps between rows, random out-of-frame
// pixels, and a new stripe started without clearing the memory (first_row).
// For every position the window histogram, rows y-WIN+1..y and columns
// x-WIN+1..x of the integral region, is summed directly in software and
// compared bin by bin with the engine output, which must appear exactly two
// cycles after the position went in.
module tb_hist_engine;
  localparam int unsigned NB = 16, IRW = 14, WIN = 5, VAL_W = 8, HW = 15;
  localparam int unsigned ROWS = 11, XW = $clog2(IRW);
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_vld = 1'b0, in_first_row = 1'b0, s_en = 1'b0, q_en = 1'b0;
  logic [XW-1:0] in_x = '0;
  logic [3:0] s_bin = '0, q_bin = '0;
  logic [VAL_W-1:0] s_val = '0, q_val = '0;
  logic out_vld;
  logic [NB-1:0][HW-1:0] out_hist;
  int checks = 0, failures = 0;

  hist_engine #(.NB(NB), .IRW(IRW), .WIN(WIN), .VAL_W(VAL_W), .HW(HW)) dut (.*);
  always #5 clk = ~clk;

  int pe [ROWS][IRW], pb [ROWS][IRW], pv [ROWS][IRW];
  // expected histograms queued with the cycle they must appear in
  int exp_q [$][NB];
  int exp_t [$];
  int cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // output checker
  always @(negedge clk) if (rst_n) begin
    if (exp_t.size() > 0 && exp_t[0] == cyc) begin
      checks++;
      if (!out_vld) begin
        failures++;
        $display("FAIL: out_vld low at cycle %0d", cyc);
      end
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (int'(out_hist[b]) != exp_q[0][b]) begin
          failures++;
          if (failures < 10) $display("FAIL: cycle %0d bin %0d got %0d expected %0d", cyc, b, out_hist[b], exp_q[0][b]);
        end
      end
      void'(exp_q.pop_front());
      void'(exp_t.pop_front());
    end else if (out_vld) begin
      checks++; failures++;
      $display("FAIL: unexpected out_vld at cycle %0d", cyc);
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int stripe = 0; stripe < 2; stripe++) begin
      for (int y = 0; y < ROWS; y++)
        for (int x = 0; x < IRW; x++) begin
          pe[y][x] = ($urandom_range(0, 4) != 0);
          pb[y][x] = $urandom_range(0, NB - 1);
          pv[y][x] = $urandom_range(0, 255);
        end
      for (int y = 0; y < ROWS; y++) begin
        for (int x = 0; x < IRW; x++) begin
          int h [NB];
          @(negedge clk);
          in_vld = 1; in_x = XW'(x); in_first_row = (y == 0);
          s_en = pe[y][x] != 0; s_bin = 4'(pb[y][x]); s_val = 8'(pv[y][x]);
          if (y >= WIN) begin
            q_en = pe[y-WIN][x] != 0; q_bin = 4'(pb[y-WIN][x]); q_val = 8'(pv[y-WIN][x]);
          end else begin
            q_en = 1'($urandom); q_en = 0; q_bin = 4'($urandom); q_val = 8'($urandom);
          end
          for (int b = 0; b < NB; b++) h[b] = 0;
          for (int yy = y - int'(WIN) + 1; yy <= y; yy++)
            for (int xx = x - int'(WIN) + 1; xx <= x; xx++)
              if (yy >= 0 && xx >= 0 && pe[yy][xx] != 0) h[pb[yy][xx]] += pv[yy][xx];
          for (int b = 0; b < NB; b++) h[b] = h[b] % (1 << HW);
          exp_q.push_back(h);
          exp_t.push_back(cyc + 2);
        end
        // idle gap after the row
        repeat ($urandom_range(0, 3)) begin
          @(negedge clk);
          in_vld = 0; in_x = XW'($urandom); s_en = 1'($urandom);
        end
      end
    end
    @(negedge clk);
    in_vld = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_t.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs missing", exp_t.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
