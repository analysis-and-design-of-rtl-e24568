// tb_conv_engine: the convolution engine at its default size (64 bins,
// 12/20-bit histograms, 32-entry table). A Gaussian table is loaded, then
// one random (h, h', I_c) set per cycle is streamed in, with h'(b) built as
// the sum of h(b) random pixels so the weighted mean fits 8 bits. Each
// result is compared with floor(sum G*h' / sum G*h) computed in software,
// and must leave exactly LAT = 11 cycles later with its own tag. Sparse
// histograms (some with every weight zero) cover the zero-divisor case.
module tb_conv_engine;
  localparam int unsigned NB = 64, HW = 12, HPW = 20, TBL_N = 32, G_W = 8, TAG_W = 8;
  localparam int unsigned LAT = 11;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tbl_we = 1'b0;
  logic [4:0] tbl_waddr = '0;
  logic [7:0] tbl_wdata = '0;
  logic in_vld = 1'b0;
  logic [7:0] in_ic = '0;
  logic [NB-1:0][HW-1:0] in_h = '0;
  logic [NB-1:0][HPW-1:0] in_hp = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic out_vld;
  logic [7:0] out_pix;
  logic [TAG_W-1:0] out_tag;
  int checks = 0, failures = 0, zero_den = 0;
  int wtab [TBL_N];
  int exp_pix [$], exp_tag [$], exp_t [$];
  int cyc = 0;

  conv_engine #(.NB(NB), .HW(HW), .HPW(HPW), .TBL_N(TBL_N), .G_W(G_W), .TAG_W(TAG_W)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (exp_t.size() > 0 && exp_t[0] == cyc) begin
      checks++;
      if (!out_vld || int'(out_pix) != exp_pix[0] || int'(out_tag) != exp_tag[0]) begin
        failures++;
        if (failures < 10) $display("FAIL: cycle %0d vld=%0d pix=%0d tag=%0d expected pix=%0d tag=%0d",
                                    cyc, out_vld, out_pix, out_tag, exp_pix[0], exp_tag[0]);
      end
      void'(exp_pix.pop_front()); void'(exp_tag.pop_front()); void'(exp_t.pop_front());
    end else if (out_vld) begin
      checks++; failures++;
      $display("FAIL: unexpected out_vld at cycle %0d", cyc);
    end
  end

  initial begin
    for (int d = 0; d < TBL_N; d++) wtab[d] = int'($floor(255.0 * $exp(-(d * d) / (2.0 * 10.0 * 10.0)) + 0.5));
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < TBL_N; d++) begin
      @(negedge clk);
      tbl_we = 1; tbl_waddr = 5'(d); tbl_wdata = 8'(wtab[d]);
    end
    @(negedge clk);
    tbl_we = 0;
    for (int n = 0; n < 600; n++) begin
      longint de, nu;
      int sparse;
      @(negedge clk);
      in_vld = ($urandom_range(0, 7) != 0);
      in_ic  = 8'($urandom);
      in_tag = TAG_W'($urandom);
      sparse = $urandom_range(0, 3) == 0;
      de = 0; nu = 0;
      for (int b = 0; b < NB; b++) begin
        int cnt, sum, d, w;
        cnt = sparse ? (($urandom_range(0, 15) == 0) ? $urandom_range(1, 20) : 0) : $urandom_range(0, 60);
        sum = 0;
        for (int k = 0; k < cnt; k++) sum += $urandom_range(0, 255);
        in_h[b] = HW'(cnt);
        in_hp[b] = HPW'(sum);
        d = int'(in_ic) - 4 * b;
        if (d < 0) d = -d;
        w = (d < 32) ? wtab[d] : 0;
        de += longint'(w) * cnt;
        nu += longint'(w) * sum;
      end
      if (in_vld) begin
        if (de == 0) zero_den++;
        exp_pix.push_back((de == 0) ? 0 : int'(nu / de));
        exp_tag.push_back(int'(in_tag));
        exp_t.push_back(cyc + LAT);
      end
    end
    @(negedge clk);
    in_vld = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_t.size() != 0 || zero_den == 0) begin
      failures++;
      $display("FAIL: %0d results missing, %0d zero divisors", exp_t.size(), zero_den);
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
