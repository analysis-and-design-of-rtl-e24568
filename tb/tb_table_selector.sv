// tb_table_selector: for every target intensity 0..255 and a random table,
// each of the 64 bins must receive entry |I_c - 4b| of the table, or 0 when
// that distance is 32 or more.
module tb_table_selector;
  localparam int unsigned NB = 64, TBL_N = 32, G_W = 8;
  logic [7:0] ic;
  logic [TBL_N-1:0][G_W-1:0] table_i;
  logic [NB-1:0][G_W-1:0] g_o;
  int checks = 0, failures = 0;

  table_selector #(.NB(NB), .TBL_N(TBL_N), .G_W(G_W)) dut (.*);

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int d = 0; d < TBL_N; d++) table_i[d] = 8'($urandom_range(1, 255));
      for (int v = 0; v < 256; v++) begin
        ic = 8'(v);
        #1;
        for (int b = 0; b < NB; b++) begin
          int d;
          logic [G_W-1:0] e;
          d = v - 4 * b;
          if (d < 0) d = -d;
          e = (d < 32) ? table_i[d] : '0;
          checks++;
          if (g_o[b] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL: ic=%0d bin %0d got %0d expected %0d", v, b, g_o[b], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
