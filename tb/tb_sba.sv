// tb_sba: random test of the selected-bin adder. Each vector picks a random
// histogram, bin, value, enable and add/subtract and checks every output
// bin against a software model (only the selected bin changes, modulo 2^HW).
module tb_sba;
  localparam int unsigned NB = 64, HW = 12, VAL_W = 8;
  logic [NB-1:0][HW-1:0] hist_i, hist_o;
  logic en, sub;
  logic [5:0] bin;
  logic [VAL_W-1:0] val;
  int checks = 0, failures = 0;

  sba #(.NB(NB), .HW(HW), .VAL_W(VAL_W)) dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int b = 0; b < NB; b++) hist_i[b] = HW'($urandom);
      en  = ($urandom_range(0, 3) != 0);
      sub = 1'($urandom);
      bin = 6'($urandom);
      val = VAL_W'($urandom);
      #1;
      for (int b = 0; b < NB; b++) begin
        logic [HW-1:0] exp_v;
        exp_v = hist_i[b];
        if (en && b == int'(bin)) exp_v = sub ? exp_v - HW'(val) : exp_v + HW'(val);
        checks++;
        if (hist_o[b] !== exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL: bin %0d got %0d expected %0d", b, hist_o[b], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
