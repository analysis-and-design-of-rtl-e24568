// tb_weight_table: reset clears every entry; writes land in the addressed
// entry only and are visible the next cycle; all entries read in parallel.
module tb_weight_table;
  localparam int unsigned TBL_N = 32, G_W = 8;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [4:0] waddr = '0;
  logic [G_W-1:0] wdata = '0;
  logic [TBL_N-1:0][G_W-1:0] table_o;
  logic [G_W-1:0] shadow [TBL_N];
  int checks = 0, failures = 0;

  weight_table #(.TBL_N(TBL_N), .G_W(G_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic compare();
    for (int d = 0; d < TBL_N; d++) begin
      checks++;
      if (table_o[d] !== shadow[d]) begin
        failures++;
        if (failures < 10) $display("FAIL: entry %0d = %0d, expected %0d", d, table_o[d], shadow[d]);
      end
    end
  endtask

  initial begin
    for (int d = 0; d < TBL_N; d++) shadow[d] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    compare();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 5'($urandom); wdata = 8'($urandom);
      @(negedge clk);
      if (we) shadow[waddr] = wdata;
      we = 1'b0;
      compare();
    end
    rst_n = 1'b0;
    #1;
    for (int d = 0; d < TBL_N; d++) shadow[d] = '0;
    compare();
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
