// tb_ih_bank: the integral-histogram memory bank. Random reads and writes
// against a shadow array; checks one-cycle read latency, read-enable hold,
// and that a read of the address being written returns the old word.
module tb_ih_bank;
  localparam int unsigned DEPTH = 45, WIDTH = 768, AW = 6;
  logic clk = 1'b0;
  logic re, we;
  logic [AW-1:0] raddr, waddr;
  logic [WIDTH-1:0] rdata, wdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  logic [WIDTH-1:0] expect_q;
  logic expect_v;
  int checks = 0, failures = 0;

  ih_bank #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int k = 0; k < WIDTH / 32; k++) v[32*k +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = '0; expect_v = 0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = rnd(); shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures < 10) $display("FAIL: read mismatch at step %0d", n);
        end
      end
      re = 1'($urandom); we = 1'($urandom);
      raddr = AW'($urandom_range(0, DEPTH - 1));
      waddr = ($urandom_range(0, 3) == 0) ? raddr : AW'($urandom_range(0, DEPTH - 1));
      wdata = rnd();
      if (re) begin expect_q = shadow[raddr]; expect_v = 1; end
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
