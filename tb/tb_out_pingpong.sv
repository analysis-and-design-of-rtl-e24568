// tb_out_pingpong: the 2x8-pixel output ping-pong buffer. A continuous
// stream of results, lanes 0..7 per packet with random enables, random
// pixels and a per-packet address, is fed in; the writer acknowledges the
// pending packet at a fixed cycle of every 8 (like the bus slot). Each
// written packet must carry the pixels, byte enables and address of the
// packet just closed; packets with no enabled lane must not be offered.
module tb_out_pingpong;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_vld = 0, in_en = 0, ack;
  logic [2:0] in_lane = '0;
  logic [31:0] in_addr = '0;
  logic [7:0] in_pix = '0;
  logic give_pending;
  logic [31:0] give_addr;
  logic [7:0][7:0] give_data;
  logic [7:0] give_be;
  int checks = 0, failures = 0, n_empty = 0, n_written = 0;
  logic [7:0][7:0] q_data [$];
  logic [7:0] q_be [$];
  logic [31:0] q_addr [$];
  int cyc = 0;

  out_pingpong #(.LANES(8), .PIX_W(8), .ADDR_W(32)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign ack = give_pending && (cyc % 8 == 5);

  always @(negedge clk) if (ack) begin
    checks++;
    n_written++;
    if (q_be.size() == 0) begin
      failures++;
      $display("FAIL: write with nothing expected");
    end else begin
      logic ok;
      ok = give_be == q_be[0] && give_addr == q_addr[0];
      for (int k = 0; k < 8; k++) if (q_be[0][k] && give_data[k] != q_data[0][k]) ok = 0;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL: packet be=%b addr=%0h expected be=%b addr=%0h", give_be, give_addr, q_be[0], q_addr[0]);
      end
      void'(q_be.pop_front()); void'(q_data.pop_front()); void'(q_addr.pop_front());
    end
  end

  initial begin
    logic [7:0][7:0] d;
    logic [7:0] be;
    logic [31:0] a;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 120; p++) begin
      a = $urandom;
      be = ($urandom_range(0, 5) == 0) ? 8'h00 : 8'($urandom);
      for (int k = 0; k < 8; k++) d[k] = 8'($urandom);
      for (int k = 0; k < 8; k++) begin
        @(negedge clk);
        in_vld = 1; in_lane = 3'(k); in_en = be[k]; in_pix = d[k]; in_addr = a;
      end
      if (be != 0) begin
        q_data.push_back(d); q_be.push_back(be); q_addr.push_back(a);
      end else n_empty++;
    end
    @(negedge clk);
    in_vld = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (q_be.size() != 0 || n_empty == 0) begin
      failures++;
      $display("FAIL: %0d packets not written", q_be.size());
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
