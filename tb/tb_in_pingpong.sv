// tb_in_pingpong: the 2x8-pixel input ping-pong buffer. Tiles of 8 cycles:
// in each tile a mask and an 8-pixel word are loaded into the Update half at
// random cycles while the Give half hands out lanes 0..7 of the previous
// tile's word; a swap at the last cycle exchanges the halves. Every given
// pixel and enable is checked against the word and mask of the tile before.
module tb_in_pingpong;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mask_we = 0, data_we = 0, swap = 0;
  logic [7:0] mask = '0;
  logic [7:0][7:0] data = '0;
  logic [2:0] give_lane = '0;
  logic [7:0] give_pix;
  logic give_en;
  logic [7:0][7:0] prev_data, cur_data;
  logic [7:0] prev_mask, cur_mask;
  int checks = 0, failures = 0;

  in_pingpong #(.LANES(8), .PIX_W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    int tm, td;
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev_mask = '0; prev_data = '0;
    for (int tile = 0; tile < 100; tile++) begin
      tm = $urandom_range(0, 4);
      td = $urandom_range(tm, 7);
      cur_mask = 8'($urandom);
      for (int k = 0; k < 8; k++) cur_data[k] = 8'($urandom);
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        mask_we = (c == tm); mask = (c == tm) ? cur_mask : 8'($urandom);
        data_we = (c == td); data = (c == td) ? cur_data : '0;
        swap = (c == 7);
        give_lane = 3'(c);
        #1;
        if (tile > 0) begin
          checks++;
          if (give_en !== prev_mask[c] || (give_en && give_pix !== prev_data[c])) begin
            failures++;
            if (failures < 10) $display("FAIL: tile %0d lane %0d en=%0d pix=%0d expected en=%0d pix=%0d",
                                        tile, c, give_en, give_pix, prev_mask[c], prev_data[c]);
          end
        end
      end
      prev_mask = cur_mask; prev_data = cur_data;
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
