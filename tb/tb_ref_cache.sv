// Testbench for ref_cache at its full size: writes random 32x16 regions at
// 8-aligned x and arbitrary y (overlapping each other), reads random regions
// back in one cycle each and compares every sample with a sample map kept in
// the testbench; also checks that rows one band (TILE_ROWS*16 rows) apart
// share storage, i.e. that the cache slides down the picture.
module tb_ref_cache;
  localparam int TILES_X = 120, TR = 10240 / 120;
  logic clk = 0, rst_n = 0;
  logic rd_en, rd_valid, wr_en;
  logic [9:0] rd_x8, wr_x8;
  logic [12:0] rd_y, wr_y;
  logic [9:0] rd_data [16][32];
  logic [9:0] wr_data [16][32];
  int checks = 0, failures = 0;
  int map [int];
  ref_cache dut (.*);
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int key(int x, int y); return y * 4096 + x; endfunction

  task automatic wr(int x8, int y);
    @(negedge clk); wr_en = 1; wr_x8 = 10'(x8); wr_y = 13'(y);
    for (int j = 0; j < 16; j++) for (int i = 0; i < 32; i++) begin
      wr_data[j][i] = 10'($urandom);
      map[key(x8*8 + i, (y + j) % (TR*16))] = wr_data[j][i];
    end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd(int x8, int y);
    @(negedge clk); rd_en = 1; rd_x8 = 10'(x8); rd_y = 13'(y);
    @(negedge clk); rd_en = 0;
    checks++;
    if (!rd_valid) begin failures++; $display("FAIL no rd_valid"); end
    for (int j = 0; j < 16; j++) for (int i = 0; i < 32; i++) begin
      int kk; kk = key(x8*8 + i, (y + j) % (TR*16));
      if (map.exists(kk)) begin
        checks++;
        if (int'(rd_data[j][i]) != map[kk]) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) got %0d exp %0d", x8*8+i, y+j, rd_data[j][i], map[kk]);
        end
      end
    end
  endtask

  initial begin
    rd_en = 0; wr_en = 0; rd_x8 = 0; rd_y = 0; wr_x8 = 0; wr_y = 0;
    for (int j = 0; j < 16; j++) for (int i = 0; i < 32; i++) wr_data[j][i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // fill a 128 x 64 area with aligned tiles, then overwrite with odd offsets
    for (int ty = 0; ty < 4; ty++) for (int tx = 0; tx < 4; tx++) wr(tx * 4, ty * 16);
    for (int n = 0; n < 20; n++) wr($urandom % 13, $urandom % 49);
    for (int n = 0; n < 40; n++) rd($urandom % 13, $urandom % 49);
    // far right of a 4K line
    wr(116, 100); rd(116, 100); rd(114, 96);
    // band wrap: rows TR*16 further down reuse the same words
    wr(8, 5);
    wr(8, 5 + TR*16);
    rd(8, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
