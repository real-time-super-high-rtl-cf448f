// Testbench for med_edge: random and synthetic-edge patches; the expected
// mode of every sample is derived with real-number slopes and a nearest-angle
// search over the HEVC angle table, and the histogram is recounted.
module tb_med_edge;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [7:0] patch [8][8];
  logic [4:0] hist [33];
  logic [5:0] mode [16];
  logic [15:0] has_edge;
  int checks = 0, failures = 0;
  int seen_v = 0, seen_h = 0;
  med_edge dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int exp_mode(int gx, int gy);
    int ang [9] = '{0, 2, 5, 9, 13, 17, 21, 26, 32};
    real s, bd; int bi, ax, ay; bit rising;
    ax = gx < 0 ? -gx : gx; ay = gy < 0 ? -gy : gy;
    rising = (gx > 0 && gy > 0) || (gx < 0 && gy < 0);
    s = (ax >= ay) ? 32.0 * ay / ax : 32.0 * ax / ay;
    bd = 1e9; bi = 0;
    for (int i = 0; i < 9; i++)
      if ((s - ang[i] < 0 ? ang[i] - s : s - ang[i]) < bd - 1e-9) begin
        bd = (s - ang[i] < 0 ? ang[i] - s : s - ang[i]); bi = i; end
    if (ax >= ay) return rising ? 26 + bi : 26 - bi;
    return rising ? 10 - bi : 10 + bi;
  endfunction

  task automatic one(int kind);
    int eh [33];
    real th;
    th = ($urandom % 360) * 3.14159265 / 180.0;
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
      if (kind == 0) patch[y][x] = 8'($urandom);
      else if (kind == 1) patch[y][x] = 8'(128 + $rtoi(40.0 * ($cos(th) * (x - 3.5) + $sin(th) * (y - 3.5))));
      else patch[y][x] = 8'(100 + $urandom % 6);
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    for (int b = 0; b < 33; b++) eh[b] = 0;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
      int y, x, gx, gy, m; bit e;
      y = r + 2; x = c + 2;
      gx = -patch[y][x-2] - 2*patch[y][x-1] + 2*patch[y][x+1] + patch[y][x+2];
      gy = -patch[y-2][x] - 2*patch[y-1][x] + 2*patch[y+1][x] + patch[y+2][x];
      e = ((gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy)) >= 16;
      m = e ? exp_mode(gx, gy) : 0;
      if (e) eh[m-2]++;
      if (m == 26) seen_v++;
      if (m == 10) seen_h++;
      checks++;
      if (has_edge[4*r+c] != e || int'(mode[4*r+c]) != m) begin
        failures++; $display("FAIL sample %0d,%0d gx=%0d gy=%0d mode %0d exp %0d", r, c, gx, gy, mode[4*r+c], m); end
    end
    for (int b = 0; b < 33; b++) begin
      checks++;
      if (int'(hist[b]) != eh[b]) begin failures++; $display("FAIL bin %0d", b); end
    end
  endtask

  initial begin
    in_valid = 0;
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) patch[y][x] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (100) one(1);
    repeat (30) one(0);
    repeat (10) one(2);
    checks++;
    if (seen_v == 0 || seen_h == 0) begin failures++; $display("FAIL no pure vertical/horizontal"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
