// Testbench for wme_center: feeds pictures of motion vectors with a known
// dominant motion and spread, and checks the stretched centre, the choice
// between 1/4 and 1/8 downscaling and the scan latency against a model.
module tb_wme_center;
  import enc_pkg::*;
  localparam int NBX = 2*384/4 + 1;
  logic clk = 0, rst_n = 0;
  logic mv_valid, pic_end, busy, res_valid, quarter;
  mv_t mv, center;
  logic [4:0] dcur, dprev;
  logic [15:0] min_count;
  int checks = 0, failures = 0;
  wme_center dut (.*);
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int rnd(int v, int dc, int dp);
    int n; n = v * dc;
    return n >= 0 ? (n + dp/2) / dp : -((-n + dp/2) / dp);
  endfunction

  // mode (mx,my), n_major vectors there, plus spread vectors at +-sx,+-sy
  task automatic pic(int mx, int my, int sx, int sy, int dc, int dp);
    int ex, ey, lo, hi, loy, hiy; bit eq; int cyc;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); mv_valid = 1; mv.x = mvc_t'(mx); mv.y = mvc_t'(my);
    end
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); mv_valid = 1; mv.x = mvc_t'(mx - sx); mv.y = mvc_t'(my - sy);
      @(negedge clk); mv_valid = 1; mv.x = mvc_t'(mx + sx); mv.y = mvc_t'(my + sy);
    end
    @(negedge clk); mv_valid = 0; dcur = 5'(dc); dprev = 5'(dp); pic_end = 1;
    @(negedge clk); pic_end = 0; cyc = 1;
    while (!res_valid) begin @(negedge clk); cyc++; end
    ex = rnd(mx, dc, dp); ey = rnd(my, dc, dp);
    if (ex > 384) ex = 384; if (ex < -384) ex = -384;
    if (ey > 192) ey = 192; if (ey < -192) ey = -192;
    lo = rnd(mx - sx, dc, dp); hi = rnd(mx + sx, dc, dp);
    loy = rnd(my - sy, dc, dp); hiy = rnd(my + sy, dc, dp);
    eq = (lo >= ex - 192) && (hi <= ex + 192) && (loy >= ey - 96) && (hiy <= ey + 96);
    checks += 3;
    if (center.x != mvc_t'(ex) || center.y != mvc_t'(ey)) begin
      failures++; $display("FAIL centre (%0d,%0d) exp (%0d,%0d)", center.x, center.y, ex, ey); end
    if (quarter != eq) begin failures++; $display("FAIL quarter %0d exp %0d", quarter, eq); end
    if (cyc != NBX + 2) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    mv_valid = 0; pic_end = 0; mv = '0; dcur = 1; dprev = 1; min_count = 16'd1;
    repeat (3) @(negedge clk); rst_n = 1;
    pic(40, -8, 20, 8, 2, 1);       // small spread: 1/4
    pic(-100, 16, 120, 40, 2, 1);   // wide spread stretched: 1/8
    pic(200, 100, 4, 4, 4, 1);      // centre clipped
    pic(-60, -20, 60, 12, 1, 3);    // shrink
    pic(8, 0, 100, 80, 3, 2);       // vertical spread too wide: 1/8
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
