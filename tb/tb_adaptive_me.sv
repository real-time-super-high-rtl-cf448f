// Testbench for adaptive_me at a reduced search area (+-3 x +-2): loads a
// template and window, runs non-flat and flat searches (the flat one with
// window regions of another A and non-flat regions that must be skipped),
// and checks every streamed SAD, skip flag, the best vector and cost, and
// that a search takes (2RX+1)(2RY+1)+1 cycles.
module tb_adaptive_me;
  import enc_pkg::*;
  localparam int M = 8, RED = 4, B = 4, RX = 3, RY = 2;
  localparam int WW = 2*RX+4, WH = 2*RY+4;
  logic clk = 0, rst_n = 0;
  logic pu_flat; logic [RED-1:0] pu_a; logic [2:0] k; logic [7:0] lambda;
  mv_t center, mvp;
  logic tmpl_we; logic [3:0] tmpl_idx; logic [M-1:0] tmpl_pix;
  logic ref_we; logic [$clog2(WW)-1:0] ref_wx; logic [$clog2(WH)-1:0] ref_wy;
  logic [M-1:0] ref_pix; logic ref_flat; logic [RED-1:0] ref_a;
  logic start, busy, pt_valid, pt_skip, done, best_found;
  logic signed [7:0] pt_dx, pt_dy;
  logic [M+3:0] pt_sad, best_sad;
  mv_t best_mv; cost_t best_cost;
  int checks = 0, failures = 0;

  adaptive_me #(.M(M), .RED(RED), .RX(RX), .RY(RY)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [M-1:0] t [16];
  logic [M-1:0] w [WH][WW];
  logic wf [WH][WW];
  logic [RED-1:0] wa [WH][WW];
  int exp_sad [2*RY+1][2*RX+1];
  bit exp_skip [2*RY+1][2*RX+1];

  function automatic int red(logic [M-1:0] p, bit flat, int kk);
    return flat ? ((p >> (RED-kk)) & 15) : (p >> RED);
  endfunction

  task automatic run(bit flat, int kk, logic [RED-1:0] a);
    int bc, bs; mv_t bmv; bit found; int cyc; int npts;
    pu_flat = flat; k = 3'(kk); pu_a = a;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); tmpl_we = 1; tmpl_idx = 4'(i); tmpl_pix = t[i];
    end
    @(negedge clk); tmpl_we = 0;
    for (int y = 0; y < WH; y++) for (int x = 0; x < WW; x++) begin
      @(negedge clk); ref_we = 1; ref_wx = 4'(x); ref_wy = 3'(y);
      ref_pix = w[y][x]; ref_flat = wf[y][x]; ref_a = wa[y][x];
    end
    @(negedge clk); ref_we = 0;
    // model
    found = 0; bc = 0; bs = 0; bmv = center;
    for (int dy = 0; dy <= 2*RY; dy++) for (int dx = 0; dx <= 2*RX; dx++) begin
      int s; bit sk; mv_t mv; int c;
      s = 0; sk = 0;
      for (int r = 0; r < 4; r++) for (int cc = 0; cc < 4; cc++) begin
        int a1, a2;
        a1 = red(t[4*r+cc], flat, kk); a2 = red(w[dy+r][dx+cc], flat, kk);
        s += (a1 > a2) ? a1 - a2 : a2 - a1;
        if (flat) begin
          logic [RED-1:0] msk;
          msk = RED'((1 << kk) - 1);
          if (!wf[dy+r][dx+cc] || ((wa[dy+r][dx+cc] & msk) != (a & msk))) sk = 1;
        end
      end
      s = flat ? s << (RED-kk) : s << RED;
      exp_sad[dy][dx] = s; exp_skip[dy][dx] = sk;
      mv.x = center.x + mvc_t'(dx - RX); mv.y = center.y + mvc_t'(dy - RY);
      c = s + int'(lambda) * int'(mv_bitcost(mv, mvp));
      if (!sk && (!found || c < bc)) begin found = 1; bc = c; bs = s; bmv = mv; end
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1; npts = 0;
    while (!done) begin
      if (pt_valid) begin
        int ix, iy;
        ix = int'(pt_dx) + RX; iy = int'(pt_dy) + RY;
        checks++; npts++;
        if (pt_skip !== exp_skip[iy][ix] || (!exp_skip[iy][ix] && int'(pt_sad) != exp_sad[iy][ix])) begin
          failures++;
          $display("FAIL point (%0d,%0d) sad %0d skip %0d exp %0d %0d", pt_dx, pt_dy, pt_sad, pt_skip,
                   exp_sad[iy][ix], exp_skip[iy][ix]);
        end
      end
      @(negedge clk); cyc++;
    end
    checks += 3;
    if (npts != (2*RX+1)*(2*RY+1) - 1 + 0 && npts != (2*RX+1)*(2*RY+1)) begin failures++; $display("FAIL npts %0d", npts); end
    if (cyc != (2*RX+1)*(2*RY+1) + 1) begin failures++; $display("FAIL cycles %0d", cyc); end
    if (best_found !== found || (found && (best_mv !== bmv || int'(best_cost) != bc || int'(best_sad) != bs))) begin
      failures++;
      $display("FAIL best found=%0d mv=(%0d,%0d) cost=%0d exp %0d (%0d,%0d) %0d", best_found,
               best_mv.x, best_mv.y, best_cost, found, bmv.x, bmv.y, bc);
    end
  endtask

  initial begin
    tmpl_we = 0; ref_we = 0; start = 0; lambda = 8'd4; pu_flat = 0; pu_a = 0; k = 2;
    tmpl_idx = 0; tmpl_pix = 0; ref_wx = 0; ref_wy = 0; ref_pix = 0; ref_flat = 0; ref_a = 0;
    center.x = 12'sd10; center.y = -12'sd4; mvp.x = 12'sd9; mvp.y = -12'sd3;
    repeat (3) @(negedge clk); rst_n = 1;
    // non-flat: random picture with the template copied from offset (+1,-1)
    for (int y = 0; y < WH; y++) for (int x = 0; x < WW; x++) begin
      w[y][x] = 8'($urandom); wf[y][x] = 0; wa[y][x] = 0;
    end
    for (int i = 0; i < 16; i++) t[i] = w[RY-1 + i/4][RX+1 + i%4];
    run(0, 2, 0);
    checks++;
    if (best_mv.x != 12'sd11 || best_mv.y != -12'sd5) begin failures++; $display("FAIL match not found"); end
    // flat with k=2, A=2: gentle ramp in 0x80..0xBF, left part non-flat, a
    // stripe with another A
    for (int y = 0; y < WH; y++) for (int x = 0; x < WW; x++) begin
      w[y][x] = 8'(8'h80 + ((x * 5 + y * 3 + $urandom % 3) & 8'h3F));
      wf[y][x] = (x >= 2); wa[y][x] = (y == WH-1) ? 4'd3 : 4'd2;
    end
    for (int i = 0; i < 16; i++) t[i] = 8'(8'h80 + ((($urandom % 40) + i) & 8'h3F));
    run(1, 2, 4'd2);
    // flat with k=4 (x = 0), every point skipped because A differs
    for (int y = 0; y < WH; y++) for (int x = 0; x < WW; x++) begin
      wf[y][x] = 1; wa[y][x] = 4'd5;
    end
    run(1, 4, 4'd6);
    checks++;
    if (best_found) begin failures++; $display("FAIL found a point although all are skipped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
