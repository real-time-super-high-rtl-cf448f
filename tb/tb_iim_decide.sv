// Testbench for iim_decide on a 2x2-CTU picture: random quad-tree
// partitions walked in z order with random tentative costs; a picture-wide
// model of the final modes gives the expected predictor, recomputed costs,
// scale/offset transform and decision of every block.
module tb_iim_decide;
  import enc_pkg::*;
  localparam int PW8 = 16;
  logic clk = 0, rst_n = 0;
  logic reg_we; logic [1:0] reg_sel; logic [15:0] reg_data; logic [7:0] lambda;
  logic [0:0] ctu_col; logic first_col, first_row, ctu_end;
  logic blk_valid; logic [2:0] blk_x, blk_y, blk_log2;
  cost_t intra_cost, inter_sad; mv_t blk_mv;
  logic dec_valid, dec_inter; mv_t dec_mvp; cost_t dec_intra, dec_inter_cost;
  int checks = 0, failures = 0, n_inter = 0, n_intra = 0, n_pred = 0;
  mv_t pm [16][16]; bit pi [16][16];
  int si = 64, oi = 0, sp = 64, op = 0;
  iim_decide #(.PIC_W8(PW8)) dut (.*);
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int lin(int c, int s, int o);
    longint v; v = (longint'(c) * s) >>> 6; v += o; if (v < 0) v = 0; return int'(v);
  endfunction

  task automatic blk(int gx, int gy, int lg);
    int span, cx, cy, ci, cp, fi, fp; mv_t mvp, mv; bit inter;
    span = 1 << (lg - 3);
    mv.x = mvc_t'(int'($urandom % 9) - 4); mv.y = mvc_t'(int'($urandom % 9) - 4);
    mvp = '0;
    if (gx > 0 && pi[gy][gx-1]) mvp = pm[gy][gx-1];
    else if (gy > 0 && pi[gy-1][gx]) mvp = pm[gy-1][gx];
    ci = $urandom % 3000; cp = $urandom % 3000;
    cp += lambda * mv_bitcost(mv, mvp);
    fi = lin(ci, si, oi); fp = lin(cp - lambda * mv_bitcost(mv, mvp) + lambda * mv_bitcost(mv, mvp), sp, op);
    inter = fp < fi;
    @(negedge clk);
    blk_valid = 1; blk_x = 3'(gx % 8); blk_y = 3'(gy % 8); blk_log2 = 3'(lg);
    intra_cost = cost_t'(ci); inter_sad = cost_t'(cp - lambda * mv_bitcost(mv, mvp)); blk_mv = mv;
    @(negedge clk); blk_valid = 0;
    checks++;
    if (!dec_valid || dec_inter != inter || dec_mvp !== mvp || int'(dec_intra) != fi || int'(dec_inter_cost) != fp) begin
      failures++; $display("FAIL blk (%0d,%0d) lg %0d inter %0d exp %0d mvp (%0d,%0d) exp (%0d,%0d)", gx, gy, lg,
        dec_inter, inter, dec_mvp.x, dec_mvp.y, mvp.x, mvp.y);
    end
    if (mvp != '0) n_pred++;
    if (inter) n_inter++; else n_intra++;
    for (int y = gy; y < gy + span; y++) for (int x = gx; x < gx + span; x++) begin
      pi[y][x] = inter; pm[y][x] = inter ? mv : '0;
    end
  endtask

  task automatic quad(int gx, int gy, int lg);
    if (lg > 3 && ($urandom % 3) != 0) begin
      int h; h = 1 << (lg - 4);
      quad(gx, gy, lg - 1); quad(gx + h, gy, lg - 1);
      quad(gx, gy + h, lg - 1); quad(gx + h, gy + h, lg - 1);
    end else blk(gx, gy, lg);
  endtask

  initial begin
    reg_we = 0; reg_sel = 0; reg_data = 0; lambda = 8'd20; ctu_col = 0; first_col = 1; first_row = 1;
    ctu_end = 0; blk_valid = 0; blk_x = 0; blk_y = 0; blk_log2 = 3; intra_cost = 0; inter_sad = 0; blk_mv = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int pic = 0; pic < 3; pic++) begin
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin pi[y][x] = 0; pm[y][x] = '0; end
      for (int cr = 0; cr < 2; cr++) for (int cc = 0; cc < 2; cc++) begin
        // new scale/offset registers per CTU
        si = 48 + $urandom % 40; oi = int'($urandom % 200) - 100;
        sp = 48 + $urandom % 40; op = int'($urandom % 200) - 100;
        @(negedge clk); reg_we = 1; reg_sel = 0; reg_data = 16'(si);
        @(negedge clk); reg_sel = 1; reg_data = 16'(oi);
        @(negedge clk); reg_sel = 2; reg_data = 16'(sp);
        @(negedge clk); reg_sel = 3; reg_data = 16'(op);
        @(negedge clk); reg_we = 0;
        ctu_col = 1'(cc); first_col = (cc == 0); first_row = (cr == 0);
        quad(cc * 8, cr * 8, 6);
        @(negedge clk); ctu_end = 1;
        @(negedge clk); ctu_end = 0;
      end
    end
    checks++;
    if (n_inter == 0 || n_intra == 0 || n_pred == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
