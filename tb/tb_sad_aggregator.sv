// Testbench for sad_aggregator: random child SAD maps with random centres
// (overlapping, barely overlapping and disjoint) against a model that sums
// the child SADs at absolute vector positions; checks every parent point,
// the availability map, the best vector and cost and the one-cycle latency.
module tb_sad_aggregator;
  import enc_pkg::*;
  localparam int R = 3, D = 7, NP = 49, SADW = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid, best_found;
  mv_t child_center [4]; mv_t parent_center, mvp, best_mv;
  logic [SADW-1:0] child_sad [4][NP];
  logic child_ok [4][NP];
  logic [SADW+1:0] parent_sad [NP];
  logic parent_ok [NP];
  logic [7:0] lambda;
  cost_t best_cost;
  int checks = 0, failures = 0;
  sad_aggregator #(.R(R), .SADW(SADW)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic one(int spread);
    int lox, hix, loy, hiy, cx, cy, bcost; bit bf; mv_t bmv;
    for (int q = 0; q < 4; q++) begin
      child_center[q].x = mvc_t'(20 + int'($urandom % (2*spread+1)) - spread);
      child_center[q].y = mvc_t'(-6 + int'($urandom % (2*spread+1)) - spread);
      for (int n = 0; n < NP; n++) begin
        child_sad[q][n] = SADW'($urandom % 1000);
        child_ok[q][n] = ($urandom % 8) != 0;
      end
    end
    lox = -1000; hix = 1000; loy = -1000; hiy = 1000;
    for (int q = 0; q < 4; q++) begin
      if (child_center[q].x > lox) lox = child_center[q].x;
      if (child_center[q].x < hix) hix = child_center[q].x;
      if (child_center[q].y > loy) loy = child_center[q].y;
      if (child_center[q].y < hiy) hiy = child_center[q].y;
    end
    cx = (lox + hix) >>> 1; cy = (loy + hiy) >>> 1;
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid || parent_center.x != mvc_t'(cx) || parent_center.y != mvc_t'(cy)) begin
      failures++; $display("FAIL centre/valid"); end
    bf = 0; bcost = 0; bmv = '0;
    for (int j = 0; j < D; j++) for (int i = 0; i < D; i++) begin
      int px, py, s; bit ok; mv_t p; int c;
      px = cx + i - R; py = cy + j - R; s = 0; ok = 1;
      for (int q = 0; q < 4; q++) begin
        int ox, oy;
        ox = px - child_center[q].x + R; oy = py - child_center[q].y + R;
        if (ox < 0 || ox >= D || oy < 0 || oy >= D || !child_ok[q][oy*D+ox]) ok = 0;
        else s += child_sad[q][oy*D+ox];
      end
      checks++;
      if (parent_ok[j*D+i] != ok || (ok && int'(parent_sad[j*D+i]) != s)) begin
        failures++; $display("FAIL point %0d,%0d", i, j); end
      p.x = mvc_t'(px); p.y = mvc_t'(py);
      c = s + lambda * mv_bitcost(p, mvp);
      if (ok && (!bf || c < bcost)) begin bf = 1; bcost = c; bmv = p; end
    end
    checks++;
    if (best_found != bf || (bf && (best_mv !== bmv || int'(best_cost) != bcost))) begin
      failures++; $display("FAIL best"); end
  endtask

  initial begin
    in_valid = 0; lambda = 8'd6; mvp.x = 12'sd21; mvp.y = -12'sd5;
    for (int q = 0; q < 4; q++) begin child_center[q] = '0;
      for (int n = 0; n < NP; n++) begin child_sad[q][n] = '0; child_ok[q][n] = 0; end end
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (10) one(0);
    repeat (20) one(2);
    repeat (10) one(4);
    repeat (5) one(8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
