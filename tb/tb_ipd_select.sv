// Testbench for ipd_select: random sparse histograms; checks the summed
// histogram and that the candidates are planar, DC and the three most
// voted directions found by a sort in the testbench.
module tb_ipd_select;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [4:0] hist_in [4][33];
  logic [6:0] hist_out [33];
  logic [5:0] cand [5];
  logic [2:0] cand_num;
  int checks = 0, failures = 0;
  ipd_select dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic one(int density, int nin);
    int s [33]; int order [$]; int n;
    for (int q = 0; q < 4; q++) for (int b = 0; b < 33; b++)
      hist_in[q][b] = (q < nin && ($urandom % 100) < density) ? 5'($urandom % 17) : 5'd0;
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    for (int b = 0; b < 33; b++) begin
      s[b] = hist_in[0][b] + hist_in[1][b] + hist_in[2][b] + hist_in[3][b];
      checks++;
      if (int'(hist_out[b]) != s[b]) begin failures++; $display("FAIL sum %0d", b); end
    end
    // selection by repeated stable maximum
    for (int p = 0; p < 3; p++) begin
      int bi, bv; bi = -1; bv = 0;
      for (int b = 0; b < 33; b++) begin
        bit used; used = 0;
        foreach (order[i]) if (order[i] == b) used = 1;
        if (!used && s[b] > bv) begin bv = s[b]; bi = b; end
      end
      if (bi >= 0) order.push_back(bi);
    end
    n = 2 + order.size();
    checks++;
    if (int'(cand_num) != n || cand[0] != 0 || cand[1] != 1) begin failures++; $display("FAIL num %0d exp %0d", cand_num, n); end
    foreach (order[i]) begin
      checks++;
      if (int'(cand[2+i]) != order[i] + 2) begin failures++; $display("FAIL cand %0d = %0d exp %0d", i, cand[2+i], order[i]+2); end
    end
  endtask
  initial begin
    in_valid = 0;
    for (int q = 0; q < 4; q++) for (int b = 0; b < 33; b++) hist_in[q][b] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (40) one(30, 4);
    repeat (20) one(5, 1);
    repeat (5) one(0, 4);
    repeat (20) one(100, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
