// Testbench for fme_combo_select: streams random CTU cost sets (64 8x8,
// 16 16x16, 4 32x32, one 64x64 cost) and checks both sums and the choice.
module tb_fme_combo_select;
  import enc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cost_valid, ctu_end, sel_valid, sel_large;
  logic [1:0] size; cost_t cost;
  logic [31:0] sum_small, sum_large;
  int checks = 0, failures = 0, nlarge = 0;
  fme_combo_select dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    cost_valid = 0; ctu_end = 0; size = 0; cost = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      longint s[4]; longint es, el;
      int n [4] = '{64, 16, 4, 1};
      s = '{0, 0, 0, 0};
      for (int z = 0; z < 4; z++)
        for (int i = 0; i < n[z]; i++) begin
          @(negedge clk); cost_valid = 1; size = 2'(z);
          cost = cost_t'($urandom % (z == 3 ? 60000 : 1500));
          s[z] += cost;
          if ($urandom % 3 == 0) begin @(negedge clk); cost_valid = 0; end
        end
      @(negedge clk); cost_valid = 0; ctu_end = 1;
      @(negedge clk); ctu_end = 0;
      es = s[0] + s[1] + s[2]; el = s[1] + s[2] + s[3];
      checks++;
      if (!sel_valid || sum_small != 32'(es) || sum_large != 32'(el) || sel_large != (el < es)) begin
        failures++; $display("FAIL ctu %0d", t); end
      if (sel_large) nlarge++;
    end
    checks++;
    if (nlarge == 0 || nlarge == 30) begin failures++; $display("FAIL only one choice seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
