// Testbench for mbus_qos_arbiter: random requests, classes and buffer
// levels; a model picks the expected winner by effective priority and
// round-robin order, and the test counts grants won through a boost.
module tb_mbus_qos_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt, boosted;
  logic [1:0] prio [N]; logic [7:0] level [N], lo_th [N], hi_th [N];
  int checks = 0, failures = 0, rr = 0, nboost = 0;
  mbus_qos_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    req = 0;
    for (int i = 0; i < N; i++) begin prio[i] = 0; level[i] = 0; lo_th[i] = 0; hi_th[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      int best, w; logic [N-1:0] eg;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        req[i] = $urandom % 3 != 0; prio[i] = 2'(i == 0 ? 3 : $urandom % 3);
        level[i] = 8'($urandom); lo_th[i] = 8'd10; hi_th[i] = 8'd245;
      end
      #1;
      best = -1; w = 0;
      for (int n = 0; n < N; n++) begin
        int c, p; bit b;
        c = (rr + n) % N;
        b = req[c] && (level[c] <= 10 || level[c] >= 245);
        p = b ? 4 : prio[c];
        if (req[c] && p > best) begin best = p; w = c; end
      end
      eg = 0; if (best >= 0) eg[w] = 1;
      checks++;
      if (gnt != eg) begin failures++; if (failures < 10) $display("FAIL cyc %0d gnt %b exp %b", cyc, gnt, eg); end
      if (best == 4 && prio[w] != 3) nboost++;
      @(posedge clk);
      if (req != 0) rr = (w + 1) % N;
    end
    checks++;
    if (nboost == 0) begin failures++; $display("FAIL no boost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
