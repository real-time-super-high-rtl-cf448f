// Testbench for bit_reduce: every 8-bit sample, both region kinds and every
// k in 0..4 against the extraction rule written out bit by bit.
module tb_bit_reduce;
  logic [7:0] pix;
  logic flat;
  logic [2:0] k;
  logic [3:0] red;
  int checks = 0, failures = 0;
  bit_reduce #(.M(8), .RED(4)) dut (.*);
  initial begin
    for (int kk = 0; kk <= 4; kk++)
      for (int f = 0; f < 2; f++)
        for (int p = 0; p < 256; p++) begin
          logic [3:0] e;
          pix = 8'(p); flat = f[0]; k = 3'(kk);
          #1;
          // flat: bits [7-k : 4-k]; non-flat: bits [7:4]
          for (int b = 0; b < 4; b++)
            e[b] = f ? pix[b + 4 - kk] : pix[b + 4];
          checks++;
          if (red !== e) begin
            failures++;
            if (failures < 10) $display("FAIL p=%0d flat=%0d k=%0d got %0h exp %0h", p, f, kk, red, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
