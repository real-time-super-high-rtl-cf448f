// Testbench for flat_detect: streams two small pictures (with regions cut by
// the picture edge) in which some regions are built flat, and compares every
// region verdict and shared value with a model computed from the picture.
module tb_flat_detect;
  localparam int W = 20, H = 10, N = 8, M = 8, KMAX = 4;
  localparam int RXN = (W+N-1)/N, RYN = (H+N-1)/N;
  logic clk = 0, rst_n = 0;
  logic [2:0] k;
  logic pix_valid, sof;
  logic [M-1:0] pix;
  logic reg_valid, reg_flat;
  logic [$clog2(RXN)-1:0] reg_x;
  logic [$clog2(RYN)-1:0] reg_y;
  logic [KMAX-1:0] reg_a;
  int checks = 0, failures = 0, seen = 0;
  logic [M-1:0] img [H][W];
  logic exp_flat [RYN][RXN];
  logic [KMAX-1:0] exp_a [RYN][RXN];

  flat_detect #(.M(M), .N(N), .KMAX(KMAX), .PIC_W(W), .PIC_H(H)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && reg_valid) begin
    checks++; seen++;
    if (reg_flat !== exp_flat[reg_y][reg_x] ||
        (exp_flat[reg_y][reg_x] && reg_a !== exp_a[reg_y][reg_x])) begin
      failures++;
      $display("FAIL region (%0d,%0d) flat=%0d a=%0d exp %0d %0d", reg_x, reg_y,
               reg_flat, reg_a, exp_flat[reg_y][reg_x], exp_a[reg_y][reg_x]);
    end
  end

  task automatic run_pic(int kk, int seed);
    void'($urandom(seed));
    for (int ry = 0; ry < RYN; ry++)
      for (int rx = 0; rx < RXN; rx++) begin
        logic [M-1:0] base;
        bit make_flat;
        base = M'($urandom);
        make_flat = ($urandom % 2) == 0;
        for (int y = ry*N; y < ry*N+N && y < H; y++)
          for (int x = rx*N; x < rx*N+N && x < W; x++) begin
            logic [M-1:0] lo;
            lo = M'($urandom) & M'((1 << (M-kk)) - 1);
            img[y][x] = make_flat ? ((base & ~M'((1 << (M-kk)) - 1)) | lo) : M'($urandom);
          end
      end
    for (int ry = 0; ry < RYN; ry++)
      for (int rx = 0; rx < RXN; rx++) begin
        logic [KMAX-1:0] a0;
        bit f;
        a0 = KMAX'(img[ry*N][rx*N] >> (M-kk));
        f = 1;
        for (int y = ry*N; y < ry*N+N && y < H; y++)
          for (int x = rx*N; x < rx*N+N && x < W; x++)
            if (KMAX'(img[y][x] >> (M-kk)) != a0) f = 0;
        exp_flat[ry][rx] = f;
        exp_a[ry][rx] = a0;
      end
    k = 3'(kk);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if ($urandom % 4 == 0) begin
          @(negedge clk); pix_valid = 0; sof = 0;
        end
        @(negedge clk);
        pix_valid = 1; sof = (x == 0 && y == 0); pix = img[y][x];
      end
    @(negedge clk); pix_valid = 0; sof = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    pix_valid = 0; sof = 0; pix = '0; k = 2;
    repeat (3) @(negedge clk); rst_n = 1;
    run_pic(2, 11);
    run_pic(4, 23);
    run_pic(1, 5);
    checks++;
    if (seen != 3*RXN*RYN) begin failures++; $display("FAIL region count %0d", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
