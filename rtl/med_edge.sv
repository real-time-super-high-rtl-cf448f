// med_edge: multi-block-size edge detector (MED) front end.
//
// For each sample of a 4x4 block a five-tap differential filter
// (-1 -2 0 +2 +1) gives the horizontal and vertical gradients gx, gy; the
// block comes with a two-sample border, i.e. as an 8x8 patch.  A sample whose
// gradient magnitude |gx|+|gy| reaches EDGE_TH votes for the HEVC angular
// intra mode parallel to its edge:
//  * |gx| >= |gy| (edge closer to vertical): modes 18..34 around 26,
//    |gx| <  |gy| (edge closer to horizontal): modes 2..18 around 10;
//  * the slope 32*minor/major is rounded to the nearest HEVC angle
//    {0,2,5,9,13,17,21,26,32} by comparing 64*minor with the mid-points
//    {2,7,14,22,30,38,47,58} times major (no divider);
//  * an edge rising to the right ('/' : gx and gy of equal sign) takes
//    26+i resp. 10-i, the other sign 26-i resp. 10+i.
// The votes form the block's 33-bin histogram (bin = mode-2), which larger
// blocks reuse by summation (ipd_select).  One block per cycle, result
// registered one cycle after in_valid.  The filter taps, the threshold and
// the angle mapping are this design's choice: the document names a five-tap
// differential filter and a per-pixel edge direction without giving them.
module med_edge #(
  parameter int unsigned EDGE_TH = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [7:0]     patch [8][8],     // [row][col], block at rows/cols 2..5
  output logic           out_valid,
  output logic [4:0]     hist [33],
  output logic [5:0]     mode [16],        // per sample, 0 = no edge
  output logic [15:0]    has_edge
);
  localparam int TH [8] = '{2, 7, 14, 22, 30, 38, 47, 58};

  function automatic logic [5:0] edge_mode(input int gx, input int gy);
    int ax, ay, mj, mn, i;
    bit rising;
    ax = gx < 0 ? -gx : gx;
    ay = gy < 0 ? -gy : gy;
    rising = (gx > 0 && gy > 0) || (gx < 0 && gy < 0);
    if (ax >= ay) begin mj = ax; mn = ay; end
    else          begin mj = ay; mn = ax; end
    i = 0;
    for (int t = 0; t < 8; t++)
      if (64 * mn > TH[t] * mj) i = t + 1;
    if (ax >= ay) return rising ? 6'(26 + i) : 6'(26 - i);
    else          return rising ? 6'(10 - i) : 6'(10 + i);
  endfunction

  logic [5:0]  m_c [16];
  logic [15:0] e_c;
  logic [4:0]  h_c [33];
  always_comb begin
    for (int b = 0; b < 33; b++) h_c[b] = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        int y, x, gx, gy, mag;
        y = r + 2; x = c + 2;
        gx = -int'(patch[y][x-2]) - 2*int'(patch[y][x-1]) + 2*int'(patch[y][x+1]) + int'(patch[y][x+2]);
        gy = -int'(patch[y-2][x]) - 2*int'(patch[y-1][x]) + 2*int'(patch[y+1][x]) + int'(patch[y+2][x]);
        mag = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
        e_c[4*r+c] = mag >= int'(EDGE_TH);
        m_c[4*r+c] = e_c[4*r+c] ? edge_mode(gx, gy) : 6'd0;
        if (e_c[4*r+c]) h_c[m_c[4*r+c] - 6'd2] += 5'd1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; has_edge <= '0;
      for (int b = 0; b < 33; b++) hist[b] <= '0;
      for (int i = 0; i < 16; i++) mode[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        hist <= h_c; mode <= m_c; has_edge <= e_c;
      end
    end
  end
endmodule
