// sad_aggregator: SAD aggregation of the multi-block-size ME (MME).
//
// The MME computes SADs only for its smallest block (a 4x4 template on the
// 1/2 downscaled picture, i.e. an 8x8 block), each over its own
// (2R+1) x (2R+1) search area around its own centre.  The SAD of a block
// twice as large at a motion vector p is the sum of the four quarter-block
// SADs at p, which exists only where p lies in all four search areas (the
// "AND" region).  This module takes the four child SAD maps in z order
// (each with its centre and a per-point availability bit), and builds the
// parent's map on the same (2R+1)^2 grid, centred on the middle of the AND
// region; points outside it are marked unavailable.  It also picks the
// parent point of minimum Cost = SAD + lambda * BitCost(p - mvp).  Because
// the output has the child format, instances chain 8x8 -> 16x16 -> 32x32 ->
// 64x64, with SADW growing by two bits per level.
//
// Timing: in_valid to out_valid is one cycle; one aggregation per cycle.
// The aggregation rule is the document's; the grid placement and the
// availability bits are this design's choice.
module sad_aggregator
  import enc_pkg::*;
#(
  parameter int unsigned R    = 3,     // 7x7 search area, double-pel units
  parameter int unsigned SADW = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  mv_t                  child_center [4],
  input  logic [SADW-1:0]      child_sad    [4][(2*R+1)*(2*R+1)],
  input  logic                 child_ok     [4][(2*R+1)*(2*R+1)],
  input  logic [7:0]           lambda,
  input  mv_t                  mvp,
  output logic                 out_valid,
  output mv_t                  parent_center,
  output logic [SADW+1:0]      parent_sad   [(2*R+1)*(2*R+1)],
  output logic                 parent_ok    [(2*R+1)*(2*R+1)],
  output logic                 best_found,
  output mv_t                  best_mv,
  output cost_t                best_cost
);
  localparam int D  = 2*R + 1;
  localparam int NP = D * D;

  mv_t             pc;
  logic [SADW+1:0] psad [NP];
  logic            pok  [NP];
  logic            bf;
  mv_t             bmv;
  cost_t           bc;

  always_comb begin
    int lox, hix, loy, hiy;
    lox = int'(child_center[0].x); hix = lox;
    loy = int'(child_center[0].y); hiy = loy;
    for (int i = 1; i < 4; i++) begin
      if (int'(child_center[i].x) > lox) lox = int'(child_center[i].x);
      if (int'(child_center[i].x) < hix) hix = int'(child_center[i].x);
      if (int'(child_center[i].y) > loy) loy = int'(child_center[i].y);
      if (int'(child_center[i].y) < hiy) hiy = int'(child_center[i].y);
    end
    // AND region is [lox-R, hix+R] x [loy-R, hiy+R]; centre on its middle
    pc.x = mvc_t'((lox + hix) >>> 1);
    pc.y = mvc_t'((loy + hiy) >>> 1);
    bf = 1'b0; bmv = pc; bc = '1;
    for (int j = 0; j < D; j++)
      for (int i = 0; i < D; i++) begin
        int px, py;
        logic ok;
        logic [SADW+1:0] s;
        mv_t p;
        cost_t c;
        px = int'(pc.x) + i - int'(R);
        py = int'(pc.y) + j - int'(R);
        ok = 1'b1; s = '0;
        for (int q = 0; q < 4; q++) begin
          int ox, oy;
          ox = px - int'(child_center[q].x) + int'(R);
          oy = py - int'(child_center[q].y) + int'(R);
          if (ox < 0 || ox >= D || oy < 0 || oy >= D) ok = 1'b0;
          else begin
            if (!child_ok[q][oy*D + ox]) ok = 1'b0;
            s += (SADW+2)'(child_sad[q][oy*D + ox]);
          end
        end
        psad[j*D + i] = ok ? s : '0;
        pok[j*D + i]  = ok;
        p.x = mvc_t'(px); p.y = mvc_t'(py);
        c = cost_t'(s) + cost_t'(lambda) * cost_t'(mv_bitcost(p, mvp));
        if (ok && (!bf || c < bc)) begin bf = 1'b1; bc = c; bmv = p; end
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; parent_center <= '0; best_found <= 1'b0; best_mv <= '0; best_cost <= '0;
      for (int n = 0; n < NP; n++) begin parent_sad[n] <= '0; parent_ok[n] <= 1'b0; end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        parent_center <= pc;
        parent_sad    <= psad;
        parent_ok     <= pok;
        best_found    <= bf;
        best_mv       <= bmv;
        best_cost     <= bc;
      end
    end
  end
endmodule
