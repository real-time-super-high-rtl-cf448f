// wme_center: statistics stage of the wide motion estimation (WME).
//
// During a picture every WME block result (a full-pel motion vector) is
// counted into two histograms, one per axis, with a bin every BINW pixels
// (the x and y marginals of the 2-D MV histogram).  At the end of the
// picture (pic_end) the module scans the bins, one per cycle, and finds
//  * the mode of each axis, MODE(x, y), and
//  * the extent of the distribution: the lowest and highest bins holding at
//    least min_count vectors.
// It then forms the search centre of the next picture as
// MODE * (Dcur / Dprev) (rounded to nearest, clipped to the +-384 x +-192
// reach of the 1/8 search), stretches the extent by the same factor, and
// selects the 1/4 downscaled search when the stretched extent lies inside
// the 1/4 search range around the new centre (+-48*4 x +-24*4 pixels),
// otherwise the 1/8 one.  The histograms are cleared by the scan.
//
// Timing: result valid (res_valid) NBX + 2 cycles after pic_end, NBX = bins
// on the x axis.  No vectors may be entered while busy.  Histogram bin
// width, the per-axis form, the extent rule and min_count are this design's
// reading of the text; the centre formula, search ranges and the 1/4-or-1/8
// rule are the document's.
module wme_center
  import enc_pkg::*;
#(
  parameter int unsigned SRX  = 48,    // WME search range in downscaled pixels (x)
  parameter int unsigned SRY  = 24,    // (y)
  parameter int unsigned BINW = 4,     // histogram bin width in full pixels
  parameter int unsigned CNTW = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            mv_valid,
  input  mv_t             mv,           // full-pel WME result of one block
  input  logic            pic_end,
  input  logic [4:0]      dcur,         // temporal distances, 1..16
  input  logic [4:0]      dprev,
  input  logic [CNTW-1:0] min_count,
  output logic            busy,
  output logic            res_valid,
  output mv_t             center,
  output logic            quarter       // 1: use 1/4 downscaling, 0: 1/8
);
  localparam int MAXX = SRX * 8, MAXY = SRY * 8;       // +-384, +-192
  localparam int NBX  = 2 * MAXX / BINW + 1;
  localparam int NBY  = 2 * MAXY / BINW + 1;
  localparam int Q4X  = SRX * 4, Q4Y = SRY * 4;        // 1/4 search reach

  logic [CNTW-1:0] hx [NBX];
  logic [CNTW-1:0] hy [NBY];
  logic scanning, finishing;
  logic [$clog2(NBX+1)-1:0] idx;
  int   modex, modey, minx, maxx, miny, maxy;
  logic [CNTW-1:0] bestx, besty;
  logic anyx, anyy;

  function automatic int bin_of(input mvc_t v, input int maxv, input int nb);
    int b;
    b = (int'(v) + maxv + BINW/2) / BINW;
    if (b < 0) b = 0;
    if (b > nb - 1) b = nb - 1;
    return b;
  endfunction

  // stretch v by dcur/dprev, rounded to nearest
  function automatic int stretch(input int v, input logic [4:0] dc, input logic [4:0] dp);
    int num, den;
    num = v * int'(dc);
    den = (dp == 0) ? 1 : int'(dp);
    if (num >= 0) return (num + den / 2) / den;
    else          return -((-num + den / 2) / den);
  endfunction

  function automatic int clip(input int v, input int lim);
    return (v > lim) ? lim : ((v < -lim) ? -lim : v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NBX; i++) hx[i] <= '0;
      for (int i = 0; i < NBY; i++) hy[i] <= '0;
      scanning <= 1'b0; finishing <= 1'b0; idx <= '0;
      modex <= 0; modey <= 0; minx <= 0; maxx <= 0; miny <= 0; maxy <= 0;
      bestx <= '0; besty <= '0; anyx <= 1'b0; anyy <= 1'b0;
      res_valid <= 1'b0; center <= '0; quarter <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      if (!scanning && !finishing) begin
        if (mv_valid) begin
          hx[bin_of(mv.x, MAXX, NBX)] <= hx[bin_of(mv.x, MAXX, NBX)] + 1'b1;
          hy[bin_of(mv.y, MAXY, NBY)] <= hy[bin_of(mv.y, MAXY, NBY)] + 1'b1;
        end
        if (pic_end) begin
          scanning <= 1'b1; idx <= '0;
          bestx <= '0; besty <= '0; anyx <= 1'b0; anyy <= 1'b0;
          modex <= 0; modey <= 0;
        end
      end else if (scanning) begin
        int vx, vy;
        vx = int'(idx) * BINW - MAXX;
        vy = int'(idx) * BINW - MAXY;
        if (hx[idx] > bestx) begin bestx <= hx[idx]; modex <= vx; end
        if (hx[idx] != 0 && hx[idx] >= min_count) begin
          if (!anyx) minx <= vx;
          maxx <= vx; anyx <= 1'b1;
        end
        hx[idx] <= '0;
        if (int'(idx) < NBY) begin
          if (hy[idx] > besty) begin besty <= hy[idx]; modey <= vy; end
          if (hy[idx] != 0 && hy[idx] >= min_count) begin
            if (!anyy) miny <= vy;
            maxy <= vy; anyy <= 1'b1;
          end
          hy[idx] <= '0;
        end
        if (int'(idx) == NBX - 1) begin scanning <= 1'b0; finishing <= 1'b1; end
        else idx <= idx + 1'b1;
      end else begin
        int cx, cy, lox, hix, loy, hiy;
        cx = clip(stretch(modex, dcur, dprev), MAXX);
        cy = clip(stretch(modey, dcur, dprev), MAXY);
        lox = anyx ? stretch(minx, dcur, dprev) : cx;
        hix = anyx ? stretch(maxx, dcur, dprev) : cx;
        loy = anyy ? stretch(miny, dcur, dprev) : cy;
        hiy = anyy ? stretch(maxy, dcur, dprev) : cy;
        center.x  <= mvc_t'(cx);
        center.y  <= mvc_t'(cy);
        quarter   <= (lox >= cx - Q4X) && (hix <= cx + Q4X) &&
                     (loy >= cy - Q4Y) && (hiy <= cy + Q4Y);
        res_valid <= 1'b1;
        finishing <= 1'b0;
      end
    end
  end
  assign busy = scanning || finishing;
endmodule
