// adaptive_me: bit-reduced block-matching engine with cost evaluator.
//
// This is the search engine of the wide ME (WME) and of the multi-block-size
// ME (MME): a 4x4 template is matched at every point of a
// (2*RX+1) x (2*RY+1) search area around a search centre.  Samples are held
// with B = M - RED bits only (adaptive bit reduction):
//  * the template block (PU) is either non-flat, and then template and
//    reference are both loaded with their MSB-side B bits, or flat with
//    shared upper value A, and then both are loaded with the near-LSB B bits
//    (see bit_reduce).  In the flat case a reference sample is usable only
//    if it lies in a flat region with the same A; this is decided while
//    loading and stored as one "available" bit per window sample.
//  * during the search a point whose 4x4 reference block contains an
//    unavailable sample is skipped.  Otherwise its SAD is shifted left by
//    RED (non-flat) or by x = RED-k (flat) to bring it back to M-bit scale,
//    and Cost = SAD + lambda * BitCost(mv - mvp) is formed.
//  * the point of minimum cost is kept (first one wins a tie).
//
// Loading: tmpl_we writes template sample tmpl_idx (raster, 0..15); ref_we
// writes window sample (ref_wx, ref_wy), window origin at offset (-RX,-RY)
// from the search centre.  pu_flat, pu_a and k must be stable from the first
// template/window write to the end of the search.
// Search: a start pulse evaluates one point per cycle in raster order
// (dy outer, dx inner).  Four window rows are held in a shift register that
// moves one column per cycle, so the 4x4 SAD tree always reads the same
// sixteen positions; at the end of a search row the next four rows are
// reloaded from the window memory in the same cycle; every point is also streamed out on pt_* one cycle
// after it is evaluated, for the MME SAD buffer.  done pulses one cycle after
// the last point, so a search takes (2RX+1)(2RY+1)+1 cycles from start.
// Defaults are the WME size (+-48 x +-24, 8-bit samples, 4-bit SAD);
// the one-point-per-cycle schedule and the cost bit estimate are this
// design's choice.
module adaptive_me
  import enc_pkg::*;
#(
  parameter int unsigned M    = 8,
  parameter int unsigned RED  = 4,
  parameter int unsigned B    = M - RED,
  parameter int unsigned RX   = 48,
  parameter int unsigned RY   = 24,
  parameter int unsigned KW   = $clog2(RED+1),
  parameter int unsigned SADW = M + 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  logic                 pu_flat,
  input  logic [RED-1:0]       pu_a,
  input  logic [KW-1:0]        k,
  input  logic [7:0]           lambda,
  input  mv_t                  center,
  input  mv_t                  mvp,
  // template load
  input  logic                 tmpl_we,
  input  logic [3:0]           tmpl_idx,
  input  logic [M-1:0]         tmpl_pix,
  // reference window load
  input  logic                 ref_we,
  input  logic [$clog2(2*RX+4)-1:0] ref_wx,
  input  logic [$clog2(2*RY+4)-1:0] ref_wy,
  input  logic [M-1:0]         ref_pix,
  input  logic                 ref_flat,
  input  logic [RED-1:0]       ref_a,
  // search
  input  logic                 start,
  output logic                 busy,
  output logic                 pt_valid,
  output logic signed [7:0]    pt_dx,
  output logic signed [7:0]    pt_dy,
  output logic                 pt_skip,
  output logic [SADW-1:0]      pt_sad,
  output logic                 done,
  output logic                 best_found,
  output mv_t                  best_mv,
  output logic [SADW-1:0]      best_sad,
  output cost_t                best_cost
);
  localparam int unsigned WW = 2*RX + 4;
  localparam int unsigned WH = 2*RY + 4;

  logic [B-1:0] tmpl   [16];
  logic [B-1:0] win    [WH][WW];
  logic         avail  [WH][WW];
  logic [B-1:0] sh_pix [4][WW];   // four window rows, shifted left per point
  logic         sh_ok  [4][WW];

  logic [B-1:0] tmpl_red, ref_red;
  logic         ref_ok;

  bit_reduce #(.M(M), .RED(RED), .B(B)) u_red_t (
    .pix(tmpl_pix), .flat(pu_flat), .k(k), .red(tmpl_red));
  bit_reduce #(.M(M), .RED(RED), .B(B)) u_red_r (
    .pix(ref_pix), .flat(pu_flat), .k(k), .red(ref_red));

  // In the flat case only flat reference regions with the same A are usable.
  always_comb begin
    logic [RED-1:0] mask;
    mask   = RED'(((RED+1)'(1) << k) - 1'b1);
    ref_ok = !pu_flat || (ref_flat && ((ref_a & mask) == (pu_a & mask)));
  end

  // search counters
  logic [$clog2(2*RX+1)-1:0] px;
  logic [$clog2(2*RY+1)-1:0] py;
  logic running;

  // evaluation of the current point (combinational)
  logic [B+3:0]    sad_raw;
  logic            skip_now;
  logic [SADW-1:0] sad_al;
  mv_t             mv_now;
  cost_t           cost_now;
  always_comb begin
    sad_raw  = '0;
    skip_now = 1'b0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        logic [B-1:0] t, w;
        t = tmpl[4*r + c];
        w = sh_pix[r][c];
        sad_raw += (B+4)'((t > w) ? (t - w) : (w - t));
        if (!sh_ok[r][c]) skip_now = 1'b1;
      end
    if (pu_flat) sad_al = SADW'(sad_raw) << (KW'(RED) - k);
    else         sad_al = SADW'(sad_raw) << RED;
    mv_now.x = center.x + mvc_t'(int'(px) - int'(RX));
    mv_now.y = center.y + mvc_t'(int'(py) - int'(RY));
    cost_now = cost_t'(sad_al) + cost_t'(lambda) * cost_t'(mv_bitcost(mv_now, mvp));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) tmpl[i] <= '0;
      for (int r = 0; r < WH; r++)
        for (int c = 0; c < WW; c++) begin
          win[r][c]   <= '0;
          avail[r][c] <= 1'b0;
        end
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < WW; c++) begin
          sh_pix[r][c] <= '0;
          sh_ok[r][c]  <= 1'b0;
        end
      px <= '0; py <= '0; running <= 1'b0;
      pt_valid <= 1'b0; pt_dx <= '0; pt_dy <= '0; pt_skip <= 1'b0; pt_sad <= '0;
      done <= 1'b0; best_found <= 1'b0; best_mv <= '0; best_sad <= '0; best_cost <= '1;
    end else begin
      if (tmpl_we) tmpl[tmpl_idx] <= tmpl_red;
      if (ref_we) begin
        win[ref_wy][ref_wx]   <= ref_red;
        avail[ref_wy][ref_wx] <= ref_ok;
      end
      done     <= 1'b0;
      pt_valid <= 1'b0;
      if (start && !running) begin
        running    <= 1'b1;
        px <= '0; py <= '0;
        best_found <= 1'b0;
        best_cost  <= '1;
        best_sad   <= '0;
        best_mv    <= center;
        for (int r = 0; r < 4; r++) begin
          sh_pix[r] <= win[r];
          sh_ok[r]  <= avail[r];
        end
      end else if (running) begin
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < WW-1; c++) begin
            sh_pix[r][c] <= sh_pix[r][c+1];
            sh_ok[r][c]  <= sh_ok[r][c+1];
          end
        pt_valid <= 1'b1;
        pt_dx    <= 8'(int'(px) - int'(RX));
        pt_dy    <= 8'(int'(py) - int'(RY));
        pt_skip  <= skip_now;
        pt_sad   <= sad_al;
        if (!skip_now && (!best_found || cost_now < best_cost)) begin
          best_found <= 1'b1;
          best_cost  <= cost_now;
          best_sad   <= sad_al;
          best_mv    <= mv_now;
        end
        if (int'(px) == 2*RX) begin
          px <= '0;
          if (int'(py) == 2*RY) begin
            running <= 1'b0;
            done    <= 1'b1;
          end else begin
            py <= py + 1'b1;
            for (int r = 0; r < 4; r++) begin
              sh_pix[r] <= win[int'(py) + 1 + r];
              sh_ok[r]  <= avail[int'(py) + 1 + r];
            end
          end
        end else px <= px + 1'b1;
      end
    end
  end

  assign busy = running;

endmodule
