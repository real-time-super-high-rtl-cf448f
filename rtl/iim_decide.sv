// iim_decide: sequential intra/inter mode decision (IIM) of the prediction
// core ("deeply centred" mode decision).
//
// The costs that reach the IIM were estimated in parallel, before the modes
// of neighbouring blocks were known.  The IIM takes the blocks of a CTU one
// by one in z-scan order, so that the left and above neighbours of each
// block are already final, and recomputes the inter cost with the motion
// vector predictor those final neighbours give:
//    inter = SAD + lambda * BitCost(mv - mvp)
// with mvp = left neighbour's MV if it is inter, else the above
// neighbour's MV if inter, else zero (a reduced form of the standard's
// predictor derivation).  Both costs then pass a per-mode linear transform,
//    cost' = (cost * scale) >> 6 + offset,
// whose scale and offset registers software rewrites between CTUs, and the
// cheaper mode is fixed.  The chosen mode and MV are written into an 8x8
// neighbour map of the CTU, a left column kept from the previous CTU and a
// line buffer of the bottom row of the CTU row above (copied at ctu_end).
//
// Interface: one block per cycle (blk_valid) with its position in 8-pixel
// units inside the CTU, its size (log2 3..6) and tentative costs; the
// decision appears one cycle later.  The sequential z-order recomputation
// and the scale/offset registers follow the document; the predictor rule,
// the Q6 scale format and the map layout are this design's choices.  The
// choice between block sizes is not made here: blocks arrive in the
// partition chosen upstream.
module iim_decide
  import enc_pkg::*;
#(
  parameter int unsigned PIC_W8 = 480      // picture width in 8-pixel units (4K)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // scale/offset registers: 0 intra scale, 1 intra offset, 2 inter scale, 3 inter offset
  input  logic                      reg_we,
  input  logic [1:0]                reg_sel,
  input  logic [15:0]               reg_data,
  input  logic [7:0]                lambda,
  // CTU context
  input  logic [$clog2(PIC_W8/8)-1:0] ctu_col,
  input  logic                      first_col,
  input  logic                      first_row,
  input  logic                      ctu_end,
  // block stream in z order
  input  logic                      blk_valid,
  input  logic [2:0]                blk_x,     // 8-pixel units in the CTU
  input  logic [2:0]                blk_y,
  input  logic [2:0]                blk_log2,  // 3 (8x8) .. 6 (64x64)
  input  cost_t                     intra_cost,
  input  cost_t                     inter_sad,
  input  mv_t                       blk_mv,
  output logic                      dec_valid,
  output logic                      dec_inter,
  output mv_t                       dec_mvp,
  output cost_t                     dec_intra,
  output cost_t                     dec_inter_cost
);
  logic [15:0] scale_i, scale_p;
  logic signed [15:0] off_i, off_p;

  mv_t  cur_mv  [8][8];
  logic cur_int [8][8];
  mv_t  left_mv [8];
  logic left_int[8];
  mv_t  up_mv   [PIC_W8];
  logic up_int  [PIC_W8];

  mv_t   mvp, l_mv, a_mv;
  logic  l_ok, a_ok;
  cost_t ci, cp, fi, fp;
  int    span;

  function automatic cost_t lin(input cost_t c, input logic [15:0] sc, input logic signed [15:0] of);
    longint v;
    v = (longint'(c) * longint'(sc)) >>> 6;
    v = v + longint'(of);
    if (v < 0) v = 0;
    if (v > longint'({COSTW{1'b1}})) v = longint'({COSTW{1'b1}});
    return cost_t'(v);
  endfunction

  always_comb begin
    int ux;
    ux = int'(ctu_col) * 8 + int'(blk_x);
    if (blk_x != 0)      begin l_ok = cur_int[blk_y][blk_x - 1]; l_mv = cur_mv[blk_y][blk_x - 1]; end
    else if (!first_col) begin l_ok = left_int[blk_y];           l_mv = left_mv[blk_y]; end
    else                 begin l_ok = 1'b0;                      l_mv = '0; end
    if (blk_y != 0)      begin a_ok = cur_int[blk_y - 1][blk_x]; a_mv = cur_mv[blk_y - 1][blk_x]; end
    else if (!first_row) begin a_ok = up_int[ux];                a_mv = up_mv[ux]; end
    else                 begin a_ok = 1'b0;                      a_mv = '0; end
    mvp = l_ok ? l_mv : (a_ok ? a_mv : '0);
    ci = intra_cost;
    cp = inter_sad + cost_t'(lambda) * cost_t'(mv_bitcost(blk_mv, mvp));
    fi = lin(ci, scale_i, off_i);
    fp = lin(cp, scale_p, off_p);
    span = 1 << (int'(blk_log2) - 3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scale_i <= 16'd64; scale_p <= 16'd64; off_i <= '0; off_p <= '0;
      for (int y = 0; y < 8; y++) begin
        left_mv[y] <= '0; left_int[y] <= 1'b0;
        for (int x = 0; x < 8; x++) begin cur_mv[y][x] <= '0; cur_int[y][x] <= 1'b0; end
      end
      for (int i = 0; i < PIC_W8; i++) begin up_mv[i] <= '0; up_int[i] <= 1'b0; end
      dec_valid <= 1'b0; dec_inter <= 1'b0; dec_mvp <= '0; dec_intra <= '0; dec_inter_cost <= '0;
    end else begin
      dec_valid <= 1'b0;
      if (reg_we)
        case (reg_sel)
          2'd0: scale_i <= reg_data;
          2'd1: off_i   <= reg_data;
          2'd2: scale_p <= reg_data;
          default: off_p <= reg_data;
        endcase
      if (blk_valid) begin
        logic inter;
        inter = fp < fi;
        dec_valid <= 1'b1;
        dec_inter <= inter;
        dec_mvp <= mvp;
        dec_intra <= fi;
        dec_inter_cost <= fp;
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++)
            if (y >= int'(blk_y) && y < int'(blk_y) + span && x >= int'(blk_x) && x < int'(blk_x) + span) begin
              cur_int[y][x] <= inter;
              cur_mv[y][x]  <= inter ? blk_mv : '0;
            end
      end else if (ctu_end) begin
        for (int y = 0; y < 8; y++) begin
          left_mv[y] <= cur_mv[y][7]; left_int[y] <= cur_int[y][7];
        end
        for (int x = 0; x < 8; x++) begin
          up_mv[int'(ctu_col) * 8 + x]  <= cur_mv[7][x];
          up_int[int'(ctu_col) * 8 + x] <= cur_int[7][x];
        end
      end
    end
  end
endmodule
