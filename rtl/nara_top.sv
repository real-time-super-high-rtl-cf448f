// nara_top: prediction core and stream output of one HEVC encoder chip.
//
// Structure (blocks in the order of the encoding flow):
//  * flat_detect    - flags flat regions of the input picture and their
//                     shared value A (for the bit-reduced motion search).
//  * u_wme          - wide-range ME: adaptive_me with a +-48 x +-24 window
//                     on the downscaled picture.  Each result (scaled to
//                     full pels by 4 or 8) goes to wme_center, whose
//                     per-picture result re-centres the WME window
//                     (full-pel centre divided back by 4 or 8) and picks
//                     1/4 or 1/8 downscaling for the next picture.
//  * u_mme          - middle-range ME: adaptive_me with a 7x7 area.  The
//                     SAD of every search point of four consecutive child
//                     searches is buffered; after the fourth, sad_aggregator
//                     derives the parent block's SADs and best vector.
//  * fme_combo_select - receives the MME child costs (size 0), the parent
//                     costs (size 1) and external 32x32/64x64 costs and
//                     picks the FME block-size set per CTU.
//  * med_edge/ipd_select - edge histograms of four 4x4 blocks are merged
//                     into the 8x8 histogram and its intra candidates.
//  * iim_decide     - intra/inter decision and MVP of each block.
//  * ref_cache_arbiter + ref_cache - reference picture cache with its
//                     fill mode and time-slot arbitration.
//  * mbus_qos_arbiter - memory bus QoS arbitration.
//  * ts_packetizer -> ts_mux - the chip's video elementary stream to TS
//                     packets and the distributed TS multiplexer.
// Blocks the design does not contain (pixel pipelines, entropy coder,
// DRAM controller, CPUs) connect through the ports of the blocks above.
// Timing of each group is that of its block; the only added latency is one
// register on the WME centre feedback and the 4-child SAD buffer.  The
// split into these blocks follows the document's prediction core; the
// wiring between them (scaling of the WME results, child order, cost
// sizes fed to the FME set choice) is this design's choice.
// rst_n also appears in the disable-iff clause of ref_cache's single-port
// assertion; that is a check, not logic, so a lint note that rst_n is
// used both synchronously and asynchronously stands: all flops reset
// asynchronously.
module nara_top
  import enc_pkg::*;
#(
  parameter int unsigned PIC_W = 3840,
  parameter int unsigned PIC_H = 2160,
  parameter int unsigned M     = 8,
  parameter int unsigned RED   = 4,
  parameter int unsigned WRX   = 48,
  parameter int unsigned WRY   = 24,
  parameter int unsigned MR    = 3,
  localparam int unsigned KW   = $clog2(RED+1),
  localparam int unsigned SADW = M + 4,
  localparam int unsigned NP   = (2*MR+1)*(2*MR+1),
  localparam int unsigned PIC_W8 = PIC_W / 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [KW-1:0]   k,
  input  logic [7:0]      lambda,
  // ---- flat region detection (input picture raster)
  input  logic            pix_valid,
  input  logic            sof,
  input  logic [M-1:0]    pix,
  output logic            flat_valid,
  output logic [$clog2((PIC_W+63)/64)-1:0] flat_x,
  output logic [$clog2((PIC_H+63)/64)-1:0] flat_y,
  output logic            flat_flag,
  output logic [RED-1:0]  flat_a,
  // ---- WME
  input  logic            wme_pu_flat,
  input  logic [RED-1:0]  wme_pu_a,
  input  mv_t             wme_mvp,
  input  logic            wme_tmpl_we,
  input  logic [3:0]      wme_tmpl_idx,
  input  logic [M-1:0]    wme_tmpl_pix,
  input  logic            wme_ref_we,
  input  logic [$clog2(2*WRX+4)-1:0] wme_ref_wx,
  input  logic [$clog2(2*WRY+4)-1:0] wme_ref_wy,
  input  logic [M-1:0]    wme_ref_pix,
  input  logic            wme_ref_flat,
  input  logic [RED-1:0]  wme_ref_a,
  input  logic            wme_start,
  output logic            wme_busy,
  output logic            wme_done,
  output logic            wme_found,
  output mv_t             wme_mv,
  output cost_t           wme_cost,
  input  logic            wme_pic_end,
  input  logic [4:0]      wme_dcur,
  input  logic [4:0]      wme_dprev,
  input  logic [15:0]     wme_min_count,
  output logic            wme_ctr_valid,
  output mv_t             wme_ctr,
  output logic            wme_quarter,
  // ---- MME and SAD aggregation
  input  logic            mme_pu_flat,
  input  logic [RED-1:0]  mme_pu_a,
  input  mv_t             mme_center,
  input  mv_t             mme_mvp,
  input  logic            mme_tmpl_we,
  input  logic [3:0]      mme_tmpl_idx,
  input  logic [M-1:0]    mme_tmpl_pix,
  input  logic            mme_ref_we,
  input  logic [$clog2(2*MR+4)-1:0] mme_ref_wx,
  input  logic [$clog2(2*MR+4)-1:0] mme_ref_wy,
  input  logic [M-1:0]    mme_ref_pix,
  input  logic            mme_ref_flat,
  input  logic [RED-1:0]  mme_ref_a,
  input  logic            mme_start,
  output logic            mme_busy,
  output logic            mme_done,
  output logic            mme_found,
  output mv_t             mme_mv,
  output cost_t           mme_cost,
  output logic            agg_valid,
  output mv_t             agg_center,
  output logic            agg_found,
  output mv_t             agg_mv,
  output cost_t           agg_cost,
  // ---- FME block-size set
  input  logic            fme_cost_valid,   // external 32x32 / 64x64 costs
  input  logic [1:0]      fme_size,
  input  cost_t           fme_cost,
  output logic            fme_cost_ready,
  input  logic            fme_ctu_end,
  output logic            fme_sel_valid,
  output logic            fme_sel_large,
  // ---- intra prediction direction estimation
  input  logic            med_valid,
  input  logic [7:0]      med_patch [8][8],
  output logic            ipd_valid,
  output logic [5:0]      ipd_cand [5],
  output logic [2:0]      ipd_cand_num,
  // ---- intra/inter decision
  input  logic            iim_reg_we,
  input  logic [1:0]      iim_reg_sel,
  input  logic [15:0]     iim_reg_data,
  input  logic [$clog2(PIC_W8/8)-1:0] iim_ctu_col,
  input  logic            iim_first_col,
  input  logic            iim_first_row,
  input  logic            iim_ctu_end,
  input  logic            iim_blk_valid,
  input  logic [2:0]      iim_blk_x,
  input  logic [2:0]      iim_blk_y,
  input  logic [2:0]      iim_blk_log2,
  input  cost_t           iim_intra_cost,
  input  cost_t           iim_inter_sad,
  input  mv_t             iim_blk_mv,
  output logic            iim_dec_valid,
  output logic            iim_dec_inter,
  output mv_t             iim_dec_mvp,
  // ---- reference cache
  input  logic            rc_pic_start,
  input  logic            rc_fill_done,
  output logic            rc_fill_mode,
  input  logic [3:0]      rc_rreq,
  input  logic [9:0]      rc_rx8 [4],
  input  logic [12:0]     rc_ry  [4],
  output logic [3:0]      rc_rgnt,
  output logic [3:0]      rc_rvalid,
  output logic [9:0]      rc_rd_data [16][32],
  input  logic            rc_wreq,
  input  logic [9:0]      rc_wx8,
  input  logic [12:0]     rc_wy,
  input  logic [9:0]      rc_wdata [16][32],
  output logic            rc_wgnt,
  // ---- memory bus QoS
  input  logic [3:0]      mb_req,
  input  logic [1:0]      mb_prio  [4],
  input  logic [7:0]      mb_level [4],
  input  logic [7:0]      mb_lo_th [4],
  input  logic [7:0]      mb_hi_th [4],
  output logic [3:0]      mb_gnt,
  output logic [3:0]      mb_boosted,
  // ---- stream output
  input  logic [12:0]     ts_pid,
  input  logic            es_valid,
  input  logic [7:0]      es_data,
  input  logic            es_pes_start,
  output logic            es_ready,
  input  logic            es_eop,
  input  logic            mux_mode,
  input  logic            mux_master,
  input  logic            mux_token_init,
  input  logic            pcr_tick,
  input  logic            ext_valid,
  input  logic [7:0]      ext_data,
  input  logic            ext_sop,
  output logic            ext_ready,
  input  logic            aux_valid,
  input  logic [7:0]      aux_data,
  input  logic            aux_sop,
  output logic            aux_ready,
  input  logic            token_in,
  output logic            token_out,
  output logic            has_token,
  output logic            ts_valid,
  output logic [7:0]      ts_data,
  output logic            ts_sop,
  input  logic            ts_ready
);
  // ================= flat region detection
  flat_detect #(.M(M), .N(64), .KMAX(RED), .PIC_W(PIC_W), .PIC_H(PIC_H)) u_flat (
    .clk, .rst_n, .k, .pix_valid, .sof, .pix,
    .reg_valid(flat_valid), .reg_x(flat_x), .reg_y(flat_y), .reg_flat(flat_flag), .reg_a(flat_a));

  // ================= WME with centre feedback
  mv_t wme_center_q;
  logic [SADW-1:0] wme_sad_unused;
  logic wme_pt_valid, wme_pt_skip;
  logic signed [7:0] wme_pt_dx, wme_pt_dy;
  logic [SADW-1:0] wme_pt_sad;
  adaptive_me #(.M(M), .RED(RED), .RX(WRX), .RY(WRY)) u_wme (
    .clk, .rst_n, .pu_flat(wme_pu_flat), .pu_a(wme_pu_a), .k, .lambda,
    .center(wme_center_q), .mvp(wme_mvp),
    .tmpl_we(wme_tmpl_we), .tmpl_idx(wme_tmpl_idx), .tmpl_pix(wme_tmpl_pix),
    .ref_we(wme_ref_we), .ref_wx(wme_ref_wx), .ref_wy(wme_ref_wy), .ref_pix(wme_ref_pix),
    .ref_flat(wme_ref_flat), .ref_a(wme_ref_a),
    .start(wme_start), .busy(wme_busy),
    .pt_valid(wme_pt_valid), .pt_dx(wme_pt_dx), .pt_dy(wme_pt_dy), .pt_skip(wme_pt_skip), .pt_sad(wme_pt_sad),
    .done(wme_done), .best_found(wme_found), .best_mv(wme_mv), .best_sad(wme_sad_unused), .best_cost(wme_cost));

  // WME vectors are in downscaled pels: x4 (1/4 picture) or x8 (1/8)
  logic wme_q_q;
  mv_t  wme_full;
  always_comb begin
    wme_full.x = wme_q_q ? (wme_mv.x <<< 2) : (wme_mv.x <<< 3);
    wme_full.y = wme_q_q ? (wme_mv.y <<< 2) : (wme_mv.y <<< 3);
  end
  logic wme_ctr_busy;
  wme_center #(.SRX(WRX), .SRY(WRY)) u_wctr (
    .clk, .rst_n, .mv_valid(wme_done && wme_found), .mv(wme_full), .pic_end(wme_pic_end),
    .dcur(wme_dcur), .dprev(wme_dprev), .min_count(wme_min_count),
    .busy(wme_ctr_busy), .res_valid(wme_ctr_valid), .center(wme_ctr), .quarter(wme_quarter));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wme_center_q <= '0; wme_q_q <= 1'b1;
    end else if (wme_ctr_valid) begin
      wme_q_q <= wme_quarter;
      wme_center_q.x <= wme_quarter ? (wme_ctr.x >>> 2) : (wme_ctr.x >>> 3);
      wme_center_q.y <= wme_quarter ? (wme_ctr.y >>> 2) : (wme_ctr.y >>> 3);
    end
  end

  // ================= MME and 4-child SAD buffer
  logic mme_pt_valid, mme_pt_skip;
  logic signed [7:0] mme_pt_dx, mme_pt_dy;
  logic [SADW-1:0] mme_pt_sad, mme_sad_unused;
  adaptive_me #(.M(M), .RED(RED), .RX(MR), .RY(MR)) u_mme (
    .clk, .rst_n, .pu_flat(mme_pu_flat), .pu_a(mme_pu_a), .k, .lambda,
    .center(mme_center), .mvp(mme_mvp),
    .tmpl_we(mme_tmpl_we), .tmpl_idx(mme_tmpl_idx), .tmpl_pix(mme_tmpl_pix),
    .ref_we(mme_ref_we), .ref_wx(mme_ref_wx), .ref_wy(mme_ref_wy), .ref_pix(mme_ref_pix),
    .ref_flat(mme_ref_flat), .ref_a(mme_ref_a),
    .start(mme_start), .busy(mme_busy),
    .pt_valid(mme_pt_valid), .pt_dx(mme_pt_dx), .pt_dy(mme_pt_dy), .pt_skip(mme_pt_skip), .pt_sad(mme_pt_sad),
    .done(mme_done), .best_found(mme_found), .best_mv(mme_mv), .best_sad(mme_sad_unused), .best_cost(mme_cost));

  logic [SADW-1:0] cs_sad [4][NP];
  logic            cs_ok  [4][NP];
  mv_t             cs_ctr [4];
  mv_t             cur_ctr, cur_mvp;
  logic [1:0]      child;
  logic            agg_in;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      child <= '0; agg_in <= 1'b0; cur_ctr <= '0; cur_mvp <= '0;
      for (int q = 0; q < 4; q++) begin
        cs_ctr[q] <= '0;
        for (int p = 0; p < NP; p++) begin cs_sad[q][p] <= '0; cs_ok[q][p] <= 1'b0; end
      end
    end else begin
      agg_in <= 1'b0;
      if (mme_start && !mme_busy) begin cur_ctr <= mme_center; cur_mvp <= mme_mvp; end
      if (mme_pt_valid) begin
        cs_sad[child][(32'(int'(mme_pt_dy)) + MR) * (2*MR+1) + (32'(int'(mme_pt_dx)) + MR)] <= mme_pt_sad;
        cs_ok [child][(32'(int'(mme_pt_dy)) + MR) * (2*MR+1) + (32'(int'(mme_pt_dx)) + MR)] <= !mme_pt_skip;
      end
      if (mme_done) begin
        cs_ctr[child] <= cur_ctr;
        child <= child + 1'b1;
        if (child == 2'd3) agg_in <= 1'b1;
      end
    end
  end

  logic [SADW+1:0] agg_sad_unused [NP];
  logic            agg_ok_unused  [NP];
  sad_aggregator #(.R(MR), .SADW(SADW)) u_agg (
    .clk, .rst_n, .in_valid(agg_in), .child_center(cs_ctr), .child_sad(cs_sad), .child_ok(cs_ok),
    .lambda, .mvp(cur_mvp),
    .out_valid(agg_valid), .parent_center(agg_center), .parent_sad(agg_sad_unused),
    .parent_ok(agg_ok_unused), .best_found(agg_found), .best_mv(agg_mv), .best_cost(agg_cost));

  // ================= FME set choice: MME children (8x8), parent (16x16), external
  logic  fc_valid;
  logic [1:0] fc_size;
  cost_t fc_cost;
  always_comb begin
    fme_cost_ready = 1'b0;
    if (mme_done && mme_found) begin fc_valid = 1'b1; fc_size = 2'd0; fc_cost = mme_cost; end
    else if (agg_valid && agg_found) begin fc_valid = 1'b1; fc_size = 2'd1; fc_cost = agg_cost; end
    else begin
      fc_valid = fme_cost_valid; fc_size = fme_size; fc_cost = fme_cost; fme_cost_ready = 1'b1;
    end
  end
  logic [COSTW+7:0] fme_sum_s_unused, fme_sum_l_unused;
  fme_combo_select u_fme_sel (
    .clk, .rst_n, .cost_valid(fc_valid), .size(fc_size), .cost(fc_cost), .ctu_end(fme_ctu_end),
    .sel_valid(fme_sel_valid), .sel_large(fme_sel_large),
    .sum_small(fme_sum_s_unused), .sum_large(fme_sum_l_unused));

  // ================= intra direction: 4x4 histograms -> 8x8 candidates
  logic       med_ov;
  logic [4:0] med_hist [33];
  logic [5:0] med_mode_unused [16];
  logic [15:0] med_edge_unused;
  med_edge u_med (
    .clk, .rst_n, .in_valid(med_valid), .patch(med_patch),
    .out_valid(med_ov), .hist(med_hist), .mode(med_mode_unused), .has_edge(med_edge_unused));
  logic [4:0] h4 [4][33];
  logic [1:0] hcnt;
  logic       ipd_in;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt <= '0; ipd_in <= 1'b0;
      for (int q = 0; q < 4; q++) for (int b = 0; b < 33; b++) h4[q][b] <= '0;
    end else begin
      ipd_in <= 1'b0;
      if (med_ov) begin
        h4[hcnt] <= med_hist;
        hcnt <= hcnt + 1'b1;
        if (hcnt == 2'd3) ipd_in <= 1'b1;
      end
    end
  end
  logic [6:0] ipd_hist_unused [33];
  ipd_select #(.CW(5)) u_ipd (
    .clk, .rst_n, .in_valid(ipd_in), .hist_in(h4),
    .out_valid(ipd_valid), .hist_out(ipd_hist_unused), .cand(ipd_cand), .cand_num(ipd_cand_num));

  // ================= intra/inter decision
  cost_t iim_intra_unused, iim_inter_unused;
  iim_decide #(.PIC_W8(PIC_W8)) u_iim (
    .clk, .rst_n, .reg_we(iim_reg_we), .reg_sel(iim_reg_sel), .reg_data(iim_reg_data), .lambda,
    .ctu_col(iim_ctu_col), .first_col(iim_first_col), .first_row(iim_first_row), .ctu_end(iim_ctu_end),
    .blk_valid(iim_blk_valid), .blk_x(iim_blk_x), .blk_y(iim_blk_y), .blk_log2(iim_blk_log2),
    .intra_cost(iim_intra_cost), .inter_sad(iim_inter_sad), .blk_mv(iim_blk_mv),
    .dec_valid(iim_dec_valid), .dec_inter(iim_dec_inter), .dec_mvp(iim_dec_mvp),
    .dec_intra(iim_intra_unused), .dec_inter_cost(iim_inter_unused));

  // ================= reference cache
  logic        c_rd_en, c_wr_en;
  logic [9:0]  c_rd_x8, c_wr_x8;
  logic [12:0] c_rd_y, c_wr_y;
  logic        c_rd_valid_unused;
  ref_cache_arbiter #(.NREQ(4), .SLOTS(8), .XW(10), .YW(13)) u_rc_arb (
    .clk, .rst_n, .pic_start(rc_pic_start), .fill_done(rc_fill_done), .fill_mode(rc_fill_mode),
    .rreq(rc_rreq), .rx8(rc_rx8), .ry(rc_ry), .rgnt(rc_rgnt), .rvalid(rc_rvalid),
    .wreq(rc_wreq), .wx8(rc_wx8), .wy(rc_wy), .wgnt(rc_wgnt),
    .c_rd_en, .c_rd_x8, .c_rd_y, .c_wr_en, .c_wr_x8, .c_wr_y);
  ref_cache #(.PIXW(10), .DEPTH(10240), .TILES_X(PIC_W / 32), .XW(10), .YW(13)) u_rc (
    .clk, .rst_n, .rd_en(c_rd_en), .rd_x8(c_rd_x8), .rd_y(c_rd_y),
    .rd_valid(c_rd_valid_unused), .rd_data(rc_rd_data),
    .wr_en(c_wr_en), .wr_x8(c_wr_x8), .wr_y(c_wr_y), .wr_data(rc_wdata));

  // ================= memory bus QoS
  mbus_qos_arbiter #(.N(4), .LW(8)) u_mbus (
    .clk, .rst_n, .req(mb_req), .prio(mb_prio), .level(mb_level), .lo_th(mb_lo_th), .hi_th(mb_hi_th),
    .gnt(mb_gnt), .boosted(mb_boosted));

  // ================= stream output
  logic       pk_valid, pk_sop, pk_ready, pk_flushed;
  logic [7:0] pk_data;
  ts_packetizer u_pkt (
    .clk, .rst_n, .pid(ts_pid), .in_valid(es_valid), .in_data(es_data), .in_pes_start(es_pes_start),
    .in_ready(es_ready), .eop(es_eop),
    .out_valid(pk_valid), .out_data(pk_data), .out_sop(pk_sop), .out_ready(pk_ready), .flushed(pk_flushed));
  ts_mux u_mux (
    .clk, .rst_n, .mode(mux_mode), .master(mux_master), .token_init(mux_token_init), .video_pid(ts_pid),
    .pcr_tick,
    .ext_valid, .ext_data, .ext_sop, .ext_ready,
    .loc_valid(pk_valid), .loc_data(pk_data), .loc_sop(pk_sop), .loc_ready(pk_ready), .loc_flushed(pk_flushed),
    .aux_valid, .aux_data, .aux_sop, .aux_ready,
    .token_in, .token_out, .has_token,
    .out_valid(ts_valid), .out_data(ts_data), .out_sop(ts_sop), .out_ready(ts_ready));
endmodule
