// tb_nara_top: end-to-end test of nara_top at its default parameters (4K
// picture, +-48 x +-24 WME window, 7x7 MME area, full-size reference
// cache), so it is also the full-size test.  Each phase drives one part of
// the chip through its ports and counts the mechanism it exercises:
//   flat region found / busy region found (64 lines of a 4K picture)
//   WME search, WME centre update (picture end)
//   MME searches on flat and on busy blocks, skipped points (window rows
//   not loaded), SAD aggregation of four children
//   FME set choice: smaller set and larger set
//   intra direction candidates from four 4x4 histograms
//   IIM decision intra and inter
//   reference cache fill-mode write, slot-mode read with data check
//   memory bus priority boost
//   TS packets with stuffing, null packets, token pass after flush
// A mechanism that never happened is a failure.
module tb_nara_top;
  import enc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin #50ms; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic [2:0]  k = 3'd2;
  logic [7:0]  lambda = 8'd4;
  logic        pix_valid = 0, sof = 0;
  logic [7:0]  pix = 0;
  logic        flat_valid, flat_flag;
  logic [5:0]  flat_x;
  logic [5:0]  flat_y;
  logic [3:0]  flat_a;
  logic        wme_pu_flat = 0; logic [3:0] wme_pu_a = 0; mv_t wme_mvp = '0;
  logic        wme_tmpl_we = 0; logic [3:0] wme_tmpl_idx = 0; logic [7:0] wme_tmpl_pix = 0;
  logic        wme_ref_we = 0; logic [6:0] wme_ref_wx = 0; logic [6:0] wme_ref_wy = 0;
  logic [7:0]  wme_ref_pix = 0; logic wme_ref_flat = 0; logic [3:0] wme_ref_a = 0;
  logic        wme_start = 0, wme_busy, wme_done, wme_found;
  mv_t         wme_mv; cost_t wme_cost;
  logic        wme_pic_end = 0; logic [4:0] wme_dcur = 5'd1, wme_dprev = 5'd1;
  logic [15:0] wme_min_count = 16'd1;
  logic        wme_ctr_valid, wme_quarter; mv_t wme_ctr;
  logic        mme_pu_flat = 0; logic [3:0] mme_pu_a = 0; mv_t mme_center = '0, mme_mvp = '0;
  logic        mme_tmpl_we = 0; logic [3:0] mme_tmpl_idx = 0; logic [7:0] mme_tmpl_pix = 0;
  logic        mme_ref_we = 0; logic [3:0] mme_ref_wx = 0, mme_ref_wy = 0;
  logic [7:0]  mme_ref_pix = 0; logic mme_ref_flat = 0; logic [3:0] mme_ref_a = 0;
  logic        mme_start = 0, mme_busy, mme_done, mme_found;
  mv_t         mme_mv; cost_t mme_cost;
  logic        agg_valid, agg_found; mv_t agg_center, agg_mv; cost_t agg_cost;
  logic        fme_cost_valid = 0; logic [1:0] fme_size = 0; cost_t fme_cost = '0;
  logic        fme_cost_ready, fme_ctu_end = 0, fme_sel_valid, fme_sel_large;
  logic        med_valid = 0; logic [7:0] med_patch [8][8];
  logic        ipd_valid; logic [5:0] ipd_cand [5]; logic [2:0] ipd_cand_num;
  logic        iim_reg_we = 0; logic [1:0] iim_reg_sel = 0; logic [15:0] iim_reg_data = 0;
  logic [5:0]  iim_ctu_col = 0;
  logic        iim_first_col = 1, iim_first_row = 1, iim_ctu_end = 0, iim_blk_valid = 0;
  logic [2:0]  iim_blk_x = 0, iim_blk_y = 0, iim_blk_log2 = 3'd3;
  cost_t       iim_intra_cost = '0, iim_inter_sad = '0; mv_t iim_blk_mv = '0;
  logic        iim_dec_valid, iim_dec_inter; mv_t iim_dec_mvp;
  logic        rc_pic_start = 0, rc_fill_done = 0, rc_fill_mode;
  logic [3:0]  rc_rreq = 0; logic [9:0] rc_rx8 [4]; logic [12:0] rc_ry [4];
  logic [3:0]  rc_rgnt, rc_rvalid; logic [9:0] rc_rd_data [16][32];
  logic        rc_wreq = 0; logic [9:0] rc_wx8 = 0; logic [12:0] rc_wy = 0;
  logic [9:0]  rc_wdata [16][32]; logic rc_wgnt;
  logic [3:0]  mb_req = 0; logic [1:0] mb_prio [4]; logic [7:0] mb_level [4], mb_lo_th [4], mb_hi_th [4];
  logic [3:0]  mb_gnt, mb_boosted;
  logic [12:0] ts_pid = 13'h100;
  logic        es_valid = 0, es_pes_start = 0, es_ready, es_eop = 0;
  logic [7:0]  es_data = 0;
  logic        mux_mode = 0, mux_master = 1, mux_token_init = 1, pcr_tick = 1;
  logic        ext_ready, aux_ready, token_out, has_token;
  logic        ts_valid, ts_sop, ts_ready = 1; logic [7:0] ts_data;

  nara_top dut (.*,
    .ext_valid(1'b0), .ext_data(8'h00), .ext_sop(1'b0),
    .aux_valid(1'b0), .aux_data(8'h00), .aux_sop(1'b0), .token_in(1'b0));

  // ---------------- event counters
  int n_flat = 0, n_busy = 0, n_wme = 0, n_wctr = 0, n_mme_flat = 0, n_mme_busy = 0;
  int n_skip = 0, n_agg = 0, n_small = 0, n_large = 0, n_ipd = 0, n_intra = 0, n_inter = 0;
  int n_fillwr = 0, n_slotrd = 0, n_boost = 0, n_pkt = 0, n_null = 0, n_stuff = 0, n_token = 0;
  int ts_idx = 0; logic [7:0] ts_hdr [6];
  always @(posedge clk) if (rst_n) begin
    if (flat_valid) begin if (flat_flag) n_flat++; else n_busy++; end
    if (wme_done) n_wme++;
    if (wme_ctr_valid) n_wctr++;
    if (mme_done) begin if (dut.u_mme.pu_flat) n_mme_flat++; else n_mme_busy++; end
    if (dut.u_mme.pt_valid && dut.u_mme.pt_skip) n_skip++;
    if (agg_valid) begin
      n_agg++;
      chk(n_mme_flat + n_mme_busy == 4, "aggregation follows the fourth child search");
    end
    if (fme_sel_valid) begin if (fme_sel_large) n_large++; else n_small++; end
    if (ipd_valid) n_ipd++;
    if (iim_dec_valid) begin if (iim_dec_inter) n_inter++; else n_intra++; end
    if (dut.c_wr_en && rc_fill_mode) n_fillwr++;
    if (|mb_boosted) n_boost++;
    if (token_out) n_token++;
    if (ts_valid && ts_ready) begin
      if (ts_idx == 0) chk(ts_sop && ts_data == 8'h47, "TS sync byte");
      if (ts_idx < 6) ts_hdr[ts_idx] = ts_data;
      if (ts_idx == 5) begin
        n_pkt++;
        if ({ts_hdr[1][4:0], ts_hdr[2]} == NULL_PID) n_null++;
        else if (ts_hdr[3][5]) n_stuff++;
      end
      ts_idx = (ts_idx == 187) ? 0 : ts_idx + 1;
    end
  end

  // ---------------- phases
  task automatic flat_phase();
    // 64 lines: region 0 constant, region 1 ramp, rest random
    @(negedge clk);
    for (int y = 0; y < 64; y++)
      for (int x = 0; x < 3840; x++) begin
        pix_valid = 1; sof = (x == 0 && y == 0);
        pix = (x < 64) ? 8'h5A : (x < 128) ? 8'(x + y) : 8'($urandom);
        @(negedge clk);
      end
    pix_valid = 0; sof = 0;
    repeat (5) @(negedge clk);
    chk(n_flat >= 1 && n_busy >= 1, $sformatf("flat %0d busy %0d regions", n_flat, n_busy));
  endtask

  task automatic wme_phase();
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); wme_tmpl_we = 1; wme_tmpl_idx = 4'(i); wme_tmpl_pix = 8'(i * 13);
    end
    @(negedge clk); wme_tmpl_we = 0;
    for (int y = 0; y < 52; y++) for (int x = 0; x < 100; x++) begin
      wme_ref_we = 1; wme_ref_wx = 7'(x); wme_ref_wy = 7'(y);
      wme_ref_pix = 8'((x * 7 + y * 3) ^ (x * y)); @(negedge clk);
    end
    wme_ref_we = 0;
    wme_start = 1; @(negedge clk); wme_start = 0;
    wait (wme_done); @(negedge clk);
    wme_pic_end = 1; @(negedge clk); wme_pic_end = 0;
    repeat (400) @(negedge clk);
    chk(n_wme == 1 && n_wctr == 1, "WME search and centre update");
  endtask

  task automatic mme_search(input bit flat);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); mme_tmpl_we = 1; mme_tmpl_idx = 4'(i); mme_tmpl_pix = 8'(flat ? 8'h40 : 8'(i * 9));
    end
    @(negedge clk); mme_tmpl_we = 0;
    for (int y = 0; y < 8; y++) for (int x = 0; x < 10; x++) begin   // rows 8..9 left out
      mme_ref_we = 1; mme_ref_wx = 4'(x); mme_ref_wy = 4'(y);
      mme_ref_pix = flat ? 8'h40 : 8'(x * 11 + y * 5); mme_ref_flat = flat; mme_ref_a = 4'h4;
      @(negedge clk);
    end
    mme_ref_we = 0; mme_pu_flat = flat; mme_pu_a = 4'h4;
    mme_start = 1; @(negedge clk); mme_start = 0;
    wait (mme_done); @(negedge clk);
  endtask

  task automatic fme_ctu(input int small_cost, input int large_cost);
    // for CTU 1 the MME phase has already added its 8x8 / 16x16 costs
    // sets differ only in 8x8 (size 0) and 64x64 (size 3)
    @(negedge clk); fme_cost_valid = 1; fme_size = 2'd0; fme_cost = cost_t'(small_cost);
    @(negedge clk); fme_size = 2'd3; fme_cost = cost_t'(large_cost);
    @(negedge clk); fme_cost_valid = 0;
    fme_ctu_end = 1; @(negedge clk); fme_ctu_end = 0;
    repeat (3) @(negedge clk);
  endtask

  logic [9:0] wpat [16][32];
  initial begin
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) med_patch[r][c] = 0;
    for (int i = 0; i < 4; i++) begin rc_rx8[i] = 0; rc_ry[i] = 0; mb_prio[i] = 2'(i); mb_level[i] = 8'd100;
      mb_lo_th[i] = 8'd10; mb_hi_th[i] = 8'd200; end
    for (int r = 0; r < 16; r++) for (int c = 0; c < 32; c++) begin
      wpat[r][c] = 10'($urandom); rc_wdata[r][c] = wpat[r][c];
    end
    repeat (3) @(negedge clk); rst_n = 1;

    // TS: one short picture -> stuffing packet, flush, token out; nulls meanwhile
    fork
      begin
        @(negedge clk);
        for (int i = 0; i < 300; i++) begin
          es_valid = 1; es_data = 8'(i); es_pes_start = (i == 0);
          do @(posedge clk); while (!es_ready);
          #1;
        end
        es_valid = 0; es_pes_start = 0;
        @(negedge clk); es_eop = 1; @(negedge clk); es_eop = 0;
      end
    join_none

    flat_phase();
    wme_phase();
    mme_search(1); mme_search(1); mme_search(0); mme_search(0);
    repeat (3) @(negedge clk);
    chk(n_agg == 1, "one aggregation after four children");
    chk(n_skip > 0, "points outside the loaded window skipped");
    fme_ctu(10, 100000);        // large set expensive -> smaller set
    fme_ctu(100000, 10);        // smaller set expensive -> larger set

    // intra direction: four 4x4 patches with a vertical edge
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) med_patch[r][c] = (c < 4) ? 8'd20 : 8'd200;
    for (int i = 0; i < 4; i++) begin med_valid = 1; @(negedge clk); end
    med_valid = 0; repeat (5) @(negedge clk);
    chk(n_ipd == 1 && ipd_cand_num >= 3, "IPD candidates from four 4x4 histograms");

    // IIM: cheap intra, then cheap inter
    iim_blk_valid = 1; iim_intra_cost = 24'd10; iim_inter_sad = 24'd5000; @(negedge clk);
    iim_blk_x = 3'd1; iim_intra_cost = 24'd5000; iim_inter_sad = 24'd10; @(negedge clk);
    iim_blk_valid = 0; repeat (3) @(negedge clk);

    // reference cache: fill-mode write, then slot-mode read
    rc_pic_start = 1; @(negedge clk); rc_pic_start = 0;
    rc_wreq = 1; rc_wx8 = 10'd5; rc_wy = 13'd48;
    do @(posedge clk); while (!rc_wgnt);
    #1 rc_wreq = 0; @(negedge clk);
    rc_fill_done = 1; @(negedge clk); rc_fill_done = 0;
    rc_rreq = 4'b0010; rc_rx8[1] = 10'd5; rc_ry[1] = 13'd48;
    do @(posedge clk); while (!rc_rgnt[1]);
    #1 rc_rreq = 0;
    do @(posedge clk); while (!rc_rvalid[1]);
    begin
      bit ok = 1;
      for (int r = 0; r < 16; r++) for (int c = 0; c < 32; c++) if (rc_rd_data[r][c] != wpat[r][c]) ok = 0;
      chk(ok, "cache read returns filled data");
      if (ok) n_slotrd++;
    end

    // memory bus: requester 0 (lowest class) runs low and is boosted
    @(negedge clk); mb_req = 4'b1111; mb_level[0] = 8'd5; repeat (3) @(negedge clk); mb_req = 0;

    repeat (2000) @(negedge clk);
    $display("flat=%0d busy=%0d wme=%0d wctr=%0d mme_flat=%0d mme_busy=%0d skip=%0d agg=%0d small=%0d large=%0d ipd=%0d intra=%0d inter=%0d fillwr=%0d slotrd=%0d boost=%0d pkt=%0d null=%0d stuff=%0d token=%0d",
      n_flat, n_busy, n_wme, n_wctr, n_mme_flat, n_mme_busy, n_skip, n_agg, n_small, n_large, n_ipd,
      n_intra, n_inter, n_fillwr, n_slotrd, n_boost, n_pkt, n_null, n_stuff, n_token);
    chk(n_flat > 0, "flat region");       chk(n_busy > 0, "busy region");
    chk(n_wme > 0, "WME search");         chk(n_wctr > 0, "WME centre update");
    chk(n_mme_flat > 0, "MME flat search"); chk(n_mme_busy > 0, "MME busy search");
    chk(n_skip > 0, "skipped points");    chk(n_agg > 0, "aggregation");
    chk(n_small > 0, "FME smaller set");  chk(n_large > 0, "FME larger set");
    chk(n_ipd > 0, "IPD");                chk(n_intra > 0, "IIM intra");  chk(n_inter > 0, "IIM inter");
    chk(n_fillwr > 0, "cache fill write"); chk(n_slotrd > 0, "cache slot read");
    chk(n_boost > 0, "QoS boost");        chk(n_pkt > 2, "TS packets");
    chk(n_null > 0, "null packets");      chk(n_stuff > 0, "stuffed packet");
    chk(n_token == 1, "token passed after flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
