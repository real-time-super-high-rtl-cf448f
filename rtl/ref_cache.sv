// ref_cache: one 52 Mbit reference picture image cache.
//
// 64 single-port SRAMs of 80 bits x 10240 words hold 10-bit reference
// samples, eight horizontally adjacent samples (a "segment") per word.  The
// segment at segment column sx (= x/8) and row y lives in bank
// (sx mod 4) + 4*(y mod 16), so any 32x16 region whose x is a multiple of 8
// touches every bank exactly once and is read in one cycle as a 5120-bit
// word.  Inside a bank the word address is
//    ((y/16) mod TILE_ROWS) * TILES_X + sx/4,
// TILES_X being the picture width in 32-sample tiles (120 for 4K, 240 for
// 8K): the cache holds a band of TILE_ROWS*16 picture rows that slides down
// the reference picture as rows are replaced.  Writes use the same region
// format and mapping.  The port is single: a read and a write in the same
// cycle are not allowed (ref_cache_arbiter schedules them; an assertion
// checks it).
//
// Timing: rd_data valid one cycle after rd_en (rd_valid).  Row-major region
// layout: rd_data[j][i] is sample (x8*8 + i, y + j).  Bank count, word size,
// depth and the one-cycle 32x16 access follow the document; the address
// formula and the band organisation are this design's choice.
// rst_n also appears in the disable-iff clause of ref_cache's single-port
// assertion; that is a check, not logic, so a lint note that rst_n is
// used both synchronously and asynchronously stands: all flops reset
// asynchronously.
module ref_cache #(
  parameter int unsigned PIXW    = 10,
  parameter int unsigned DEPTH   = 10240,
  parameter int unsigned TILES_X = 120,
  parameter int unsigned XW      = 10,      // segment column width (x/8)
  parameter int unsigned YW      = 13
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rd_en,
  input  logic [XW-1:0]   rd_x8,
  input  logic [YW-1:0]   rd_y,
  output logic            rd_valid,
  output logic [PIXW-1:0] rd_data [16][32],
  input  logic            wr_en,
  input  logic [XW-1:0]   wr_x8,
  input  logic [YW-1:0]   wr_y,
  input  logic [PIXW-1:0] wr_data [16][32]
);
  localparam int unsigned TILE_ROWS = DEPTH / TILES_X;
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned WW = 8 * PIXW;

  logic [AW-1:0] addr  [64];
  logic [WW-1:0] wdata [64];
  logic [WW-1:0] rdata [64];
  logic [1:0]    ri_q  [64];
  logic [3:0]    rj_q  [64];
  logic [1:0]    bi    [64];
  logic [3:0]    bj    [64];

  always_comb begin
    logic [XW-1:0] x8;
    logic [YW-1:0] y;
    x8 = wr_en ? wr_x8 : rd_x8;
    y  = wr_en ? wr_y  : rd_y;
    for (int b = 0; b < 64; b++) begin
      logic [XW-1:0] sx;
      logic [YW-1:0] yy;
      bi[b] = 2'(b % 4) - x8[1:0];          // region column of this bank
      bj[b] = 4'(b / 4) - y[3:0];           // region row of this bank
      sx = x8 + XW'(bi[b]);
      yy = y + YW'(bj[b]);
      addr[b] = AW'(((int'(yy) / 16) % TILE_ROWS) * TILES_X + int'(sx) / 4);
      for (int p = 0; p < 8; p++)
        wdata[b][p*PIXW +: PIXW] = wr_data[bj[b]][8*bi[b] + p];
    end
  end

  for (genvar b = 0; b < 64; b++) begin : g_bank
    sram_sp #(.W(WW), .DEPTH(DEPTH)) u_sram (
      .clk(clk), .en(rd_en || wr_en), .we(wr_en), .addr(addr[b]),
      .wdata(wdata[b]), .rdata(rdata[b]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      for (int b = 0; b < 64; b++) begin ri_q[b] <= '0; rj_q[b] <= '0; end
    end else begin
      rd_valid <= rd_en && !wr_en;
      if (rd_en && !wr_en) begin
        ri_q <= bi;
        rj_q <= bj;
      end
    end
  end

  always_comb begin
    for (int j = 0; j < 16; j++)
      for (int i = 0; i < 32; i++) rd_data[j][i] = '0;
    for (int b = 0; b < 64; b++)
      for (int p = 0; p < 8; p++)
        rd_data[rj_q[b]][8*ri_q[b] + p] = rdata[b][p*PIXW +: PIXW];
  end

  a_single_port: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && wr_en))
    else $error("ref_cache: read and write in the same cycle");
endmodule
