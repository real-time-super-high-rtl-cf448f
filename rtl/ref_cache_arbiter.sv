// ref_cache_arbiter: port control of a reference picture image cache.
//
// The cache SRAMs have a single port, shared by the write path that brings
// reference fragments from external memory and by the read requests of the
// motion estimation engines and motion compensation (NREQ requesters).
// Two regimes:
//  * fill: from pic_start until fill_done the write path owns the port
//    whenever it has data, so the cache is filled quickly at the start of a
//    picture; reads only use cycles the writer leaves idle;
//  * time slots: afterwards cycles are numbered modulo SLOTS; slot 0 is the
//    write slot (given to a read if no write is pending), the other slots go
//    to the read requesters in round-robin order (given to a pending write
//    if no read is pending).
// One grant per cycle; the granted address is driven to the cache in the
// same cycle and rvalid[i] marks the cycle the cache's data belong to
// requester i.  The two regimes follow the document; the slot frame, its
// length and the round-robin order are this design's choice.
module ref_cache_arbiter #(
  parameter int unsigned NREQ  = 4,
  parameter int unsigned SLOTS = 8,
  parameter int unsigned XW    = 10,
  parameter int unsigned YW    = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pic_start,
  input  logic              fill_done,
  output logic              fill_mode,
  // read requesters
  input  logic [NREQ-1:0]   rreq,
  input  logic [XW-1:0]     rx8 [NREQ],
  input  logic [YW-1:0]     ry  [NREQ],
  output logic [NREQ-1:0]   rgnt,
  output logic [NREQ-1:0]   rvalid,
  // write path
  input  logic              wreq,
  input  logic [XW-1:0]     wx8,
  input  logic [YW-1:0]     wy,
  output logic              wgnt,
  // cache port
  output logic              c_rd_en,
  output logic [XW-1:0]     c_rd_x8,
  output logic [YW-1:0]     c_rd_y,
  output logic              c_wr_en,
  output logic [XW-1:0]     c_wr_x8,
  output logic [YW-1:0]     c_wr_y
);
  logic [$clog2(SLOTS)-1:0] slot;
  logic [$clog2(NREQ)-1:0]  rr;        // requester with highest priority next
  logic                     give_w;
  logic                     any_r;
  int                       pick;

  always_comb begin
    any_r = |rreq;
    pick  = 0;
    for (int n = NREQ - 1; n >= 0; n--) begin
      int c;
      c = (int'(rr) + n) % NREQ;
      if (rreq[c]) pick = c;
    end
    if (fill_mode)      give_w = wreq;
    else if (slot == 0) give_w = wreq;
    else                give_w = wreq && !any_r;
    rgnt = '0;
    if (!give_w && any_r) rgnt[pick] = 1'b1;
    wgnt    = give_w;
    c_wr_en = give_w;
    c_wr_x8 = wx8;
    c_wr_y  = wy;
    c_rd_en = !give_w && any_r;
    c_rd_x8 = rx8[pick];
    c_rd_y  = ry[pick];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot <= '0; rr <= '0; fill_mode <= 1'b0; rvalid <= '0;
    end else begin
      rvalid <= rgnt;
      slot <= (int'(slot) == SLOTS - 1) ? '0 : slot + 1'b1;
      if (pic_start) fill_mode <= 1'b1;
      else if (fill_done) fill_mode <= 1'b0;
      if (|rgnt) rr <= ($clog2(NREQ))'((pick + 1) % NREQ);
    end
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0({rgnt, wgnt}))
    else $error("ref_cache_arbiter: more than one grant");
endmodule
