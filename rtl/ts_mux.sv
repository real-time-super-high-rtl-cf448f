// ts_mux: scheduler of the distributed transport stream multiplexer, one per
// encoder chip; chips are daisy-chained through their TS ports (ext_* in
// from the previous chip, out_* to the next) and, in concatenation mode, a
// token ring (token_in from the previous chip, token_out to the next).
//
// The scheduler works packet by packet: at a packet boundary it picks a
// source that presents the first byte of a packet and forwards all 188
// bytes of it.  Sources: ext (previous chip), loc (this chip's video TS from
// ts_packetizer) and aux (this chip's audio, user data, PSI and PCR packets,
// already packetised).
//
// Concatenation mode (mode=0), for one picture split into horizontal slices:
//  * a chip is in "TS through" state and relays ext packets, until it gets
//    the token; then it is in "local output" state and also sends its own
//    video packets.  When its packetizer reports the picture flushed
//    (loc_flushed), it passes the token on and returns to TS through.
//    Local video is held back while the chip is in TS through.
//  * the master (last chip of the chain) additionally sends aux packets
//    first, fills idle packet slots with null packets, and renumbers the
//    continuity counter of every video_pid packet it outputs, since the
//    chips' counters are independent.
// Mixture mode (mode=1), for several programmes or views: every chip
// relays ext packets and sends its own loc and aux packets whenever they
// arrive (round-robin between the three at packet boundaries); the master
// fills idle slots with null packets and stamps the PCR of every packet
// carrying one with its own clock (pcr_tick = 27 MHz tick), removing the
// jitter accumulated on the way.
//
// Byte-wide valid/ready streams with a start-of-packet flag.  token_init
// gives the token to this chip at reset.  States, token passing, CC
// renumbering, null insertion and PCR stamping follow the document; the
// source priorities and the byte-level handshake are this design's choice.
module ts_mux
  import enc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mode,          // 0 concatenation, 1 mixture
  input  logic        master,
  input  logic        token_init,
  input  logic [12:0] video_pid,
  input  logic        pcr_tick,
  // previous chip
  input  logic        ext_valid,
  input  logic [7:0]  ext_data,
  input  logic        ext_sop,
  output logic        ext_ready,
  // local video TS
  input  logic        loc_valid,
  input  logic [7:0]  loc_data,
  input  logic        loc_sop,
  output logic        loc_ready,
  input  logic        loc_flushed,
  // local audio / user data / PSI / PCR TS
  input  logic        aux_valid,
  input  logic [7:0]  aux_data,
  input  logic        aux_sop,
  output logic        aux_ready,
  // token ring
  input  logic        token_in,
  output logic        token_out,
  output logic        has_token,
  // next chip / final output
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic        out_sop,
  input  logic        out_ready
);
  typedef enum logic [2:0] {S_NONE, S_EXT, S_LOC, S_AUX, S_NULL} src_e;

  src_e       src;
  logic [7:0] idx;
  logic [1:0] rr;                 // mixture round-robin pointer
  logic [3:0] vcc;                // master's video continuity counter
  logic [7:0] hdr1, hdr3, afl;    // bytes seen of the current packet
  logic [12:0] cur_pid;
  logic [8:0]  pcr_ext;
  logic [32:0] pcr_base;
  logic [8:0]  st_ext;            // PCR latched at packet start
  logic [32:0] st_base;
  logic [7:0]  afflags;
  logic        pcr_flag;
  assign pcr_flag = afflags[4];

  // ---- choice at a packet boundary
  logic ext_rdy, loc_rdy, aux_rdy;
  logic [1:0] c;
  src_e pick;
  always_comb begin
    ext_rdy = ext_valid && ext_sop;
    loc_rdy = loc_valid && loc_sop && (mode || has_token);
    aux_rdy = aux_valid && aux_sop && (mode || master);
    pick = S_NONE;
    c = '0;
    if (!mode) begin
      if (aux_rdy)      pick = S_AUX;
      else if (ext_rdy) pick = S_EXT;
      else if (loc_rdy) pick = S_LOC;
    end else begin
      for (int n = 2; n >= 0; n--) begin
        c = 2'((int'(rr) + n) % 3);
        if (c == 0 && ext_rdy) pick = S_EXT;
        if (c == 1 && loc_rdy) pick = S_LOC;
        if (c == 2 && aux_rdy) pick = S_AUX;
      end
    end
    if (pick == S_NONE && master) pick = S_NULL;
  end

  // ---- byte path
  src_e cur;
  logic [7:0] raw;
  logic       raw_valid;
  always_comb begin
    cur = (src == S_NONE) ? pick : src;
    raw = 8'h00; raw_valid = 1'b0;
    case (cur)
      S_EXT:  begin raw = ext_data; raw_valid = ext_valid; end
      S_LOC:  begin raw = loc_data; raw_valid = loc_valid; end
      S_AUX:  begin raw = aux_data; raw_valid = aux_valid; end
      S_NULL: begin
        raw_valid = 1'b1;
        case (idx)
          8'd0: raw = TS_SYNC;
          8'd1: raw = {3'b000, NULL_PID[12:8]};
          8'd2: raw = NULL_PID[7:0];
          8'd3: raw = 8'h10;
          default: raw = 8'hFF;
        endcase
      end
      default: ;
    endcase
    out_valid = raw_valid && cur != S_NONE;
    out_sop   = out_valid && idx == 0;
    out_data  = raw;
    // final-stage rewriting at the master
    if (master && cur != S_NULL) begin
      if (!mode && idx == 3 && cur_pid == video_pid && raw[4])
        out_data = {raw[7:4], vcc};
      if (mode && hdr3[5] && afl >= 8'd7 && idx >= 8'd6 && idx <= 8'd11 && pcr_flag) begin
        case (idx)
          8'd6:  out_data = st_base[32:25];
          8'd7:  out_data = st_base[24:17];
          8'd8:  out_data = st_base[16:9];
          8'd9:  out_data = st_base[8:1];
          8'd10: out_data = {st_base[0], 6'b111111, st_ext[8]};
          default: out_data = st_ext[7:0];
        endcase
      end
    end
    ext_ready = out_ready && cur == S_EXT;
    loc_ready = out_ready && cur == S_LOC;
    aux_ready = out_ready && cur == S_AUX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src <= S_NONE; idx <= '0; rr <= '0; vcc <= '0;
      hdr1 <= '0; hdr3 <= '0; afl <= '0; afflags <= '0; cur_pid <= '0;
      pcr_ext <= '0; pcr_base <= '0; st_ext <= '0; st_base <= '0;
      has_token <= token_init; token_out <= 1'b0;
    end else begin
      token_out <= 1'b0;
      // programme clock of the master
      if (pcr_tick) begin
        if (pcr_ext == 9'd299) begin pcr_ext <= '0; pcr_base <= pcr_base + 1'b1; end
        else pcr_ext <= pcr_ext + 1'b1;
      end
      // token ring (concatenation mode)
      if (!mode) begin
        if (token_in) has_token <= 1'b1;
        if (has_token && loc_flushed) begin
          has_token <= 1'b0;
          token_out <= 1'b1;
        end
      end
      if (out_valid && out_ready) begin
        if (idx == 0) begin
          src <= cur;
          st_ext <= pcr_ext; st_base <= pcr_base;
          if (mode) case (cur)
            S_EXT: rr <= 2'd1;
            S_LOC: rr <= 2'd2;
            S_AUX: rr <= 2'd0;
            default: ;
          endcase
        end
        if (idx == 1) hdr1 <= out_data;
        if (idx == 2) cur_pid <= {hdr1[4:0], out_data};
        if (idx == 3) hdr3 <= out_data;
        if (idx == 4) afl <= out_data;
        if (idx == 5) afflags <= out_data;
        if (idx == 8'd187) begin
          idx <= '0;
          src <= S_NONE;
          afflags <= '0; hdr3 <= '0; afl <= '0;
          if (master && !mode && cur != S_NULL && cur_pid == video_pid && hdr3[4]) vcc <= vcc + 1'b1;
        end else idx <= idx + 1'b1;
      end
    end
  end
endmodule
