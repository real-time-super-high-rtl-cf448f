// ts_packetizer: video path of the built-in multiplexer; cuts the video PES
// into 188-byte MPEG-2 transport stream packets.
//
// PES bytes are collected into a 184-byte payload buffer; a full buffer is
// sent as a packet with a 4-byte header (sync 0x47, PID, continuity counter
// incremented per packet).  A packet whose payload starts a PES has
// payload_unit_start set; when a new PES begins while the buffer is
// partly filled, the partial packet is sent first, so a PES always starts a
// packet.  At the end of a picture (eop, after its last byte) the remaining
// bytes are flushed in a last packet padded with an adaptation field of
// stuffing bytes (length 183-n for n payload bytes), and flushed pulses once
// the packet has left; with an empty buffer flushed pulses right away.  It
// is this flush, costing on average half a payload per chip and picture, that
// lets the next chip take over the stream at a packet boundary.
//
// Streams are byte-wide valid/ready; out_sop marks byte 0 of a packet, and
// a packet is sent without gaps of its own (the input is held meanwhile).
// Flush-with-padding at end of picture follows the document; the buffer
// organisation and the PES alignment rule are this design's choice.
module ts_packetizer
  import enc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [12:0] pid,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  input  logic        in_pes_start,
  output logic        in_ready,
  input  logic        eop,
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic        out_sop,
  input  logic        out_ready,
  output logic        flushed
);
  logic [7:0] buf_q [184];
  logic [7:0] cnt;            // payload bytes in buffer
  logic       pusi;           // buffer starts with a PES start
  logic       sending;
  logic       stuff;
  logic [7:0] idx;            // byte of the packet being sent
  logic [3:0] cc;
  logic       eop_pend;
  logic       flush_pkt;

  logic [7:0] hdr_len;
  logic [7:0] l_af;
  always_comb begin
    hdr_len = 8'd188 - cnt;
    l_af    = 8'd183 - cnt;
    in_ready = !sending && !eop_pend && cnt < 8'd184 && !(in_pes_start && cnt != 0);
    out_valid = sending;
    out_sop   = sending && idx == 0;
    if (idx == 0)            out_data = TS_SYNC;
    else if (idx == 1)       out_data = {1'b0, pusi, 1'b0, pid[12:8]};
    else if (idx == 2)       out_data = pid[7:0];
    else if (idx == 3)       out_data = {2'b00, stuff, 1'b1, cc};
    else if (idx < hdr_len) begin
      if (idx == 4)          out_data = l_af;
      else if (idx == 5)     out_data = 8'h00;      // adaptation flags
      else                   out_data = 8'hFF;      // stuffing
    end else                 out_data = buf_q[idx - hdr_len];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 184; i++) buf_q[i] <= '0;
      cnt <= '0; pusi <= 1'b0; sending <= 1'b0; stuff <= 1'b0; idx <= '0; cc <= '0;
      eop_pend <= 1'b0; flush_pkt <= 1'b0; flushed <= 1'b0;
    end else begin
      flushed <= 1'b0;
      if (eop) eop_pend <= 1'b1;
      if (!sending) begin
        if (in_valid && in_ready) begin
          buf_q[cnt] <= in_data;
          if (cnt == 0) pusi <= in_pes_start;
          cnt <= cnt + 1'b1;
        end else if (cnt == 8'd184) begin
          sending <= 1'b1; stuff <= 1'b0; idx <= '0; flush_pkt <= 1'b0;
        end else if (cnt != 0 && (eop_pend || (in_valid && in_pes_start))) begin
          sending <= 1'b1; stuff <= 1'b1; idx <= '0; flush_pkt <= eop_pend;
        end else if (cnt == 0 && eop_pend) begin
          eop_pend <= 1'b0; flushed <= 1'b1;
        end
      end else if (out_ready) begin
        if (idx == 8'd187) begin
          sending <= 1'b0;
          cnt <= '0;
          cc <= cc + 1'b1;
          if (flush_pkt) begin
            flushed <= 1'b1; eop_pend <= 1'b0; flush_pkt <= 1'b0;
          end
        end else idx <= idx + 1'b1;
      end
    end
  end
endmodule
