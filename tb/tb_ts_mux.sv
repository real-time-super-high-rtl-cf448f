// tb_ts_mux: two ts_mux chips in a chain (A = first chip, B = master) with
// the token ring closed (A.token_out -> B.token_in, B.token_out ->
// A.token_in).  TB byte sources feed each chip's local video and aux
// streams; the master output is collected packet by packet and checked.
// Concatenation: A's video goes out before B's, B's video is held until
// B has the token, video continuity counters are renumbered 0,1,2,...,
// the master's aux packet passes, idle slots become null packets, the
// token goes round.  Mixture: all packets from both chips arrive and the
// master stamps each PCR with its own 27 MHz count at packet start.
module tb_ts_mux;
  import enc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin #300us; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  localparam int NS = 4, MAXP = 6, VPID = 13'h100, APID = 13'h101;
  // sources: 0 A.loc, 1 A.aux, 2 B.loc, 3 B.aux
  logic [7:0] mem [NS][MAXP*188];
  int np [NS];
  int ptr [NS];
  logic en [NS];
  logic s_valid [NS], s_sop [NS], s_ready [NS];
  logic [7:0] s_data [NS];
  for (genvar s = 0; s < NS; s++) begin : g_src
    assign s_valid[s] = en[s] && ptr[s] < np[s] * 188;
    assign s_data[s]  = mem[s][ptr[s] % (MAXP*188)];
    assign s_sop[s]   = (ptr[s] % 188) == 0;
  end
  always @(posedge clk) if (rst_n) for (int s = 0; s < NS; s++)
    if (s_valid[s] && s_ready[s]) ptr[s] <= ptr[s] + 1;

  task automatic add_pkt(input int s, input logic [12:0] pid, input logic [3:0] cc,
                         input logic [7:0] tag, input bit pcr);
    int b = np[s] * 188;
    mem[s][b] = 8'h47; mem[s][b+1] = {3'b000, pid[12:8]}; mem[s][b+2] = pid[7:0];
    mem[s][b+3] = {2'b00, pcr ? 2'b11 : 2'b01, cc};
    for (int i = 4; i < 188; i++) mem[s][b+i] = tag;
    if (pcr) begin
      mem[s][b+4] = 8'd7; mem[s][b+5] = 8'h10;
      for (int i = 6; i < 12; i++) mem[s][b+i] = 8'h00;
    end
    np[s]++;
  endtask

  logic mode, pcr_tick;
  logic a_tok_out, b_tok_out, a_has, b_has;
  logic a_flushed, b_flushed;
  logic ab_valid, ab_sop, ab_ready;
  logic [7:0] ab_data;
  logic o_valid, o_sop, o_ready;
  logic [7:0] o_data;
  logic a_ext_ready;

  ts_mux u_a (
    .clk, .rst_n, .mode, .master(1'b0), .token_init(1'b1), .video_pid(13'(VPID)), .pcr_tick,
    .ext_valid(1'b0), .ext_data(8'h00), .ext_sop(1'b0), .ext_ready(a_ext_ready),
    .loc_valid(s_valid[0]), .loc_data(s_data[0]), .loc_sop(s_sop[0]), .loc_ready(s_ready[0]),
    .loc_flushed(a_flushed),
    .aux_valid(s_valid[1]), .aux_data(s_data[1]), .aux_sop(s_sop[1]), .aux_ready(s_ready[1]),
    .token_in(b_tok_out), .token_out(a_tok_out), .has_token(a_has),
    .out_valid(ab_valid), .out_data(ab_data), .out_sop(ab_sop), .out_ready(ab_ready));
  ts_mux u_b (
    .clk, .rst_n, .mode, .master(1'b1), .token_init(1'b0), .video_pid(13'(VPID)), .pcr_tick,
    .ext_valid(ab_valid), .ext_data(ab_data), .ext_sop(ab_sop), .ext_ready(ab_ready),
    .loc_valid(s_valid[2]), .loc_data(s_data[2]), .loc_sop(s_sop[2]), .loc_ready(s_ready[2]),
    .loc_flushed(b_flushed),
    .aux_valid(s_valid[3]), .aux_data(s_data[3]), .aux_sop(s_sop[3]), .aux_ready(s_ready[3]),
    .token_in(a_tok_out), .token_out(b_tok_out), .has_token(b_has),
    .out_valid(o_valid), .out_data(o_data), .out_sop(o_sop), .out_ready(o_ready));

  // output collector
  logic [7:0] cur [188];
  int oidx = 0, tcnt = 0, start_t = 0;
  int npk = 0, nnull = 0, nvid = 0, naux = 0, npcr = 0;
  logic [7:0] vid_tag [32];
  logic [3:0] vid_cc [32];
  int vid_t [32];
  int b_first_vid_t = -1;
  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (o_valid && o_ready) begin
      if (oidx == 0) begin
        chk(o_sop && o_data == 8'h47, "sync/sop at packet start");
        start_t = tcnt;
      end
      cur[oidx] = o_data;
      if (oidx == 187) begin
        logic [12:0] pid;
        pid = {cur[1][4:0], cur[2]};
        npk++;
        if (pid == NULL_PID) nnull++;
        else if (pid == APID) naux++;
        else if (pid == VPID) begin
          vid_tag[nvid] = cur[187]; vid_cc[nvid] = cur[3][3:0]; vid_t[nvid] = cyc; nvid++;
          if (cur[3][5] && cur[5][4]) begin
            logic [32:0] base; logic [8:0] ext;
            base = {cur[6], cur[7], cur[8], cur[9], cur[10][7]};
            ext  = {cur[10][0], cur[11]};
            npcr++;
            chk(base == 33'(start_t / 300) && ext == 9'(start_t % 300) && cur[10][6:1] == 6'h3F,
                $sformatf("PCR stamp base=%0d ext=%0d expected count %0d", base, ext, start_t));
          end
        end
        oidx = 0;
      end else oidx++;
    end else if (oidx != 0) chk(1'b0, "gap inside a master output packet");
    if (pcr_tick) tcnt++;
  end
  int a_tok = 0, b_tok = 0;
  always @(posedge clk) if (rst_n) begin
    if (a_tok_out) a_tok++;
    if (b_tok_out) b_tok++;
  end

  initial begin
    mode = 0; pcr_tick = 0; o_ready = 1; a_flushed = 0; b_flushed = 0;
    for (int s = 0; s < NS; s++) begin np[s] = 0; ptr[s] = 0; en[s] = 1; end
    // concatenation: A slice 3 packets, B slice 2 packets, B aux 1 packet
    add_pkt(0, 13'(VPID), 4'd0, 8'hA0, 0);
    add_pkt(0, 13'(VPID), 4'd1, 8'hA1, 0);
    add_pkt(0, 13'(VPID), 4'd2, 8'hA2, 0);
    add_pkt(2, 13'(VPID), 4'd0, 8'hB0, 0);
    add_pkt(2, 13'(VPID), 4'd1, 8'hB1, 0);
    add_pkt(3, 13'(APID), 4'd0, 8'hC0, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // A finishes its slice
    wait (ptr[0] == 3*188);
    repeat (5) @(negedge clk);
    chk(a_has && !b_has, "A holds token while sending");
    chk(ptr[2] == 0, "B video held back in TS-through state");
    a_flushed = 1; @(negedge clk); a_flushed = 0;
    repeat (2) @(negedge clk);
    chk(!a_has && b_has, "token passed A -> B");
    wait (ptr[2] == 2*188);
    repeat (200) @(negedge clk);
    b_flushed = 1; @(negedge clk); b_flushed = 0;
    repeat (2) @(negedge clk);
    chk(a_has && !b_has, "token returned B -> A");
    repeat (400) @(negedge clk);
    chk(nvid == 5, $sformatf("five video packets out (%0d)", nvid));
    chk(vid_tag[0] == 8'hA0 && vid_tag[1] == 8'hA1 && vid_tag[2] == 8'hA2 &&
        vid_tag[3] == 8'hB0 && vid_tag[4] == 8'hB1, "slice order A then B");
    for (int i = 0; i < 5; i++) chk(vid_cc[i] == 4'(i), $sformatf("renumbered CC %0d = %0d", i, vid_cc[i]));
    chk(naux == 1, "master aux packet out");
    chk(nnull > 0, "null packets fill idle slots");
    chk(a_tok == 1 && b_tok == 1, "one token pass each way");
    $display("concatenation: packets=%0d video=%0d null=%0d aux=%0d", npk, nvid, nnull, naux);

    // mixture: reset, PCR-bearing packets from both chips, ticks every cycle
    rst_n = 0; mode = 1;
    for (int s = 0; s < NS; s++) begin np[s] = 0; ptr[s] = 0; end
    nvid = 0; nnull = 0; naux = 0; npk = 0; npcr = 0; oidx = 0; tcnt = 0;
    add_pkt(0, 13'(VPID), 4'd0, 8'hA0, 1);
    add_pkt(0, 13'(VPID), 4'd1, 8'hA1, 0);
    add_pkt(0, 13'(VPID), 4'd2, 8'hA2, 1);
    add_pkt(1, 13'(APID), 4'd0, 8'hD0, 0);
    add_pkt(2, 13'(VPID), 4'd0, 8'hB0, 1);
    add_pkt(2, 13'(VPID), 4'd1, 8'hB1, 0);
    add_pkt(3, 13'(APID), 4'd0, 8'hC0, 0);
    repeat (3) @(negedge clk);
    rst_n = 1; pcr_tick = 1;
    repeat (3000) @(negedge clk);
    chk(nvid == 5, $sformatf("mixture: all video packets out (%0d)", nvid));
    chk(naux == 2, "mixture: aux packets of both chips out");
    chk(npcr == 3, $sformatf("mixture: three PCRs stamped (%0d)", npcr));
    chk(nnull > 0, "mixture: null packets");
    $display("mixture: packets=%0d video=%0d null=%0d aux=%0d pcr=%0d", npk, nvid, nnull, naux, npcr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
