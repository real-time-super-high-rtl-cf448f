// Testbench for ts_packetizer: pictures of one or two PES packets with random
// lengths and a back-pressured output; a TS parser in the testbench checks
// sync, PID, payload_unit_start, continuity counters and stuffing, rebuilds
// the payload and compares it with what was sent, and checks one flushed
// pulse per picture after its last packet.
module tb_ts_packetizer;
  logic clk = 0, rst_n = 0;
  logic [12:0] pid = 13'h0101;
  logic in_valid, in_pes_start, in_ready, eop, out_valid, out_sop, out_ready, flushed;
  logic [7:0] in_data, out_data;
  int checks = 0, failures = 0, nflush = 0, nstuffed = 0;
  byte sent [$]; byte got [$]; bit starts [$];
  ts_packetizer dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // parser
  logic [7:0] pkt [188]; int pi = 0; int exp_cc = 0;
  always @(posedge clk) if (rst_n) begin
    if (flushed) nflush++;
    if (out_valid && out_ready) begin
      if ((pi == 0) != out_sop) begin failures++; $display("FAIL sop"); end
      pkt[pi] = out_data; pi++;
      if (pi == 188) begin
        int afc, start, l;
        pi = 0; checks++;
        afc = (pkt[3] >> 4) & 3;
        if (pkt[0] != 8'h47 || {pkt[1][4:0], pkt[2]} != pid || (pkt[3] & 15) != exp_cc || !(afc == 1 || afc == 3)) begin
          failures++; $display("FAIL header %h %h %h %h", pkt[0], pkt[1], pkt[2], pkt[3]); end
        exp_cc = (exp_cc + 1) % 16;
        start = 4;
        if (afc == 3) begin
          l = pkt[4]; start = 5 + l; nstuffed++;
          for (int i = 6; i < 5 + l; i++) if (pkt[i] != 8'hFF) begin failures++; $display("FAIL stuffing"); break; end
        end
        if (pkt[1][6]) starts.push_back(1); else starts.push_back(0);
        for (int i = start; i < 188; i++) got.push_back(pkt[i]);
      end
    end
  end
  always @(negedge clk) out_ready = ($urandom % 5) != 0;

  task automatic pes(int len);
    for (int i = 0; i < len; i++) begin
      @(negedge clk); in_valid = 1; in_data = 8'($urandom); in_pes_start = (i == 0);
      do @(posedge clk); while (!in_ready);
      sent.push_back(in_data);
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    int pics = 0;
    in_valid = 0; in_pes_start = 0; eop = 0; in_data = 0; out_ready = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 12; p++) begin
      int len;
      len = (p == 3) ? 368 : (p == 5 ? 184 : 1 + $urandom % 700);
      pes(len);
      if (p % 4 == 1) pes(50 + $urandom % 100);
      @(negedge clk); eop = 1; @(negedge clk); eop = 0;
      pics++;
      repeat (400) @(negedge clk);
    end
    checks += 3;
    if (got.size() != sent.size()) begin failures++; $display("FAIL payload size %0d vs %0d", got.size(), sent.size()); foreach (sent[i]) if (got[i] != sent[i]) begin $display("first diff %0d: %h %h %h %h / %h %h %h %h", i, got[0],got[1],got[2],got[3],sent[0],sent[1],sent[2],sent[3]); break; end end
    else foreach (sent[i]) if (got[i] != sent[i]) begin failures++; $display("FAIL payload byte %0d", i); break; end
    if (nflush != pics) begin failures++; $display("FAIL flushed %0d of %0d", nflush, pics); end
    if (nstuffed == 0) begin failures++; $display("FAIL no stuffed packet"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
