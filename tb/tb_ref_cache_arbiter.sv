// Testbench for ref_cache_arbiter: random read and write requests in fill
// mode and in slot mode; a cycle model checks every grant, the cache port
// signals, round-robin fairness and the read-data return cycle, and counts
// writes winning the write slot against pending reads.
module tb_ref_cache_arbiter;
  localparam int NREQ = 4, SLOTS = 8;
  logic clk = 0, rst_n = 0;
  logic pic_start, fill_done, fill_mode, wreq, wgnt;
  logic [NREQ-1:0] rreq, rgnt, rvalid;
  logic [9:0] rx8 [NREQ]; logic [12:0] ry [NREQ];
  logic [9:0] wx8, c_rd_x8, c_wr_x8; logic [12:0] wy, c_rd_y, c_wr_y;
  logic c_rd_en, c_wr_en;
  int checks = 0, failures = 0, slotw = 0, fillw_vs_r = 0;
  int slot = 1, rr = 0; bit fm = 0; logic [NREQ-1:0] prev_g = 0;
  ref_cache_arbiter #(.NREQ(NREQ), .SLOTS(SLOTS)) dut (.*);
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    pic_start = 0; fill_done = 0; wreq = 0; rreq = 0; wx8 = 0; wy = 0;
    for (int i = 0; i < NREQ; i++) begin rx8[i] = 0; ry[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit ew; int ep; logic [NREQ-1:0] eg;
      @(negedge clk);
      pic_start = (cyc % 1000 == 10); fill_done = (cyc % 1000 == 200);
      wreq = ($urandom % 3) != 0; wx8 = 10'($urandom); wy = 13'($urandom);
      for (int i = 0; i < NREQ; i++) begin
        rreq[i] = ($urandom % 2); rx8[i] = 10'($urandom); ry[i] = 13'($urandom);
      end
      #1;
      // model
      if (fm || slot == 0) ew = wreq; else ew = wreq && (rreq == 0);
      eg = 0; ep = 0;
      if (!ew && rreq != 0) begin
        for (int n = NREQ - 1; n >= 0; n--) if (rreq[(rr + n) % NREQ]) ep = (rr + n) % NREQ;
        eg[ep] = 1;
      end
      checks++;
      if (wgnt != ew || rgnt != eg || c_wr_en != ew || c_rd_en != (eg != 0) ||
          (ew && (c_wr_x8 != wx8 || c_wr_y != wy)) || (eg != 0 && (c_rd_x8 != rx8[ep] || c_rd_y != ry[ep])) ||
          rvalid != prev_g || fill_mode != fm) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d wgnt %0d/%0d rgnt %b/%b fm %0d", cyc, wgnt, ew, rgnt, eg, fm);
      end
      if (!fm && slot == 0 && ew && rreq != 0) slotw++;
      if (fm && ew && rreq != 0) fillw_vs_r++;
      @(posedge clk);
      prev_g = eg;
      if (eg != 0) rr = (ep + 1) % NREQ;
      slot = (slot + 1) % SLOTS;
      if (pic_start) fm = 1; else if (fill_done) fm = 0;
    end
    checks++;
    if (slotw == 0 || fillw_vs_r == 0) begin failures++; $display("FAIL coverage %0d %0d", slotw, fillw_vs_r); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
