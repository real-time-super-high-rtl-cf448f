// fme_combo_select: choice of the block-size set for fractional ME.
//
// The FME has three engines, so per CTU it refines either the smaller set
// (8x8, 16x16, 32x32) or the larger set (16x16, 32x32, 64x64).  The MME's
// best costs of every block of the CTU are streamed in (cost_valid, size:
// 0=8x8, 1=16x16, 2=32x32, 3=64x64) and summed per size; at ctu_end the sums
// of the two sets are compared and the set with the lower total is chosen
// (the smaller set on a tie).  Result one cycle after ctu_end; the
// accumulators restart for the next CTU.  The rule is the document's; the
// streaming interface and the tie rule are this design's.
module fme_combo_select
  import enc_pkg::*;
#(
  parameter int unsigned SUMW = COSTW + 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cost_valid,
  input  logic [1:0]       size,
  input  cost_t            cost,
  input  logic             ctu_end,
  output logic             sel_valid,
  output logic             sel_large,
  output logic [SUMW+1:0]  sum_small,
  output logic [SUMW+1:0]  sum_large
);
  logic [SUMW-1:0] acc [4];
  logic [SUMW-1:0] nxt [4];
  always_comb begin
    for (int s = 0; s < 4; s++)
      nxt[s] = acc[s] + ((cost_valid && size == 2'(s)) ? SUMW'(cost) : '0);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 4; s++) acc[s] <= '0;
      sel_valid <= 1'b0; sel_large <= 1'b0; sum_small <= '0; sum_large <= '0;
    end else begin
      sel_valid <= 1'b0;
      if (ctu_end) begin
        logic [SUMW+1:0] ss, sl;
        ss = (SUMW+2)'(nxt[0]) + (SUMW+2)'(nxt[1]) + (SUMW+2)'(nxt[2]);
        sl = (SUMW+2)'(nxt[1]) + (SUMW+2)'(nxt[2]) + (SUMW+2)'(nxt[3]);
        sum_small <= ss;
        sum_large <= sl;
        sel_large <= sl < ss;
        sel_valid <= 1'b1;
        for (int s = 0; s < 4; s++) acc[s] <= '0;
      end else begin
        acc <= nxt;
      end
    end
  end
endmodule
