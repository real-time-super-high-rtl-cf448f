// ipd_select: statistical intra candidate pruning of the intra prediction
// stage (IPD).
//
// The edge-direction histogram of a block is the sum of the histograms of
// its four quarter blocks (the 4x4 histograms come from med_edge), so the
// module adds four input histograms (unused inputs are tied to zero, e.g. a
// single one for a 4x4 block) and passes the sum on for the next block size.
// From the sum it keeps the three most frequent angular directions (lowest
// mode first on equal counts; bins with no votes are not taken), and the
// candidate list is planar, DC and those directions: five of the 35 modes
// instead of all.  cand_num says how many entries of cand are valid (2..5).
// Combinational search, registered one cycle after in_valid.  The pruning
// rule is the document's; the tie rule is this design's choice.
module ipd_select #(
  parameter int unsigned CW = 5      // bin width of the input histograms
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [CW-1:0]   hist_in [4][33],
  output logic            out_valid,
  output logic [CW+1:0]   hist_out [33],
  output logic [5:0]      cand [5],
  output logic [2:0]      cand_num
);
  logic [CW+1:0] sum [33];
  logic [5:0]    c_c [5];
  logic [2:0]    n_c;
  always_comb begin
    logic [32:0] taken;
    for (int b = 0; b < 33; b++)
      sum[b] = (CW+2)'(hist_in[0][b]) + (CW+2)'(hist_in[1][b]) +
               (CW+2)'(hist_in[2][b]) + (CW+2)'(hist_in[3][b]);
    c_c[0] = 6'd0;               // planar
    c_c[1] = 6'd1;               // DC
    c_c[2] = 6'd0; c_c[3] = 6'd0; c_c[4] = 6'd0;
    n_c = 3'd2;
    taken = '0;
    for (int p = 0; p < 3; p++) begin
      int bi;
      logic [CW+1:0] bv;
      bi = -1; bv = '0;
      for (int b = 0; b < 33; b++)
        if (!taken[b] && sum[b] > bv) begin bv = sum[b]; bi = b; end
      if (bi >= 0) begin
        taken[bi] = 1'b1;
        c_c[2 + p] = 6'(bi + 2);
        n_c = n_c + 3'd1;
      end
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; cand_num <= '0;
      for (int b = 0; b < 33; b++) hist_out[b] <= '0;
      for (int i = 0; i < 5; i++) cand[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        hist_out <= sum; cand <= c_c; cand_num <= n_c;
      end
    end
  end
endmodule
