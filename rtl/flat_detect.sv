// flat_detect: flat-region detector of the image feature extraction stage.
//
// An N x N luma region is "flat" when the upper k bits of every sample in it
// are identical; the common upper-k value is the region's shared value A.
// Samples arrive one per cycle in raster order.  For every region column the
// module keeps the first upper-k value seen in the current band of N rows
// and a running "all equal" flag, so the state is one entry per region
// column.  When the last sample of a region goes by, the verdict is emitted
// for one cycle together with the region coordinates.  Regions cut by the
// right or bottom picture edge are judged on the samples they contain.
//
// Interface: pix_valid/pix/sof (start of frame, with the first sample);
// k selects how many upper bits are compared (1..KMAX, set per sequence by
// software).  Outputs are registered: reg_valid is high one cycle after the
// region's last sample.  The flatness rule, N = 64 and M = 8 follow the
// document; the raster streaming order and the edge handling are this
// design's choice.
module flat_detect
  import enc_pkg::*;
#(
  parameter int unsigned M     = 8,     // bits per luma sample
  parameter int unsigned N     = 64,    // region size
  parameter int unsigned KMAX  = 4,     // largest k supported
  parameter int unsigned PIC_W = 3840,
  parameter int unsigned PIC_H = 2160
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(KMAX+1)-1:0]     k,
  input  logic                          pix_valid,
  input  logic                          sof,
  input  logic [M-1:0]                  pix,
  output logic                          reg_valid,
  output logic [$clog2((PIC_W+N-1)/N)-1:0] reg_x,
  output logic [$clog2((PIC_H+N-1)/N)-1:0] reg_y,
  output logic                          reg_flat,
  output logic [KMAX-1:0]               reg_a       // shared value A, right-aligned
);
  localparam int unsigned RX = (PIC_W + N - 1) / N;
  localparam int unsigned RY = (PIC_H + N - 1) / N;

  logic [$clog2(PIC_W)-1:0] x;
  logic [$clog2(PIC_H)-1:0] y;
  logic [KMAX-1:0] a_mem  [RX];
  logic            eq_mem [RX];

  logic [$clog2(PIC_W)-1:0] cx;
  logic [$clog2(PIC_H)-1:0] cy;
  logic [KMAX-1:0] upper;
  logic [$clog2(RX)-1:0] rcol;
  logic first_in_region, last_in_region, eq_now;

  always_comb begin
    cx = sof ? '0 : x;
    cy = sof ? '0 : y;
    upper = KMAX'(pix >> (M - int'(k)));
    rcol  = ($clog2(RX))'(cx / N);
    first_in_region = (cx % N == 0) && (cy % N == 0);
    last_in_region  = ((cx % N == N-1) || (cx == PIC_W-1)) &&
                      ((cy % N == N-1) || (cy == PIC_H-1));
    eq_now = first_in_region ? 1'b1 : (eq_mem[rcol] && (a_mem[rcol] == upper));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0;
      y <= '0;
      reg_valid <= 1'b0;
      reg_x <= '0;
      reg_y <= '0;
      reg_flat <= 1'b0;
      reg_a <= '0;
      for (int i = 0; i < RX; i++) begin
        a_mem[i]  <= '0;
        eq_mem[i] <= 1'b0;
      end
    end else begin
      reg_valid <= 1'b0;
      if (pix_valid) begin
        if (first_in_region) a_mem[rcol] <= upper;
        eq_mem[rcol] <= eq_now;
        if (last_in_region) begin
          reg_valid <= 1'b1;
          reg_x     <= ($bits(reg_x))'(cx / N);
          reg_y     <= ($bits(reg_y))'(cy / N);
          reg_flat  <= eq_now;
          reg_a     <= first_in_region ? upper : a_mem[rcol];
        end
        if (cx == PIC_W-1) begin
          x <= '0;
          y <= (cy == PIC_H-1) ? '0 : cy + 1'b1;
        end else begin
          x <= cx + 1'b1;
          y <= cy;
        end
      end
    end
  end
endmodule
