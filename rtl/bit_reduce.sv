// bit_reduce: bit extraction applied when pictures are loaded into the
// internal buffers of the bit-reduced motion estimation engines.
//
// The SAD engines work on B = M - RED bits per sample, RED = k + x being fixed
// when the engine is built (4 for the 8-bit engines, halving the width).
// For a non-flat block the MSB-side B bits are kept: pix >> RED.  For a flat
// block the upper k bits are identical across the region and held once as the
// shared value A, the lowest x bits are dropped for good, and the B bits in
// between are kept: (pix >> x) mod 2^B.  k is chosen per sequence (x = RED-k).
// Purely combinational.  The two extraction patterns follow the document.
module bit_reduce #(
  parameter int unsigned M   = 8,
  parameter int unsigned RED = 4,
  parameter int unsigned B   = M - RED
) (
  input  logic [M-1:0]               pix,
  input  logic                       flat,
  input  logic [$clog2(RED+1)-1:0]   k,
  output logic [B-1:0]               red
);
  logic [$clog2(RED+1)-1:0] xsh;
  always_comb begin
    xsh = ($bits(xsh))'(RED) - k;
    if (flat) red = B'(pix >> xsh);
    else      red = B'(pix >> RED);
  end
endmodule
