// enc_pkg: types, constants and small helper functions shared by the
// prediction core, reference cache and transport-stream multiplexer.
//
// Motion vectors are carried as a pair of signed 12-bit components in the
// units of the engine that produced them.  The bit cost of a motion vector
// difference is estimated as the length of a signed Exp-Golomb code per
// component (the design's own estimate; the cost formula
// Cost = SAD + lambda * BitCost is the one the encoder uses throughout).
package enc_pkg;

  localparam int unsigned MVW = 12;          // motion vector component width
  typedef logic signed [MVW-1:0] mvc_t;

  typedef struct packed {
    mvc_t x;
    mvc_t y;
  } mv_t;

  localparam int unsigned COSTW = 24;        // width of rate-distortion costs
  typedef logic [COSTW-1:0] cost_t;

  // MPEG-2 transport stream constants
  localparam int unsigned TS_SIZE   = 188;
  localparam logic [7:0]  TS_SYNC   = 8'h47;
  localparam logic [12:0] NULL_PID  = 13'h1FFF;

  // HEVC intra modes
  localparam logic [5:0] MODE_PLANAR = 6'd0;
  localparam logic [5:0] MODE_DC     = 6'd1;
  localparam int unsigned NUM_ANG    = 33;   // angular modes 2..34

  // Length in bits of the signed Exp-Golomb code of v:
  // code number c = 2|v|-1 for v>0, 2|v| for v<=0; length = 2*floor(log2(c+1))+1.
  function automatic logic [5:0] seg_len(input mvc_t v);
    logic [MVW:0] c;
    logic [MVW:0] cp1;
    logic [5:0]   lg;
    if (v > 0) c = {1'b0, v} * 2 - 1;
    else       c = {1'b0, -v} * 2;
    cp1 = c + 1;
    lg = '0;
    for (int i = 0; i <= MVW; i++)
      if (cp1[i]) lg = 6'(i);
    return 6'(2 * lg + 1);
  endfunction

  // Bits to code a motion vector against its predictor.
  function automatic logic [6:0] mv_bitcost(input mv_t mv, input mv_t mvp);
    mvc_t dx;
    mvc_t dy;
    dx = mv.x - mvp.x;
    dy = mv.y - mvp.y;
    return 7'(seg_len(dx)) + 7'(seg_len(dy));
  endfunction

endpackage
