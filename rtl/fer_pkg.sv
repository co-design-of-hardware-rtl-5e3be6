// Shared constants, types and pure functions of the facial-expression
// feature accelerators.
//
// Image sizes follow the design: 256x256 8-bit grey input frames, faces
// resized to 100x100, HOG with 16x16-pixel cells. The nine 20-degree
// orientation bins over 0..180 degrees and 2x2-cell blocks are this
// design's choice; together with 16x16 cells on a 100x100 face they give
// the 900-long HOG vector (5x5 blocks x 4 cells x 9 bins).
// The LBP histogram uses the 58 uniform 8-neighbour patterns plus one bin
// for all others (59 bins); the bin order is this design's own.
package fer_pkg;

  localparam int unsigned PIX_W     = 8;     // grey level width
  localparam int unsigned IN_W      = 256;   // input frame width
  localparam int unsigned IN_H      = 256;   // input frame height
  localparam int unsigned FACE_N    = 100;   // resized face is FACE_N x FACE_N
  localparam int unsigned CELL      = 16;    // HOG cell edge in pixels
  localparam int unsigned NBINS     = 9;     // HOG orientation bins, 0..180 deg
  localparam int unsigned LBP_BINS  = 59;    // 58 uniform patterns + 1 other
  localparam int unsigned FEAT_W    = 16;    // width of one feature word

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [FEAT_W-1:0] feat_t;

  // 3x3 neighbourhood, [row][col], row 0 on top, col 0 on the left.
  typedef pix_t win3_t [3][3];

  // Rounded 2^16 * cos / sin of the HOG bin boundaries 20, 40, ... 160 deg.
  localparam int COS_Q16 [8] = '{61584, 50203, 32768, 11380,
                                 -11380, -32768, -50203, -61584};
  localparam int SIN_Q16 [8] = '{22415, 42125, 56756, 64540,
                                 64540, 56756, 42125, 22415};

  // 8-bit LBP code: bit i is set when neighbour i is not darker than the
  // centre. Neighbours go clockwise from the top-left corner.
  function automatic logic [7:0] lbp_code(input win3_t w);
    logic [7:0] c;
    c[0] = w[0][0] >= w[1][1];
    c[1] = w[0][1] >= w[1][1];
    c[2] = w[0][2] >= w[1][1];
    c[3] = w[1][2] >= w[1][1];
    c[4] = w[2][2] >= w[1][1];
    c[5] = w[2][1] >= w[1][1];
    c[6] = w[2][0] >= w[1][1];
    c[7] = w[1][0] >= w[1][1];
    return c;
  endfunction

  // Histogram bin of an LBP code. Uniform codes (at most two 0/1
  // transitions around the circle) map to 0 (all zero), 57 (all one) or
  // 1 + 8*(ones-1) + start, where start is the bit at which the run of
  // ones begins. All other codes map to 58.
  function automatic logic [5:0] lbp_bin(input logic [7:0] c);
    int unsigned trans, ones, start;
    trans = 0; ones = 0; start = 0;
    for (int i = 0; i < 8; i++) begin
      if (c[i] != c[(i+7)%8]) trans++;
      if (c[i]) ones++;
      if (c[i] && !c[(i+7)%8]) start = i;
    end
    if (trans > 2)       return 6'd58;
    else if (ones == 0)  return 6'd0;
    else if (ones == 8)  return 6'd57;
    else                 return 6'(1 + 8*(ones-1) + start);
  endfunction

  // floor(sqrt(v)) of an unsigned 18-bit value, bit by bit.
  function automatic logic [8:0] isqrt18(input logic [17:0] v);
    logic [8:0]  r;
    logic [17:0] t;
    r = '0;
    for (int b = 8; b >= 0; b--) begin
      t = 18'(r | 9'(9'd1 << b));
      if (t * t <= v) r = r | (9'd1 << b);
    end
    return r;
  endfunction

endpackage
