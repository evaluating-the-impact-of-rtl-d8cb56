// dct_pkg: types and constants shared by the 8x8 FDCT/IDCT core.
//
// The 1-D transform is the LLM-style dataflow of Massimino's fast DCT, rearranged so
// that the same three steps compute the FDCT when traversed forwards
// (STEP0 -> STEP1 -> STEP2) and the IDCT when traversed backwards
// (STEP2 -> STEP1 -> STEP0). The multiplier constants use binary point B11: each is
// round(k * 2^11) of the exact rotation coefficient, with c(n) = cos(n*pi/16):
//   R6 : C = sqrt2*c6,        K1 = sqrt2*(c2-c6),           K2 = -sqrt2*(c2+c6)
//   R17: C = sqrt2*c3,        K1 = -sqrt2*(c3+c5),          K2 = sqrt2*(c5-c3)
//   R37: C = sqrt2*(c7-c3),   K1 = sqrt2*(-c1+c3+c5-c7),    K2 = sqrt2*(c1+c3-c5-c7)
//   R13: C = -sqrt2*(c1+c3),  K1 = sqrt2*(c1+c3-c5+c7),     K2 = sqrt2*(c1+c3+c5-c7)
// Widths: 12-bit samples at the core boundary, 14-bit words after the row pass
// (the row results are clipped to -8192..8191), and a wide internal accumulator.
// The 1-D block computes sqrt(8) times the orthonormal 1-D DCT. The row pass keeps
// PASS_BITS extra fraction bits; the column pass removes them together with the
// factor 8 of the two passes, so the 2-D result is the orthonormal (JPEG) 2-D DCT.
package dct_pkg;

  localparam int unsigned N         = 8;   // points per 1-D transform
  localparam int unsigned PIX_W     = 12;  // core input/output sample width
  localparam int unsigned MID_W     = 14;  // row-pass result / transpose buffer width
  localparam int unsigned ACC_W     = 40;  // internal datapath width
  localparam int unsigned FIX_BITS  = 11;  // binary point of the cosine constants (B11)
  localparam int unsigned PASS_BITS = 2;   // extra fraction bits carried between passes
  localparam int unsigned IDCT_GUARD = 3;  // guard bits inside an IDCT pass

  typedef logic signed [ACC_W-1:0] acc_t;
  typedef acc_t vec_t [N];

  typedef logic signed [PIX_W-1:0] pix_t;
  typedef pix_t pix_vec_t [N];
  typedef logic signed [MID_W-1:0] mid_t;
  typedef mid_t mid_vec_t [N];

  // Rotation constants (B11). A rotation maps (x, y) to
  //   x' = K1*x + C*(x+y),  y' = K2*y + C*(x+y)
  // whose matrix is symmetric, so the same block serves both directions.
  typedef struct packed {
    logic signed [15:0] c;
    logic signed [15:0] k1;
    logic signed [15:0] k2;
  } rot_const_t;

  localparam rot_const_t ROT6  = '{c: 16'sd1108,  k1: 16'sd1567, k2: -16'sd3784};
  localparam rot_const_t ROT17 = '{c: 16'sd2408,  k1: -16'sd4017, k2: -16'sd799};
  localparam rot_const_t ROT37 = '{c: -16'sd1843, k1: 16'sd612,  k2: 16'sd3075};
  localparam rot_const_t ROT13 = '{c: -16'sd5249, k1: 16'sd4205, k2: 16'sd6293};

  // Direction of the transform carried with every beat.
  typedef enum logic {
    DIR_FDCT = 1'b0,
    DIR_IDCT = 1'b1
  } dir_e;

  // States of the transpose buffer FSM (see dct_tbuffer).
  typedef enum logic [2:0] {
    TB_S0 = 3'd0,   // write rows, nothing to read
    TB_S1 = 3'd1,   // write last row, read column 0 with bypass
    TB_S2 = 3'd2,   // read columns, write columns
    TB_S3 = 3'd3,   // write last column, read row 0 with bypass
    TB_S4 = 3'd4    // read rows, write rows
  } tb_state_e;

  // Arithmetic right shift with round-half-up.
  function automatic acc_t rshift_round(acc_t v, int unsigned sh);
    acc_t bias;
    bias = (sh == 0) ? '0 : (acc_t'(1) <<< (sh - 1));
    return (v + bias) >>> sh;
  endfunction

  // Arithmetic right shift with round-half-to-even (no bias on exact ties).
  function automatic acc_t rshift_round_even(acc_t v, int unsigned sh);
    acc_t q, rem, half;
    q    = v >>> sh;
    rem  = v - (q <<< sh);
    half = acc_t'(1) <<< (sh - 1);
    if (rem > half || (rem == half && q[0])) q = q + 1;
    return q;
  endfunction

  // Saturate to a signed range of the given width.
  function automatic acc_t saturate(acc_t v, int unsigned w);
    acc_t hi, lo;
    hi = (acc_t'(1) <<< (w - 1)) - 1;
    lo = -(acc_t'(1) <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
