// dct_step2: STEP2 of the configurable 1-D DCT, hardwired scaling shifts.
//
// The 1-D block computes sqrt(8) times the orthonormal 8-point DCT. The row pass
// keeps PASS_BITS (2) extra fraction bits; the column pass divides by
// 2^(PASS_BITS+3) to undo those bits and the factor 8 of two sqrt(8) passes.
// Forward (FDCT, last step): Y0 and Y4 arrive unscaled, the six rotated outputs
// carry the 2^11 scale of the B11 constants.
//   row   : Y0,Y4 <<< 2               others: round(v / 2^9)
//   column: Y0,Y4 round(v / 2^5)      others: round(v / 2^16)
// Inverse (IDCT, first step): all coefficients enter unscaled and are shifted
// left to give IDCT_GUARD (3) guard bits, plus PASS_BITS in the row pass:
//   row   : every input <<< 5
//   column: every input <<< 3
// The 1-D block ends an IDCT pass with a round-half-to-even shift right by 3
// (row) or 8 (column). The guard bits keep the rounding of the rotations small,
// and rounding ties to even keeps the IDCT free of a mean error, as IEEE 1180
// requires.
// Forward rounding is round-half-up. The shift amounts follow from the scaling
// described above, which is this design's choice: the document fixes only B11 and
// the 14-bit row results. Combinational.
module dct_step2
  import dct_pkg::*;
#(
  parameter bit IS_COLUMN = 1'b0
) (
  input  dir_e dir,
  input  vec_t din,
  output vec_t dout
);

  localparam int unsigned COL_SHIFT = PASS_BITS + 3;
  // IDCT pre-shift (the matching shift at the end of the pass is in dct_1d)
  localparam int unsigned INV_PRE   = IS_COLUMN ? IDCT_GUARD : IDCT_GUARD + PASS_BITS;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (dir == DIR_FDCT) begin
        if (i == 0 || i == 4)
          dout[i] = IS_COLUMN ? rshift_round(din[i], COL_SHIFT) : (din[i] <<< PASS_BITS);
        else
          dout[i] = IS_COLUMN ? rshift_round(din[i], FIX_BITS + COL_SHIFT)
                              : rshift_round(din[i], FIX_BITS - PASS_BITS);
      end else begin
        dout[i] = din[i] <<< INV_PRE;
      end
    end
  end

endmodule
