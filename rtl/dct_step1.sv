// dct_step1: STEP1 of the configurable 1-D DCT, four planar rotations and six sums.
//
// Forward (FDCT), STEP0 vector b = {p0, p4, e3, e2, d07, d16, d25, d34} in,
// coefficient vector Y[0..7] out:
//   Y0 = p0, Y4 = p4                          (pass through, scale 1)
//   (Y2, Y6)   = R6 (e3, e2)
//   z3 = d34 + d16,  z4 = d25 + d07           (2 sums)
//   (z3', z4') = R17(z3, z4)
//   (a34, a07) = R37(d34, d07),  (a25, a16) = R13(d25, d16)
//   Y7 = a34 + z3', Y1 = a07 + z4', Y5 = a25 + z4', Y3 = a16 + z3'   (4 sums)
// The rotated outputs keep the 2^11 scale of the B11 constants; STEP2 removes it.
// Inverse (IDCT), Y in, b out: the transposed graph. The fan-outs become the two
// sums z3 = Y7 + Y3 and z4 = Y1 + Y5, the rotations are unchanged (symmetric), and
// the final four sums rebuild d34, d16, d25, d07. In this direction the rotated
// values are brought back to the input scale here (round-half-up shift by 11),
// because STEP0 adds them to the unscaled p0/p4 path.
// The rotation names and the 4-rotation/6-sum structure follow the document; the
// placement of the inverse rescale is this design's choice. Combinational.
module dct_step1
  import dct_pkg::*;
(
  input  dir_e dir,
  input  vec_t din,
  output vec_t dout
);

  // rotation operands and results
  acc_t r6_x, r6_y, r6_xo, r6_yo;
  acc_t r17_x, r17_y, r17_xo, r17_yo;
  acc_t r37_x, r37_y, r37_xo, r37_yo;
  acc_t r13_x, r13_y, r13_xo, r13_yo;

  dct_rotate #(.K(ROT6))  u_r6  (.x(r6_x),  .y(r6_y),  .x_o(r6_xo),  .y_o(r6_yo));
  dct_rotate #(.K(ROT17)) u_r17 (.x(r17_x), .y(r17_y), .x_o(r17_xo), .y_o(r17_yo));
  dct_rotate #(.K(ROT37)) u_r37 (.x(r37_x), .y(r37_y), .x_o(r37_xo), .y_o(r37_yo));
  dct_rotate #(.K(ROT13)) u_r13 (.x(r13_x), .y(r13_y), .x_o(r13_xo), .y_o(r13_yo));

  always_comb begin
    if (dir == DIR_FDCT) begin
      r6_x  = din[2];            r6_y  = din[3];
      r17_x = din[7] + din[5];   r17_y = din[6] + din[4];
      r37_x = din[7];            r37_y = din[4];
      r13_x = din[6];            r13_y = din[5];
      dout[0] = din[0];
      dout[4] = din[1];
      dout[2] = r6_xo;
      dout[6] = r6_yo;
      dout[7] = r37_xo + r17_xo;
      dout[1] = r37_yo + r17_yo;
      dout[5] = r13_xo + r17_yo;
      dout[3] = r13_yo + r17_xo;
    end else begin
      r6_x  = din[2];            r6_y  = din[6];
      r17_x = din[7] + din[3];   r17_y = din[1] + din[5];
      r37_x = din[7];            r37_y = din[1];
      r13_x = din[5];            r13_y = din[3];
      dout[0] = din[0];
      dout[1] = din[4];
      dout[2] = rshift_round(r6_xo, FIX_BITS);
      dout[3] = rshift_round(r6_yo, FIX_BITS);
      dout[7] = rshift_round(r37_xo + r17_xo, FIX_BITS);   // d34
      dout[5] = rshift_round(r13_yo + r17_xo, FIX_BITS);   // d16
      dout[6] = rshift_round(r13_xo + r17_yo, FIX_BITS);   // d25
      dout[4] = rshift_round(r37_yo + r17_yo, FIX_BITS);   // d07
    end
  end

endmodule
