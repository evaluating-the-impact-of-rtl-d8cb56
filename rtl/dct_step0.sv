// dct_step0: STEP0 of the configurable 1-D DCT, seven butterflies.
//
// A butterfly maps (a, b) to (a+b, a-b); it is its own transpose, so running the
// three butterfly levels in reverse order computes the IDCT side of this step.
// Forward (FDCT), sample vector x[0..7] in, STEP1 operand vector b[0..7] out:
//   level 1: s07=x0+x7 d07=x0-x7, s16, d16, s25, d25, s34, d34   (4 butterflies)
//   level 2: e0=s07+s34 e3=s07-s34, e1=s16+s25 e2=s16-s25        (2 butterflies)
//   level 3: p0=e0+e1 p4=e0-e1                                   (1 butterfly)
//   b = {p0, p4, e3, e2, d07, d16, d25, d34}
// Inverse (IDCT): b in, samples out, levels 3, 2, 1 in that order.
// The vector layout b[] is this design's own choice; the butterfly count and the
// direction rule follow the document. Purely combinational.
module dct_step0
  import dct_pkg::*;
(
  input  dir_e dir,
  input  vec_t din,
  output vec_t dout
);

  acc_t s07, d07, s16, d16, s25, d25, s34, d34;
  acc_t e0, e1, e2, e3;

  always_comb begin
    if (dir == DIR_FDCT) begin
      s07 = din[0] + din[7];  d07 = din[0] - din[7];
      s16 = din[1] + din[6];  d16 = din[1] - din[6];
      s25 = din[2] + din[5];  d25 = din[2] - din[5];
      s34 = din[3] + din[4];  d34 = din[3] - din[4];
      e0 = s07 + s34;  e3 = s07 - s34;
      e1 = s16 + s25;  e2 = s16 - s25;
      dout[0] = e0 + e1;
      dout[1] = e0 - e1;
      dout[2] = e3;
      dout[3] = e2;
      dout[4] = d07;
      dout[5] = d16;
      dout[6] = d25;
      dout[7] = d34;
    end else begin
      e0 = din[0] + din[1];
      e1 = din[0] - din[1];
      e3 = din[2];
      e2 = din[3];
      d07 = din[4];  d16 = din[5];  d25 = din[6];  d34 = din[7];
      s07 = e0 + e3;  s34 = e0 - e3;
      s16 = e1 + e2;  s25 = e1 - e2;
      dout[0] = s07 + d07;  dout[7] = s07 - d07;
      dout[1] = s16 + d16;  dout[6] = s16 - d16;
      dout[2] = s25 + d25;  dout[5] = s25 - d25;
      dout[3] = s34 + d34;  dout[4] = s34 - d34;
    end
  end

endmodule
