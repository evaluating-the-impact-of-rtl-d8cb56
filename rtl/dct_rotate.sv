// dct_rotate: planar rotation of the 1-D DCT dataflow.
//
// Computes, with three constant multiplications and three sums,
//   tmp   = C * (x + y)
//   x_o   = tmp + K1 * x
//   y_o   = tmp + K2 * y
// which is the rotation form of the document's equation (1). The constants are B11
// fixed-point integers (see dct_pkg), so the outputs carry a scale of 2^11 relative
// to the inputs; the caller removes it with a shift. The coefficient matrix
// [[C+K1, C], [C, C+K2]] is symmetric, so the block is its own transpose: the IDCT,
// which runs the dataflow backwards, uses it unchanged.
// Each multiplication is a hardwired shift-add over the set bits of the constant.
// Purely combinational; no clock.
module dct_rotate
  import dct_pkg::*;
#(
  parameter rot_const_t K = ROT6
) (
  input  acc_t x,
  input  acc_t y,
  output acc_t x_o,
  output acc_t y_o
);

  // Multiply by a constant as a sum of shifted copies of the operand.
  function automatic acc_t shift_add(acc_t v, logic signed [15:0] k);
    acc_t acc;
    logic [15:0] mag;
    acc = '0;
    mag = (k < 0) ? 16'(-k) : 16'(k);
    for (int i = 0; i < 16; i++) begin
      if (mag[i]) acc = acc + (v <<< i);
    end
    return (k < 0) ? -acc : acc;
  endfunction

  acc_t sum, tmp;

  always_comb begin
    sum = x + y;
    tmp = shift_add(sum, K.c);
    x_o = tmp + shift_add(x, K.k1);
    y_o = tmp + shift_add(y, K.k2);
  end

endmodule
