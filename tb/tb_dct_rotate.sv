// tb_dct_rotate: checks the planar rotation against integer multiplication.
//
// Four instances, one per rotation constant set, get random operands; each output
// must equal K1*x + C*(x+y) (resp. K2*y + C*(x+y)) computed here with the `*`
// operator, independently of the block's shift-add implementation.
module tb_dct_rotate;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  int checks = 0, failures = 0;
  acc_t x, y;
  acc_t xo [4], yo [4];
  localparam rot_const_t KS [4] = '{ROT6, ROT17, ROT37, ROT13};

  dct_rotate #(.K(ROT6))  u0 (.x(x), .y(y), .x_o(xo[0]), .y_o(yo[0]));
  dct_rotate #(.K(ROT17)) u1 (.x(x), .y(y), .x_o(xo[1]), .y_o(yo[1]));
  dct_rotate #(.K(ROT37)) u2 (.x(x), .y(y), .x_o(xo[2]), .y_o(yo[2]));
  dct_rotate #(.K(ROT13)) u3 (.x(x), .y(y), .x_o(xo[3]), .y_o(yo[3]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      x = acc_t'(urange(-70000, 70000));
      y = acc_t'(urange(-70000, 70000));
      if (t == 0) begin x = 1; y = 0; end
      if (t == 1) begin x = 0; y = 1; end
      #1;
      for (int r = 0; r < 4; r++) begin
        longint ex, ey;
        ex = longint'(KS[r].k1) * x + longint'(KS[r].c) * (x + y);
        ey = longint'(KS[r].k2) * y + longint'(KS[r].c) * (x + y);
        checks += 2;
        if (longint'(xo[r]) != ex || longint'(yo[r]) != ey) begin
          failures++;
          if (failures < 10)
            $display("rot %0d x=%0d y=%0d got %0d %0d exp %0d %0d", r, x, y, xo[r], yo[r], ex, ey);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
