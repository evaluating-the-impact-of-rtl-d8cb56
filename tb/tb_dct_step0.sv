// tb_dct_step0: checks the seven-butterfly step in both directions.
//
// The forward step is the linear map b = M x with the +1/-1 matrix M written out
// below from the butterfly equations; the inverse step must be its transpose,
// x = M' b. Random vectors are applied in both directions and compared exactly.
module tb_dct_step0;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  int checks = 0, failures = 0;
  vec_t fin, fout, iin, iout;

  // rows: p0, p4, e3, e2, d07, d16, d25, d34 as functions of x0..x7
  localparam int M [8][8] = '{
    '{ 1,  1,  1,  1,  1,  1,  1,  1},
    '{ 1, -1, -1,  1,  1, -1, -1,  1},
    '{ 1,  0,  0, -1, -1,  0,  0,  1},
    '{ 0,  1, -1,  0,  0, -1,  1,  0},
    '{ 1,  0,  0,  0,  0,  0,  0, -1},
    '{ 0,  1,  0,  0,  0,  0, -1,  0},
    '{ 0,  0,  1,  0,  0, -1,  0,  0},
    '{ 0,  0,  0,  1, -1,  0,  0,  0}};

  dct_step0 u_f (.dir(DIR_FDCT), .din(fin), .dout(fout));
  dct_step0 u_i (.dir(DIR_IDCT), .din(iin), .dout(iout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < 8; i++) begin
        fin[i] = acc_t'(urange(-5000, 5000));
        iin[i] = acc_t'(urange(-5000, 5000));
      end
      #1;
      for (int k = 0; k < 8; k++) begin
        int ef, ei;
        ef = 0; ei = 0;
        for (int n = 0; n < 8; n++) begin
          ef += M[k][n] * int'(fin[n]);
          ei += M[n][k] * int'(iin[n]);
        end
        checks += 2;
        if (int'(fout[k]) != ef) begin
          failures++;
          if (failures < 10) $display("fwd out %0d got %0d exp %0d", k, fout[k], ef);
        end
        if (int'(iout[k]) != ei) begin
          failures++;
          if (failures < 10) $display("inv out %0d got %0d exp %0d", k, iout[k], ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
