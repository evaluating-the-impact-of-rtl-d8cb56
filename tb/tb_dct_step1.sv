// tb_dct_step1: checks the rotation step against the cosine definition.
//
// Forward: with b = {p0, p4, e3, e2, d0, d1, d2, d3} the step must give
//   Y0 = p0, Y4 = p4 exactly,
//   Y2 = 2^11*sqrt2*(c2*e3 + c6*e2), Y6 = 2^11*sqrt2*(c6*e3 - c2*e2),
//   Yk = 2^11*sqrt2*sum_n d_n*cos((2n+1)k*pi/16) for odd k,
// up to the rounding of the B11 constants (tolerance proportional to the inputs).
// Inverse: the transposed map, divided by 2^11 and rounded. c_n = cos(n*pi/16).
module tb_dct_step1;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  int checks = 0, failures = 0;
  vec_t fin, fout, iin, iout;

  dct_step1 u_f (.dir(DIR_FDCT), .din(fin), .dout(fout));
  dct_step1 u_i (.dir(DIR_IDCT), .din(iin), .dout(iout));

  function automatic real cs(int n);
    return $cos(n * PI / 16.0);
  endfunction

  task automatic check(string what, int got, real exp, real tol);
    checks++;
    if (rabs(real'(got) - exp) > tol) begin
      failures++;
      if (failures < 10) $display("%s got %0d exp %f tol %f", what, got, exp, tol);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real s2, e[8], sa, sb;
    s2 = $sqrt(2.0);
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < 8; i++) begin
        fin[i] = acc_t'(urange(-8000, 8000));
        iin[i] = acc_t'(urange(-8000, 8000));
      end
      #1;
      // forward
      sa = 0.0;
      for (int i = 0; i < 8; i++) sa += rabs(real'(fin[i]));
      e[0] = real'(fin[0]);
      e[4] = real'(fin[1]);
      e[2] = 2048.0 * s2 * (cs(2) * fin[2] + cs(6) * fin[3]);
      e[6] = 2048.0 * s2 * (cs(6) * fin[2] - cs(2) * fin[3]);
      for (int k = 1; k < 8; k += 2) begin
        e[k] = 0.0;
        for (int n = 0; n < 4; n++) e[k] += fin[4+n] * cs((2 * n + 1) * k);
        e[k] *= 2048.0 * s2;
      end
      for (int k = 0; k < 8; k++)
        check($sformatf("fwd Y%0d", k), int'(fout[k]), e[k], (k == 0 || k == 4) ? 0.0 : 2.0 * sa + 2.0);
      // inverse
      sb = 0.0;
      for (int i = 0; i < 8; i++) sb += rabs(real'(iin[i]));
      check("inv p0", int'(iout[0]), real'(iin[0]), 0.0);
      check("inv p4", int'(iout[1]), real'(iin[4]), 0.0);
      check("inv e3", int'(iout[2]), s2 * (cs(2) * iin[2] + cs(6) * iin[6]), 2.0 * sb / 2048.0 + 1.0);
      check("inv e2", int'(iout[3]), s2 * (cs(6) * iin[2] - cs(2) * iin[6]), 2.0 * sb / 2048.0 + 1.0);
      for (int n = 0; n < 4; n++) begin
        real d;
        d = 0.0;
        for (int k = 1; k < 8; k += 2) d += iin[k] * cs((2 * n + 1) * k);
        check($sformatf("inv d%0d", n), int'(iout[4+n]), s2 * d, 2.0 * sb / 2048.0 + 1.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
