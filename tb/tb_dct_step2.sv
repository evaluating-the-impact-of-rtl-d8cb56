// tb_dct_step2: checks the hardwired scaling shifts of both flavours.
//
// Expected values are computed with real division and floor():
//   forward row:    Y0,Y4 * 4;          others floor(v/512 + 1/2)
//   forward column: Y0,Y4 floor(v/32 + 1/2); others floor(v/65536 + 1/2)
//   inverse row:    every input * 32 (2 pass bits and 3 guard bits)
//   inverse column: every input * 8  (3 guard bits)
module tb_dct_step2;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  int checks = 0, failures = 0;
  vec_t din, o_fr, o_fc, o_ir, o_ic;

  dct_step2 #(.IS_COLUMN(1'b0)) u_fr (.dir(DIR_FDCT), .din(din), .dout(o_fr));
  dct_step2 #(.IS_COLUMN(1'b1)) u_fc (.dir(DIR_FDCT), .din(din), .dout(o_fc));
  dct_step2 #(.IS_COLUMN(1'b0)) u_ir (.dir(DIR_IDCT), .din(din), .dout(o_ir));
  dct_step2 #(.IS_COLUMN(1'b1)) u_ic (.dir(DIR_IDCT), .din(din), .dout(o_ic));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s got %0d exp %0d", what, got, exp);
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
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < 8; i++) din[i] = acc_t'(urange(-40000000, 40000000));
      if (t == 0) for (int i = 0; i < 8; i++) din[i] = acc_t'(i * 256 - 1024); // exact halves
      #1;
      for (int i = 0; i < 8; i++) begin
        real v;
        v = real'(din[i]);
        if (i == 0 || i == 4) begin
          check("fr", int'(o_fr[i]), int'(din[i]) * 4);
          check("fc", int'(o_fc[i]), rnd(v / 32.0));
        end else begin
          check("fr", int'(o_fr[i]), rnd(v / 512.0));
          check("fc", int'(o_fc[i]), rnd(v / 65536.0));
        end
        check("ir", int'(o_ir[i]), int'(din[i]) * 32);
        check("ic", int'(o_ic[i]), int'(din[i]) * 8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
