// tb_dct_1d: checks the configurable 1-D block against the real-valued DCT.
//
// Four instances: row and column flavour, each pipelined and combinational. A random
// stream of lines with random directions, random valid gaps and random stalls (en)
// is applied. Expected results, from dct_ref_pkg:
//   row:    clip14(round(4 * sqrt8 * DCT(x)))   or with the inverse DCT
//   column: clip12(round(sqrt8 * DCT(v) / 32))  or with the inverse DCT
// within a tolerance that grows with the input magnitude (B11 constant rounding).
// For the pipelined instances the output must come exactly 2 enabled cycles after
// the input; for the combinational ones in the same cycle.
module tb_dct_1d;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0;
  dir_e in_dir = DIR_FDCT;
  pix_t x12 [N];
  mid_t x14 [N];

  logic rp_v, cp_v, rc_v, cc_v;
  dir_e rp_d, cp_d, rc_d, cc_d;
  mid_t rp_o [N], rc_o [N];
  pix_t cp_o [N], cc_o [N];

  dct_1d #(.PIPELINED(1'b1), .IS_COLUMN(1'b0), .IN_W(12), .OUT_W(14)) u_rp (
    .clk, .rst_n, .en, .in_valid, .in_dir, .in_data(x12),
    .out_valid(rp_v), .out_dir(rp_d), .out_data(rp_o));
  dct_1d #(.PIPELINED(1'b1), .IS_COLUMN(1'b1), .IN_W(14), .OUT_W(12)) u_cp (
    .clk, .rst_n, .en, .in_valid, .in_dir, .in_data(x14),
    .out_valid(cp_v), .out_dir(cp_d), .out_data(cp_o));
  dct_1d #(.PIPELINED(1'b0), .IS_COLUMN(1'b0), .IN_W(12), .OUT_W(14)) u_rc (
    .clk, .rst_n, .en, .in_valid, .in_dir, .in_data(x12),
    .out_valid(rc_v), .out_dir(rc_d), .out_data(rc_o));
  dct_1d #(.PIPELINED(1'b0), .IS_COLUMN(1'b1), .IN_W(14), .OUT_W(12)) u_cc (
    .clk, .rst_n, .en, .in_valid, .in_dir, .in_data(x14),
    .out_valid(cc_v), .out_dir(cc_d), .out_data(cc_o));

  typedef struct {
    int   exp_row [8];
    real  tol_row;
    int   exp_col [8];
    real  tol_col;
    dir_e dir;
    int   stamp;
  } exp_t;

  exp_t q[$];
  int   en_count = 0;

  function automatic exp_t expect_of(dir_e d);
    exp_t e;
    rvec_t v12, v14, o12, o14;
    real s12, s14;
    s12 = 0.0; s14 = 0.0;
    for (int i = 0; i < 8; i++) begin
      v12[i] = real'(x12[i]);  s12 += rabs(v12[i]);
      v14[i] = real'(x14[i]);  s14 += rabs(v14[i]);
    end
    o12 = (d == DIR_FDCT) ? dct8(v12) : idct8(v12);
    o14 = (d == DIR_FDCT) ? dct8(v14) : idct8(v14);
    for (int i = 0; i < 8; i++) begin
      e.exp_row[i] = clip(rnd(4.0 * $sqrt(8.0) * o12[i]), 14);
      e.exp_col[i] = clip(rnd($sqrt(8.0) * o14[i] / 32.0), 12);
    end
    e.tol_row = 2.0 + 0.004 * s12;
    e.tol_col = 1.0 + 0.00003 * s14;
    e.dir = d;
    e.stamp = en_count;
    return e;
  endfunction

  task automatic cmp(string what, int got, int exp, real tol);
    checks++;
    if (rabs(real'(got - exp)) > tol) begin
      failures++;
      if (failures < 12) $display("%s got %0d exp %0d tol %f", what, got, exp, tol);
    end
  endtask

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus
  initial begin
    int lines, r;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    lines = 0;
    while (lines < 3000) begin
      @(negedge clk);
      en       = ($urandom % 8) != 0;
      in_valid = ($urandom % 5) != 0;
      in_dir   = dir_e'($urandom % 2);
      r = ($urandom % 4);
      for (int i = 0; i < N; i++) begin
        if (r == 0) begin
          x12[i] = pix_t'(urange(-2048, 2047));
          x14[i] = mid_t'(urange(-8192, 8191));
        end else begin
          x12[i] = pix_t'(urange(-256, 255));
          x14[i] = mid_t'(urange(-2048, 2047));
        end
      end
      #1;
      // combinational instances: same cycle
      if (in_valid) begin
        exp_t e;
        e = expect_of(in_dir);
        checks += 2;
        if (!rc_v || !cc_v || rc_d != in_dir || cc_d != in_dir) failures++;
        for (int i = 0; i < N; i++) begin
          cmp("comb row", int'(rc_o[i]), e.exp_row[i], e.tol_row);
          cmp("comb col", int'(cc_o[i]), e.exp_col[i], e.tol_col);
        end
        if (en) q.push_back(e);
        if (en) lines++;
      end
      @(posedge clk);
    end
    repeat (20) begin
      @(negedge clk);
      en = 1'b1; in_valid = 1'b0;
      @(posedge clk);
    end
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d lines never came out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pipelined instances: compare when the line leaves (enabled cycle with out_valid)
  always @(posedge clk) begin
    if (rst_n && en) begin
      checks++;
      if (rp_v != cp_v) failures++;
      if (rp_v) begin
        if (q.size() == 0) begin
          failures++;
          $display("unexpected output");
        end else begin
          exp_t e;
          e = q.pop_front();
          checks += 3;
          if (rp_d != e.dir || cp_d != e.dir) failures++;
          if (en_count - e.stamp != 2) begin
            failures++;
            $display("latency %0d, expected 2", en_count - e.stamp);
          end
          for (int i = 0; i < N; i++) begin
            cmp("pipe row", int'(rp_o[i]), e.exp_row[i], e.tol_row);
            cmp("pipe col", int'(cp_o[i]), e.exp_col[i], e.tol_col);
          end
        end
      end
    end
    if (rst_n && en) en_count++;
  end
endmodule
