// tb_dct2d_2x_comb: the end-to-end test of tb_dct2d_2x applied to the "2xDCT Comb"
// configuration (PIPELINED = 0), whose latency is 2 cycles instead of 6.
//
// Matrices go in as rows and come back as columns of the result. Expected results
// come from the real-valued orthonormal 2-D DCT (dct_ref_pkg), rounded and clipped
// to 12 bits; each output sample may differ from it by at most 1.
//   FDCT matrices: random pixels in -256..255 (the IEEE-1180 input range).
//   IDCT matrices: coefficients obtained by rounding the exact FDCT of random
//                  pixel blocks (as the IEEE-1180 procedure does), plus some sparse
//                  random coefficient blocks.
// Phase 1 streams matrices back to back with the output always ready and checks
// the rate (one matrix every 8 cycles, 64 result lines in 64 consecutive cycles)
// and the latency (first result line handshaken 6 cycles after the last input row).
// Phase 2 adds random input gaps, random output back-pressure and random mixing of
// FDCT and IDCT matrices. The testbench counts how often each mechanism occurred
// (transpose bypass in S1 and in S3, output stall, input gap, FDCT/IDCT switch,
// drain of the last matrix) and fails if one never did. m_last must mark the
// eighth line of every result matrix. It also prints the peak
// and mean-square error of the IDCT results against the exact reference.
module tb_dct2d_2x_comb;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int LATENCY = 2;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_valid = 1'b0, s_ready, m_valid, m_ready = 1'b1, m_last;
  dir_e s_dir = DIR_FDCT, m_dir;
  pix_t s_data [N], m_data [N];
  tb_state_e tbuf_state;

  dct2d_2x #(.PIPELINED(1'b0)) u_dut (.clk, .rst_n, .s_valid, .s_ready, .s_dir, .s_data,
                  .m_valid, .m_ready, .m_dir, .m_data, .m_last, .tbuf_state);

  typedef struct { int in [8][8]; int exp [8][8]; dir_e d; } job_t;
  job_t sent[$];
  int   oline = 0, cycle = 0, last_in_cycle [$], out_cycles [$];
  int   n_s1 = 0, n_s3 = 0, n_stall = 0, n_gap = 0, n_switch = 0, n_drain = 0;
  int   n_out_mats = 0, n_idct_samples = 0, idct_peak = 0;
  real  idct_sq = 0.0;
  bit   in_matrix = 1'b0, random_ready = 1'b0;
  dir_e last_dir = DIR_FDCT;
  bit   have_last = 1'b0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic job_t make_job(dir_e d);
    job_t j;
    rmat_t m, r;
    j.d = d;
    if (d == DIR_FDCT) begin
      for (int i = 0; i < 8; i++) for (int k = 0; k < 8; k++) j.in[i][k] = urange(-256, 255);
    end else if (($urandom % 4) == 0) begin
      for (int i = 0; i < 8; i++) for (int k = 0; k < 8; k++)
        j.in[i][k] = (($urandom % 6) == 0) ? urange(-600, 600) : 0;
    end else begin
      for (int i = 0; i < 8; i++) for (int k = 0; k < 8; k++) m[i][k] = real'(urange(-256, 255));
      r = dct2(m, 1'b0);
      for (int i = 0; i < 8; i++) for (int k = 0; k < 8; k++) j.in[i][k] = clip(rnd(r[i][k]), 12);
    end
    for (int i = 0; i < 8; i++) for (int k = 0; k < 8; k++) m[i][k] = real'(j.in[i][k]);
    r = dct2(m, d == DIR_IDCT);
    for (int i = 0; i < 8; i++) for (int k = 0; k < 8; k++) j.exp[i][k] = clip(rnd(r[i][k]), 12);
    return j;
  endfunction

  // drive one matrix; gaps inserts random idle cycles between rows
  task automatic send(job_t j, bit gaps);
    if (have_last && j.d != last_dir) n_switch++;
    last_dir = j.d;
    have_last = 1'b1;
    sent.push_back(j);
    for (int r = 0; r < 8; r++) begin
      if (gaps) begin
        while (($urandom % 4) == 0) begin
          @(negedge clk);
          s_valid = 1'b0;
          if (r != 0) n_gap++;
          @(posedge clk);
        end
      end
      @(negedge clk);
      s_valid = 1'b1;
      s_dir = j.d;
      for (int k = 0; k < N; k++) s_data[k] = pix_t'(j.in[r][k]);
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      if (r == 7) last_in_cycle.push_back(cycle);
    end
  endtask

  // monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (tbuf_state == TB_S1 && s_ready) n_s1++;
      if (tbuf_state == TB_S3 && s_ready) n_s3++;
      if (m_valid && !m_ready) n_stall++;
      if (u_dut.tb_valid && !u_dut.row_valid && s_ready) n_drain++;
      if (m_valid && m_ready) begin
        checks++;
        if (sent.size() == 0) begin
          failures++;
          $display("output with nothing sent");
        end else begin
          if (m_dir != sent[0].d) failures++;
          if (oline == 0) out_cycles.push_back(cycle);
          checks++;
          if (m_last != (oline == 7)) begin
            failures++;
            $display("m_last %0d on line %0d", m_last, oline);
          end
          for (int u = 0; u < 8; u++) begin
            int e, g;
            e = sent[0].exp[u][oline];
            g = int'(m_data[u]);
            checks++;
            if (iabs(g - e) > 1) begin
              failures++;
              if (failures < 12)
                $display("%s col %0d row %0d got %0d exp %0d", sent[0].d.name(), oline, u, g, e);
            end
            if (sent[0].d == DIR_IDCT) begin
              n_idct_samples++;
              idct_sq += real'((g - e) * (g - e));
              if (iabs(g - e) > idct_peak) idct_peak = iabs(g - e);
            end
          end
          oline++;
          if (oline == 8) begin
            oline = 0;
            n_out_mats++;
            void'(sent.pop_front());
          end
        end
      end
      cycle++;
    end
  end

  // output back-pressure
  always @(negedge clk) m_ready <= random_ready ? (($urandom % 3) != 0) : 1'b1;

  task automatic expect_count(string what, int n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    int n_phase1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // ---- phase 1: back to back, output always ready
    n_phase1 = 8;
    for (int m = 0; m < n_phase1; m++) send(make_job(dir_e'(m / 3 % 2)), 1'b0);
    @(negedge clk);
    s_valid = 1'b0;
    wait (n_out_mats == n_phase1);
    @(posedge clk);
    // rate: each matrix's first column 8 cycles after the previous one's
    for (int m = 1; m < n_phase1; m++) begin
      checks++;
      if (out_cycles[m] - out_cycles[m-1] != 8) begin
        failures++;
        $display("matrix %0d came %0d cycles after the previous", m, out_cycles[m] - out_cycles[m-1]);
      end
    end
    for (int m = 0; m < n_phase1; m++) begin
      checks++;
      if (out_cycles[m] - last_in_cycle[m] != LATENCY) begin
        failures++;
        $display("latency %0d, expected %0d", out_cycles[m] - last_in_cycle[m], LATENCY);
      end
    end
    $display("phase 1: %0d matrices, one every %0d cycles", n_phase1, out_cycles[1] - out_cycles[0]);
    // ---- phase 2: gaps, back-pressure, mixed directions
    random_ready = 1'b1;
    for (int m = 0; m < 120; m++) begin
      send(make_job(dir_e'($urandom % 2)), 1'b1);
      if (($urandom % 8) == 0) begin
        @(negedge clk);
        s_valid = 1'b0;
        repeat (urange(1, 20)) @(posedge clk);
      end
    end
    @(negedge clk);
    s_valid = 1'b0;
    random_ready = 1'b0;
    repeat (40) @(posedge clk);
    checks++;
    if (sent.size() != 0) begin
      failures++;
      $display("%0d matrices never came out", sent.size());
    end
    expect_count("bypass reads in S1", n_s1);
    expect_count("bypass reads in S3", n_s3);
    expect_count("output stall cycles", n_stall);
    expect_count("input gaps inside a matrix", n_gap);
    expect_count("FDCT/IDCT switches", n_switch);
    expect_count("drain reads (no write)", n_drain);
    $display("matrices out %0d; IDCT peak error %0d, mean square error %f",
             n_out_mats, idct_peak, idct_sq / real'(n_idct_samples));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
