// tb_dct_tbuffer: checks the transpose buffer.
//
// Random matrices of 14-bit words are written line by line, with random gaps in
// the write stream and random stalls (en low). Each matrix must come out as its
// transpose, line k holding column k, in order and with its direction tag. The
// testbench also checks that
//   - the first line of a matrix is read in the same cycle as its last line is
//     written (the bypass of states S1/S3), and its element 7 is the bypassed word,
//   - the remaining seven lines follow in the next seven enabled cycles,
//   - back-to-back matrices give one line out per enabled cycle (8 cycles/matrix),
//   - every FSM state S0..S4 occurs.
module tb_dct_tbuffer;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, wr_valid = 1'b0;
  dir_e wr_dir = DIR_FDCT;
  mid_t wr_data [N];
  logic rd_valid;
  dir_e rd_dir;
  mid_t rd_data [N];
  tb_state_e state;

  dct_tbuffer u_dut (.clk, .rst_n, .en, .wr_valid, .wr_dir, .wr_data,
                     .rd_valid, .rd_dir, .rd_data, .state);

  typedef struct { int m [8][8]; dir_e d; } mat_t;
  mat_t written[$];
  mat_t cur;
  int   wline = 0, rline = 0;
  int   state_seen [5];
  int   bypass_reads = 0, reads_seen = 0, first_read_cycle = -1, last_read_cycle = -10, cycle = 0;
  int   n_mats = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: sample the read port in every enabled cycle
  always @(posedge clk) begin
    if (rst_n && en) begin
      state_seen[int'(state)]++;
      if (rd_valid) begin
        checks++;
        if (written.size() == 0) begin
          failures++;
          $display("read with no matrix");
        end else begin
          if (rline == 0) begin
            // bypass: must coincide with the last write of that matrix
            checks++;
            if (!(wr_valid && wline == 7)) begin
              failures++;
              $display("line 0 read without the last write");
            end else bypass_reads++;
          end else begin
            checks++;
            if (last_read_cycle != cycle - 1) begin
              failures++;
              $display("line %0d not read in the cycle after line %0d", rline, rline - 1);
            end
          end
          if (rd_dir != written[0].d) failures++;
          for (int k = 0; k < N; k++) begin
            checks++;
            if (int'(rd_data[k]) != written[0].m[k][rline]) begin
              failures++;
              if (failures < 10)
                $display("matrix line %0d elem %0d got %0d exp %0d", rline, k, rd_data[k], written[0].m[k][rline]);
            end
          end
          if (first_read_cycle < 0) first_read_cycle = cycle;
          reads_seen++;
          last_read_cycle = cycle;
          rline++;
          if (rline == 8) begin
            rline = 0;
            void'(written.pop_front());
          end
        end
      end
      // bookkeeping of the write side (after the check, which used the old count)
      if (wr_valid) begin
        for (int k = 0; k < N; k++) cur.m[wline][k] = int'(wr_data[k]);
        if (wline == 0) cur.d = wr_dir;
        wline++;
        if (wline == 8) begin
          wline = 0;
        end
      end
      cycle++;
    end
  end

  task automatic drive_matrix(bit gaps, dir_e d);
    for (int r = 0; r < 8; r++) begin
      @(negedge clk);
      en = gaps ? (($urandom % 6) != 0) : 1'b1;
      while (gaps && ($urandom % 4) == 0) begin
        wr_valid = 1'b0;
        @(negedge clk);
        en = ($urandom % 6) != 0;
      end
      wr_valid = 1'b1;
      wr_dir = d;
      for (int k = 0; k < N; k++) wr_data[k] = mid_t'(urange(-8192, 8191));
      if (r == 7) begin
        mat_t m;
        m = cur;
        for (int k = 0; k < N; k++) m.m[7][k] = int'(wr_data[k]);
        m.d = d;
        written.push_back(m);
      end
      while (!en) begin
        @(negedge clk);
        en = ($urandom % 6) != 0;
      end
      @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // back-to-back run, checked for 8 cycles per matrix
    for (int m = 0; m < 6; m++) begin
      drive_matrix(1'b0, dir_e'(m % 2));
      n_mats++;
    end
    @(negedge clk);
    wr_valid = 1'b0;
    repeat (12) @(negedge clk);
    // 48 lines read in 48 consecutive cycles
    checks++;
    if (reads_seen != 48 || last_read_cycle - first_read_cycle != 47) begin
      failures++;
      $display("back-to-back: %0d reads over %0d cycles", reads_seen, last_read_cycle - first_read_cycle + 1);
    end
    repeat (12) begin @(negedge clk); en = 1'b1; wr_valid = 1'b0; end
    // irregular run
    for (int m = 0; m < 60; m++) begin
      drive_matrix(1'b1, dir_e'($urandom % 2));
      n_mats++;
      if (($urandom % 5) == 0) begin
        @(negedge clk);
        wr_valid = 1'b0;
        repeat (urange(1, 12)) begin @(negedge clk); en = 1'b1; end
      end
    end
    @(negedge clk);
    wr_valid = 1'b0;
    repeat (20) begin @(negedge clk); en = 1'b1; wr_valid = 1'b0; end
    checks++;
    if (written.size() != 0) begin
      failures++;
      $display("%0d matrices not read out", written.size());
    end
    checks++;
    if (bypass_reads != n_mats) begin
      failures++;
      $display("bypass reads %0d, matrices %0d", bypass_reads, n_mats);
    end
    for (int s = 0; s < 5; s++) begin
      checks++;
      $display("state S%0d seen %0d times", s, state_seen[s]);
      if (state_seen[s] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
