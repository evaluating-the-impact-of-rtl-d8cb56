// dct_tbuffer: transpose buffer between the row and the column 1-D blocks.
//
// An 8x8 register file of 14-bit words with one write port and one read port, each
// eight words wide. Matrices are written alternately by rows and by columns and are
// read in the other orientation, so a new matrix can be written into the lines that
// the read of the previous one has already freed. The states of the document's FSM:
//   S0  write rows 0..6 of the first matrix, nothing to read
//   S1  write row 7 and, in the same cycle, read column 0; its element 7 is taken
//       from the write data (bypass)
//   S2  read columns 1..7 while the next matrix is written into columns 0..6
//   S3  write column 7 and read row 0 with the same bypass
//   S4  read rows 1..7 while the next matrix is written into rows 0..6
// then S1, S2, ... again. When no new matrix arrives the reads still run to the end
// (the last matrix drains); when input pauses the FSM waits in the writing state.
// With one input line per cycle a matrix leaves every eight cycles, the minimum.
// The FSM is kept as two counters (write line, read line) and two orientation flags;
// `state` decodes them into S0..S4 for observation.
// Interface: wr_* is the line from the row block, taken when en && wr_valid.
// rd_* is combinational from the register file (and the bypass), valid in a cycle
// with en; the read line advances on en. wr_dir/rd_dir carry the transform direction
// of each matrix (sampled with its first line). Reset clears the counters only.
module dct_tbuffer
  import dct_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic     wr_valid,
  input  dir_e     wr_dir,
  input  mid_t     wr_data [N],
  output logic     rd_valid,
  output dir_e     rd_dir,
  output mid_t     rd_data [N],
  output tb_state_e state
);

  mid_t mem [N][N];          // mem[row][col]

  logic       w_cols;        // current matrix is written by columns
  logic [2:0] wi;            // next line to write
  dir_e       w_mdir;        // direction tag of the matrix being written
  logic       r_active;      // lines of a complete matrix remain to be read
  logic       r_cols;        // that matrix is read by columns
  logic [2:0] ri;            // next line to read
  dir_e       r_mdir;        // its direction tag

  logic do_wr, wr_last, rd_new;
  dir_e cur_wdir;

  assign do_wr    = en && wr_valid;
  assign wr_last  = do_wr && (wi == 3'd7);
  assign rd_new   = wr_last;                       // S1 / S3 read with bypass
  assign cur_wdir = (wi == 3'd0) ? wr_dir : w_mdir;

  // ---------------- read port
  always_comb begin
    rd_valid = 1'b0;
    rd_dir   = r_mdir;
    for (int k = 0; k < N; k++) rd_data[k] = '0;
    if (rd_new) begin
      // line 0 of the matrix just completed, read in the other orientation
      rd_valid = 1'b1;
      rd_dir   = cur_wdir;
      for (int k = 0; k < N - 1; k++)
        rd_data[k] = w_cols ? mem[0][k] : mem[k][0];
      rd_data[N-1] = wr_data[0];
    end else if (r_active && en) begin
      rd_valid = 1'b1;
      for (int k = 0; k < N; k++)
        rd_data[k] = r_cols ? mem[k][ri] : mem[ri][k];
    end
  end

  // ---------------- register file
  always_ff @(posedge clk) begin
    if (do_wr) begin
      for (int k = 0; k < N; k++) begin
        if (w_cols) mem[k][wi] <= wr_data[k];
        else        mem[wi][k] <= wr_data[k];
      end
    end
  end

  // ---------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_cols   <= 1'b0;
      wi       <= '0;
      w_mdir   <= DIR_FDCT;
      r_active <= 1'b0;
      r_cols   <= 1'b1;
      ri       <= '0;
      r_mdir   <= DIR_FDCT;
    end else if (en) begin
      if (do_wr) begin
        wi <= wi + 3'd1;
        if (wi == 3'd0) w_mdir <= wr_dir;
      end
      if (rd_new) begin
        // the completed matrix is read in the other orientation, from line 1 on;
        // the next matrix is written in that same other orientation
        r_active <= 1'b1;
        r_cols   <= !w_cols;
        ri       <= 3'd1;
        r_mdir   <= cur_wdir;
        w_cols   <= !w_cols;
      end else if (r_active) begin
        ri <= ri + 3'd1;
        if (ri == 3'd7) r_active <= 1'b0;
      end
    end
  end

  // ---------------- state decode (document's S0..S4)
  always_comb begin
    if (wr_last)       state = w_cols ? TB_S3 : TB_S1;
    else if (w_cols)   state = TB_S2;
    else if (r_active) state = TB_S4;
    else               state = TB_S0;
  end

  // A matrix may only complete after the previous one has been read out.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    wr_last |-> !r_active);
  // A line is overwritten only after it has been read.
  a_line_free: assert property (@(posedge clk) disable iff (!rst_n)
    (do_wr && r_active) |-> (wi < ri));

endmodule
