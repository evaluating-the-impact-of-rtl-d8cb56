// dct2d_2x: 8x8 2-D FDCT/IDCT core with two 1-D blocks (the "2xDCT" architecture).
//
// One matrix line (eight 12-bit samples) enters per cycle into the input register.
// The row 1-D block transforms it and writes the 14-bit result into the transpose
// buffer. As soon as the eighth line of a matrix is written, the buffer starts
// delivering the matrix in the other orientation, one line per cycle, to the column
// 1-D block, whose 12-bit results go through the output register. Consecutive
// matrices overlap completely, so the core accepts a new matrix every 8 cycles.
// PIPELINED = 1 (default) is the "2xDCT Pipe" configuration with three-stage 1-D
// blocks; PIPELINED = 0 is "2xDCT Comb".
// Each input line carries its direction (s_dir: FDCT or IDCT); all eight lines of a
// matrix must carry the same one, and matrices of both kinds may be mixed.
// Handshake (AXI4-Stream style valid/ready, this design's reading of the document's
// AMBA-AXI control): a line is taken when s_valid && s_ready; a result line is
// delivered when m_valid && m_ready. The whole datapath advances in a cycle when the
// output register is empty or being read, so s_ready = !m_valid || m_ready and
// back-pressure stalls every stage at once.
// Data order: input lines are matrix rows, x[r][0..7]. Output line k holds column k
// of the result, F[0..7][k] (the row-column method with a single transposition
// delivers the result transposed). m_last marks line 7 of each result matrix.
// Latency from the handshake of a matrix's last row to its first result column:
// 6 cycles pipelined, 2 cycles combinational (without back-pressure).
module dct2d_2x
  import dct_pkg::*;
#(
  parameter bit PIPELINED = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  // input stream: one matrix row per beat
  input  logic      s_valid,
  output logic      s_ready,
  input  dir_e      s_dir,
  input  pix_t      s_data [N],
  // output stream: one result column per beat
  output logic      m_valid,
  input  logic      m_ready,
  output dir_e      m_dir,
  output pix_t      m_data [N],
  output logic      m_last,     // last (eighth) result line of a matrix
  // observation of the transpose buffer FSM
  output tb_state_e tbuf_state
);

  logic adv;
  assign adv     = !m_valid || m_ready;
  assign s_ready = adv;

  // ---------------- input register
  logic in_valid;
  dir_e in_dir;
  pix_t in_data [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_valid <= 1'b0;
      in_dir   <= DIR_FDCT;
    end else if (adv) begin
      in_valid <= s_valid;
      in_dir   <= s_dir;
    end
  end
  always_ff @(posedge clk) if (adv) in_data <= s_data;

  // ---------------- row 1-D block
  logic row_valid;
  dir_e row_dir;
  mid_t row_data [N];

  dct_1d #(
    .PIPELINED(PIPELINED), .IS_COLUMN(1'b0), .IN_W(PIX_W), .OUT_W(MID_W)
  ) u_row (
    .clk, .rst_n, .en(adv),
    .in_valid(in_valid), .in_dir(in_dir), .in_data(in_data),
    .out_valid(row_valid), .out_dir(row_dir), .out_data(row_data)
  );

  // ---------------- transpose buffer
  logic tb_valid;
  dir_e tb_dir;
  mid_t tb_data [N];

  dct_tbuffer u_tbuf (
    .clk, .rst_n, .en(adv),
    .wr_valid(row_valid), .wr_dir(row_dir), .wr_data(row_data),
    .rd_valid(tb_valid), .rd_dir(tb_dir), .rd_data(tb_data),
    .state(tbuf_state)
  );

  // ---------------- column 1-D block
  logic col_valid;
  dir_e col_dir;
  pix_t col_data [N];

  dct_1d #(
    .PIPELINED(PIPELINED), .IS_COLUMN(1'b1), .IN_W(MID_W), .OUT_W(PIX_W)
  ) u_col (
    .clk, .rst_n, .en(adv),
    .in_valid(tb_valid), .in_dir(tb_dir), .in_data(tb_data),
    .out_valid(col_valid), .out_dir(col_dir), .out_data(col_data)
  );

  // ---------------- output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_dir   <= DIR_FDCT;
    end else if (adv) begin
      m_valid <= col_valid;
      m_dir   <= col_dir;
    end
  end
  always_ff @(posedge clk) if (adv) m_data <= col_data;

  // position of the pending output line within its matrix
  logic [2:0] m_line;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                m_line <= '0;
    else if (m_valid && m_ready) m_line <= m_line + 3'd1;
  end
  assign m_last = m_valid && (m_line == 3'd7);

  // AXI-stream rule: a pending output holds its value until it is taken.
  logic [N*PIX_W-1:0] m_flat;
  always_comb
    for (int i = 0; i < N; i++) m_flat[i*PIX_W +: PIX_W] = m_data[i];

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (m_valid && !m_ready) |=> (m_valid && m_flat == $past(m_flat) && m_dir == $past(m_dir)));

endmodule
