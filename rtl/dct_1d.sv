// dct_1d: configurable 8-point 1-D FDCT/IDCT block.
//
// The block takes eight samples in parallel and computes either the forward DCT,
// by traversing STEP0 -> STEP1 -> STEP2, or the inverse DCT, by traversing the
// same dataflow backwards, STEP2 -> STEP1 -> STEP0. The direction travels with each
// beat (in_dir), so FDCT and IDCT rows may follow each other back to back. To allow
// that in the pipelined version, each of the three positions holds the logic of the
// step it needs in either direction: position A is STEP0 (FDCT) or STEP2 (IDCT),
// position B is STEP1, position C is STEP2 (FDCT) or STEP0 (IDCT).
// IS_COLUMN selects the row flavour (12-bit in, results clipped to 14 bits, two
// extra fraction bits kept) or the column flavour (14-bit in, scale removed,
// results clipped to 12 bits); the flavours differ only in their shift amounts.
// PIPELINED = 1 gives the three-stage pipeline of the document: registers after
// positions A and B, the third stage ending in the register of the next block.
// With PIPELINED = 0 the block is fully combinational.
// Timing: out_* follow in_* after 2 cycles in which en is high (PIPELINED = 1),
// or in the same cycle (PIPELINED = 0). en stalls the pipeline registers.
// An IDCT pass ends with a round-half-to-even shift right (3 bits in the row pass,
// 8 in the column pass) that removes the guard bits added in STEP2; results are
// saturated to OUT_W bits. The per-position
// duplication of STEP0/STEP2 and the saturation of the column result are this
// design's own choices.
module dct_1d
  import dct_pkg::*;
#(
  parameter bit          PIPELINED = 1'b1,
  parameter bit          IS_COLUMN = 1'b0,
  parameter int unsigned IN_W      = PIX_W,
  parameter int unsigned OUT_W     = MID_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    in_valid,
  input  dir_e                    in_dir,
  input  logic signed [IN_W-1:0]  in_data  [N],
  output logic                    out_valid,
  output dir_e                    out_dir,
  output logic signed [OUT_W-1:0] out_data [N]
);

  localparam int unsigned COL_SHIFT = PASS_BITS + 3;
  localparam int unsigned INV_POST  = IS_COLUMN ? IDCT_GUARD + COL_SHIFT : IDCT_GUARD;

  // ---------------- position A: STEP0 (FDCT) or STEP2 (IDCT)
  vec_t a_in, a_s0, a_s2, a_out;
  always_comb
    for (int i = 0; i < N; i++) a_in[i] = acc_t'(in_data[i]);

  dct_step0 u_a_step0 (.dir(DIR_FDCT), .din(a_in), .dout(a_s0));
  dct_step2 #(.IS_COLUMN(IS_COLUMN)) u_a_step2 (.dir(DIR_IDCT), .din(a_in), .dout(a_s2));

  always_comb a_out = (in_dir == DIR_FDCT) ? a_s0 : a_s2;

  // ---------------- pipeline register A -> B
  vec_t b_in, b_out;
  logic b_valid;
  dir_e b_dir;

  if (PIPELINED) begin : g_reg_ab
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        b_valid <= 1'b0;
        b_dir   <= DIR_FDCT;
      end else if (en) begin
        b_valid <= in_valid;
        b_dir   <= in_dir;
      end
    end
    always_ff @(posedge clk) if (en) b_in <= a_out;
  end else begin : g_wire_ab
    assign b_valid = in_valid;
    assign b_dir   = in_dir;
    assign b_in    = a_out;
  end

  // ---------------- position B: STEP1
  dct_step1 u_b_step1 (.dir(b_dir), .din(b_in), .dout(b_out));

  // ---------------- pipeline register B -> C
  vec_t c_in, c_s2, c_s0, c_out;
  logic c_valid;
  dir_e c_dir;

  if (PIPELINED) begin : g_reg_bc
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        c_valid <= 1'b0;
        c_dir   <= DIR_FDCT;
      end else if (en) begin
        c_valid <= b_valid;
        c_dir   <= b_dir;
      end
    end
    always_ff @(posedge clk) if (en) c_in <= b_out;
  end else begin : g_wire_bc
    assign c_valid = b_valid;
    assign c_dir   = b_dir;
    assign c_in    = b_out;
  end

  // ---------------- position C: STEP2 (FDCT) or STEP0 (IDCT), clipping
  dct_step2 #(.IS_COLUMN(IS_COLUMN)) u_c_step2 (.dir(DIR_FDCT), .din(c_in), .dout(c_s2));
  dct_step0 u_c_step0 (.dir(DIR_IDCT), .din(c_in), .dout(c_s0));

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (c_dir == DIR_FDCT)
        c_out[i] = c_s2[i];
      else
        c_out[i] = rshift_round_even(c_s0[i], INV_POST);
      out_data[i] = OUT_W'(saturate(c_out[i], OUT_W));
    end
  end

  assign out_valid = c_valid;
  assign out_dir   = c_dir;

endmodule
