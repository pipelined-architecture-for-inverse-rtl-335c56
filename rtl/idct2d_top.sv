// idct2d_top: 8x8 two-dimensional inverse DCT built from two pipelined
// 8-point IDCTs (row-column method).
//
//   in_coef -> align (<< ROW_SHIFT) -> row idct1d_pipeline -> transpose_unit
//           -> align (<< COL_SHIFT) -> column idct1d_pipeline -> round_clip
//
// Input: a block is 64 valid samples of 12-bit signed DCT coefficients
// F[u][v], rows u = 0..7 one after the other; within a row the coefficients
// come in the order v = 7,5,3,1,6,2,4,0.  Each row is 8 consecutive valid
// cycles; idle cycles may be inserted between rows.
// Output: 64 valid samples per block, column n = 0..7 one after the other,
// each column in row order m = 5,4,6,7,2,3,1,0; out_row / out_col name the
// pixel.  Pixels are rounded to the nearest integer and clipped to
// [-256, 255].
//
// Word length: W-bit data words throughout (17 by default: sign plus 16 bits,
// with round-to-nearest in the multipliers; truncation needs a wider W for
// the same accuracy).  At W = 17 every pixel is within 1 of the exact IDCT,
// but the error statistics miss the IEEE 1180 mean and mean-square limits;
// W = 18 with rounding (ROW_SHIFT 4) or W = 23 with truncation (ROW_SHIFT 9)
// meets all of them.  Each 1-D pass has a gain of 4.  The coefficient enters
// with ROW_SHIFT fraction bits, the row result (kept at full word length in
// the transpose memory) gets COL_SHIFT more, and the column result carries
// FRAC = ROW_SHIFT + COL_SHIFT + 4 fraction bits before the final rounding.
// The defaults (3, 0, so FRAC = 7 at W = 17) keep every node in range for
// coefficient blocks that are the DCT of pixel blocks within +-300, the
// range of the IEEE 1180 test data; arbitrary coefficient blocks can wrap.
// For a wider W, raise ROW_SHIFT by the extra bits.
//
// Timing: one coefficient per cycle in and one pixel per cycle out.  A block
// leaves after the row pass (LAT1 cycles), the transpose memory (64 + 1
// cycles from its first row sample) and the column pass (LAT1 cycles), where
// LAT1 = 14 + 3*MUL_PIPE.  With gap-free input the first pixel of a block
// appears 2*LAT1 + 66 cycles after its first coefficient.
// Reset is synchronous and active low.
module idct2d_top
  import idct_pkg::*;
#(
  parameter int unsigned W         = 17,
  parameter quant_e      QUANT     = QUANT_ROUND,
  parameter int unsigned MUL_PIPE  = 2,
  parameter int unsigned ROW_SHIFT = 3,
  parameter int unsigned COL_SHIFT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic signed [11:0] in_coef,
  output logic              out_valid,
  output logic signed [8:0] out_pixel,
  output logic [2:0]        out_row,
  output logic [2:0]        out_col
);

  // --- row pass ------------------------------------------------------------
  slot_t               in_slot;
  tag_t                row_in_tag, row_out_tag, tr_tag, col_out_tag;
  logic signed [W-1:0] row_in, row_out, tr_data, col_in, col_out;

  always_ff @(posedge clk) begin
    if (!rst_n)        in_slot <= '0;
    else if (in_valid) in_slot <= in_slot + 3'd1;
  end

  assign row_in_tag = '{valid: in_valid, slot: in_slot};
  assign row_in     = W'(in_coef) <<< ROW_SHIFT;

  idct1d_pipeline #(.W(W), .QUANT(QUANT), .MUL_PIPE(MUL_PIPE)) u_row (
    .clk, .rst_n,
    .in_tag (row_in_tag),  .in_data(row_in),
    .out_tag(row_out_tag), .out_data(row_out)
  );

  // --- transpose -----------------------------------------------------------
  transpose_unit #(.W(W)) u_transpose (
    .clk, .rst_n,
    .in_tag (row_out_tag), .in_data(row_out),
    .out_tag(tr_tag),      .out_data(tr_data)
  );

  // --- column pass ---------------------------------------------------------
  assign col_in = tr_data <<< COL_SHIFT;

  idct1d_pipeline #(.W(W), .QUANT(QUANT), .MUL_PIPE(MUL_PIPE)) u_col (
    .clk, .rst_n,
    .in_tag (tr_tag),      .in_data(col_in),
    .out_tag(col_out_tag), .out_data(col_out)
  );

  // --- output --------------------------------------------------------------
  round_clip #(.W(W), .FRAC(ROW_SHIFT + COL_SHIFT + 2 * PASS_GAIN_LOG2)) u_round (
    .d(col_out), .q(out_pixel)
  );

  logic [2:0] col_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) col_cnt <= '0;
    else if (col_out_tag.valid && col_out_tag.slot == 3'd7) col_cnt <= col_cnt + 3'd1;
  end

  assign out_valid = col_out_tag.valid;
  assign out_row   = 3'(out_order(int'(col_out_tag.slot)));
  assign out_col   = col_cnt;

endmodule
