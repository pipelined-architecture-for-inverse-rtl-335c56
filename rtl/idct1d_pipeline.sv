// idct1d_pipeline: 8-point inverse DCT on a sequential sample stream.
//
// The transform is the recursive (constant-geometry style) IDCT: an N-point
// IDCT is split into an N/2-point IDCT of the even coefficients and an
// N/2-point IDCT of alternating sums of the odd ones, whose result is rotated
// by 2cos((2n+1)pi/2N) and combined with the even half in a butterfly.
// Rescheduled in place, the signal flow graph of N = 8 becomes
//
//   front end : special subtractor (feedback chain)  ->  elastic buffer
//               -> special subtractor                 (5 subtractions/frame)
//   stage 0   : coef_multiplier -> butterfly_pe, pair distance 1
//   stage 1   : coef_multiplier -> butterfly_pe, pair distance 2
//   stage 2   : coef_multiplier -> butterfly_pe, pair distance 4
//
// Vertical projection maps every column of the graph onto one unit, so one
// sample enters and one leaves per clock and no reordering memory is needed
// between stages.  The multipliers sit outside the PE feedback loops.
//
// Orders: slot s of an input frame carries X[k] with k = 7,5,3,1,6,2,4,0;
// slot s of an output frame carries x[n] with n = 5,4,6,7,2,3,1,0.  These
// orders are a property of the in-place schedule.  The front end forms
//   X7, X3-X5, X5-X7, X1-X3+X5-X7, X6, X2-X6, X4, X0.
//
// Scaling: the output is four times the orthonormal IDCT
//   x[n] = 1/2 * sum_k c(k) X[k] cos((2n+1)k pi/16),  c(0) = 1/sqrt(2),
// in the input's own units.  The front-end subtractions raise the level to
// at most 4.6 B for coefficient frames that are the DCT of a signal bounded
// by B; multiplier stages 0 and 2 each add a gain of 2, so that the butterfly
// stages (at most 5.2 B) work near the same level and their rounding costs
// little.  Frames must therefore satisfy 5.2 B < 2^(W-1); for arbitrary
// coefficient frames the bound is 10.6 max|X| < 2^(W-1).
//
// Timing: frames are 8 consecutive cycles with the tag slot counting 0..7;
// idle cycles are allowed between frames.  Every sample leaves
// LATENCY = 14 + 3*MUL_PIPE cycles after the input sample in the same slot.
// Reset (synchronous, active low) clears all valid bits.
module idct1d_pipeline
  import idct_pkg::*;
#(
  parameter int unsigned W        = 17,
  parameter quant_e      QUANT    = QUANT_ROUND,
  parameter int unsigned MUL_PIPE = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tag_t                in_tag,
  input  logic signed [W-1:0] in_data,
  output tag_t                out_tag,
  output logic signed [W-1:0] out_data
);

  // --- front end -----------------------------------------------------------
  tag_t                s1_tag, eb_tag, s2_tag;
  logic signed [W-1:0] s1_y, eb_a, eb_b, s2_y;
  logic                s1_sub, eb_sub;

  // Chain subtraction on slots 1,2,3 (odd coefficients) and 5 (X2 - X6).
  assign s1_sub = in_tag.valid && (in_tag.slot inside {3'd1, 3'd2, 3'd3, 3'd5});

  special_subtractor #(.W(W)) u_sub_chain (
    .clk, .rst_n,
    .in_tag (in_tag), .a(in_data), .b(s1_y), .sub(s1_sub),
    .out_tag(s1_tag), .y(s1_y)
  );

  elastic_buffer #(.W(W)) u_ebuf (
    .clk, .rst_n,
    .in_tag (s1_tag), .in_data(s1_y),
    .out_tag(eb_tag), .a(eb_a), .b(eb_b), .sub(eb_sub)
  );

  special_subtractor #(.W(W)) u_sub_reorder (
    .clk, .rst_n,
    .in_tag (eb_tag), .a(eb_a), .b(eb_b), .sub(eb_sub),
    .out_tag(s2_tag), .y(s2_y)
  );

  // --- three multiplier + butterfly stages --------------------------------
  tag_t                st_tag  [4];
  logic signed [W-1:0] st_data [4];

  assign st_tag[0]  = s2_tag;
  assign st_data[0] = s2_y;

  for (genvar g = 0; g < 3; g++) begin : g_stage
    tag_t                m_tag;
    logic signed [W-1:0] m_data;

    coef_multiplier #(.W(W), .STAGE(g), .QUANT(QUANT), .MUL_PIPE(MUL_PIPE)) u_mul (
      .clk, .rst_n,
      .in_tag (st_tag[g]), .in_data(st_data[g]),
      .out_tag(m_tag),     .out_data(m_data)
    );

    butterfly_pe #(.W(W), .D(1 << g)) u_pe (
      .clk, .rst_n,
      .in_tag (m_tag),       .in_data(m_data),
      .out_tag(st_tag[g+1]), .out_data(st_data[g+1])
    );
  end

  assign out_tag  = st_tag[3];
  assign out_data = st_data[3];

endmodule
