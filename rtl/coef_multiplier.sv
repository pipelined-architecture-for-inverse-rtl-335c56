// coef_multiplier: constant-coefficient multiplier in front of a butterfly PE.
//
// Every sample of the stream is multiplied by a coefficient chosen by its slot.
// The coefficients are the rotation factors 2*d_i of the recursive IDCT (with
// 1 for the samples that are only passed on) and, in stage 0, the 1/2 and
// 1/sqrt(2) normalisation factors; idct_pkg::stage_coef lists them.  Because
// every sample passes a multiplier, the signal level of each stage is set
// here too (gain 2 in stages 0 and 2) and needs no extra scaling hardware.
//
// Coefficients are W-bit two's complement numbers with W-3 fraction bits
// (the largest, 2 * 2*d_4 = 3.92, needs three integer bits), rounded to
// nearest at elaboration.  The W x W product is brought back to W bits by
// dropping W-3 fraction bits, either rounded to nearest (QUANT_ROUND, half up) or truncated
// (QUANT_TRUNC, towards minus infinity).  The pipeline's scaling keeps the
// result within W bits, so no saturation is done.
//
// Timing: MUL_PIPE register stages (a pipelined multiplier; the PE loop does
// not contain it, so it can be as deep as the clock needs).  The product is
// registered in the first stage; the rounding add sits after the last one.
module coef_multiplier
  import idct_pkg::*;
#(
  parameter int unsigned W        = 17,
  parameter int unsigned STAGE    = 0,
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

  localparam int unsigned FB = W - 3;  // coefficient fraction bits

  typedef logic signed [W-1:0]   coef_t;
  typedef logic signed [2*W-1:0] prod_t;
  typedef coef_t                 coef_tab_t [N];

  function automatic coef_tab_t make_tab();
    coef_tab_t t;
    for (int unsigned s = 0; s < N; s++)
      t[s] = coef_t'($rtoi(stage_coef(STAGE, s) * (2.0 ** FB) + 0.5));
    return t;
  endfunction

  localparam coef_tab_t COEF = make_tab();

  prod_t prod_q [MUL_PIPE];
  tag_t  tag_q  [MUL_PIPE];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < MUL_PIPE; i++) begin
        prod_q[i] <= '0;
        tag_q[i]  <= '0;
      end
    end else begin
      prod_q[0] <= prod_t'(in_data) * prod_t'(COEF[in_tag.slot]);
      tag_q[0]  <= in_tag;
      for (int i = 1; i < MUL_PIPE; i++) begin
        prod_q[i] <= prod_q[i-1];
        tag_q[i]  <= tag_q[i-1];
      end
    end
  end

  prod_t rounded;
  always_comb begin
    if (QUANT == QUANT_ROUND) rounded = prod_q[MUL_PIPE-1] + (prod_t'(1) <<< (FB - 1));
    else                      rounded = prod_q[MUL_PIPE-1];
  end

  assign out_data = W'(rounded >>> FB);
  assign out_tag  = tag_q[MUL_PIPE-1];

endmodule
