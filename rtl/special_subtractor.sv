// special_subtractor: subtract-or-bypass unit of the IDCT front end.
//
// The in-place IDCT schedule has subtractions that do not fit the regular
// butterfly pattern.  They are done by this unit: when `sub` is high the
// registered output is a - b, otherwise a is passed through unchanged.  The
// tag of operand a travels with the result.
//
// The pipeline uses two instances.  The first feeds its own output back as b,
// so that a run of consecutive `sub` slots forms the chain
// X7, X5-X7, X3-(X5-X7), X1-(X3-X5+X7); the second gets a, b and sub from the
// elastic buffer.  Which slots subtract is decided by the caller.
//
// Timing: one cycle from a/b/sub to y.  The operands must be small enough
// that a - b fits in W bits; the pipeline's scaling guarantees this.
// Reset (synchronous, active low) clears the output and its valid bit.
module special_subtractor
  import idct_pkg::*;
#(
  parameter int unsigned W = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tag_t                in_tag,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                sub,
  output tag_t                out_tag,
  output logic signed [W-1:0] y
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_tag <= '0;
      y       <= '0;
    end else begin
      out_tag <= in_tag;
      y       <= sub ? a - b : a;
    end
  end

endmodule
