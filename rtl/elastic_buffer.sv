// elastic_buffer: feedforward reordering buffer of the IDCT front end.
//
// After the first special subtractor a frame holds
//   s0 = X7, s1 = X5-X7, s2 = X3-X5+X7, s3 = X1-X3+X5-X7, s4..s7
// but the first butterfly stage needs, in slots 0..3,
//   X7, X3-X5 (= s2 - s0), X5-X7 (= s1), s3.
// A two-tap feedforward shift register (z1, z2) delays every sample by one
// cycle, and in two places by a different amount:
//   output slot 0 : a = z1 (s0)
//   output slot 1 : a = current input (s2), b = z2 (s0), subtract
//   output slot 2 : a = z2 (s1), delayed by two instead of one
//   output slot 3..7 : a = z1
// The decision is taken from the tag in z1, so every output sample leaves with
// the tag of the sample one cycle behind the input.  The subtraction itself is
// done by a special_subtractor behind this buffer.
//
// Timing: the operands and `sub` are registered; a sample entering in cycle t
// leaves the buffer (as operand a or as part of a - b) in cycle t + 2, with the
// tag of its output slot.  Frames must be 8 consecutive cycles; idle cycles
// between frames are allowed because the taps shift every cycle.
module elastic_buffer
  import idct_pkg::*;
#(
  parameter int unsigned W = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tag_t                in_tag,
  input  logic signed [W-1:0] in_data,
  output tag_t                out_tag,
  output logic signed [W-1:0] a,
  output logic signed [W-1:0] b,
  output logic                sub
);

  tag_t                z1_tag;
  logic signed [W-1:0] z1, z2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z1_tag  <= '0;
      z1      <= '0;
      z2      <= '0;
      out_tag <= '0;
      a       <= '0;
      b       <= '0;
      sub     <= 1'b0;
    end else begin
      z1_tag  <= in_tag;
      z1      <= in_data;
      z2      <= z1;
      out_tag <= z1_tag;
      b       <= z2;
      unique case (z1_tag.slot)
        3'd1: begin a <= in_data; sub <= 1'b1; end
        3'd2: begin a <= z2;      sub <= 1'b0; end
        default: begin a <= z1;   sub <= 1'b0; end
      endcase
    end
  end

endmodule
