// round_clip: final rounding and clipping of the 2-D IDCT result.
//
// The column pass delivers each pixel as a W-bit two's complement number with
// FRAC fraction bits.  It is rounded to the nearest integer (halves round up,
// towards +inf) and then clipped to the 9-bit pixel-difference range
// [-256, 255], as the IEEE 1180 accuracy test prescribes for an 8x8 IDCT.
// Combinational.
module round_clip #(
  parameter int unsigned W    = 17,
  parameter int unsigned FRAC = 5
) (
  input  logic signed [W-1:0] d,
  output logic signed [8:0]   q
);

  logic signed [W:0] r;

  always_comb begin
    r = (W+1)'(d) + ((W+1)'(1) <<< (FRAC - 1));
    r = r >>> FRAC;
    if (r > 255)       q = 9'sd255;
    else if (r < -256) q = -9'sd256;
    else               q = 9'(r);
  end

endmodule
