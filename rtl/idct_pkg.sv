// idct_pkg: types and constants shared by the pipelined 8-point IDCT.
//
// A sample moves through the pipeline together with a small tag: a valid bit
// and its slot, the position (0..7) of the sample inside its 8-sample frame.
// Every stage delays data and tag by the same fixed number of cycles, so the
// control of each stage only has to look at the tag of the sample in front of it.
//
// Also here:
//  * the rotation coefficients d_i, generated with the recursion
//      d_1 = sqrt(0.5), d_2i = sqrt(0.5(1+d_i)), d_2i+1 = sqrt(0.5(1-d_i)),
//    which gives d_1 = cos(pi/4), d_2 = cos(pi/8), d_3 = cos(3pi/8),
//    d_4 = cos(pi/16), d_5 = cos(7pi/16), d_6 = cos(3pi/16), d_7 = cos(5pi/16);
//  * the sample orders of a frame at the pipeline input and output, which
//    follow from the in-place schedule used here (see idct1d_pipeline);
//  * the quantisation modes of the multipliers.
package idct_pkg;

  // Frame of one 1-D transform.
  localparam int unsigned N = 8;

  typedef logic [$clog2(N)-1:0] slot_t;

  typedef struct packed {
    logic  valid;
    slot_t slot;
  } tag_t;

  // Quantisation of a product back to the data word: round to nearest
  // (half up) or truncation of the two's complement value (towards -inf).
  typedef enum logic {
    QUANT_ROUND = 1'b0,
    QUANT_TRUNC = 1'b1
  } quant_e;

  // Input frame order: slot s carries coefficient X[IN_ORDER(s)].
  function automatic int unsigned in_order(input int unsigned s);
    case (s)
      0: return 7;  1: return 5;  2: return 3;  3: return 1;
      4: return 6;  5: return 2;  6: return 4;  default: return 0;
    endcase
  endfunction

  // Output frame order: slot s carries sample x[OUT_ORDER(s)].
  function automatic int unsigned out_order(input int unsigned s);
    case (s)
      0: return 5;  1: return 4;  2: return 6;  3: return 7;
      4: return 2;  5: return 3;  6: return 1;  default: return 0;
    endcase
  endfunction

  // d_i of the recursion above, i = 1..7.
  function automatic real d_coef(input int unsigned i);
    real d [1:7];
    d[1] = $sqrt(0.5);
    for (int unsigned k = 1; k <= 3; k++) begin
      d[2*k]   = $sqrt(0.5 * (1.0 + d[k]));
      d[2*k+1] = $sqrt(0.5 * (1.0 - d[k]));
    end
    return d[i];
  endfunction

  // Signal gain applied by each multiplier stage on top of the transform's own
  // factors.  The front-end subtractions raise the level to at most 4.6x the
  // largest signal value; the gains bring the butterfly stages back up to
  // that level, so each stage's rounding error is small against the signal.
  // The 1-D pipeline as a whole therefore has gain STAGE_GAIN[0]*[1]*[2] = 4.
  // log2 of the overall gain of one 1-D pass, split evenly over stages 0 and 2.
  localparam int unsigned PASS_GAIN_LOG2 = 2;

  function automatic real stage_gain(input int unsigned stage);
    return (stage == 1) ? 1.0 : real'(1 << (PASS_GAIN_LOG2 / 2));
  endfunction

  // Real-valued multiplier coefficient of multiplier stage `stage` (0..2)
  // for the sample in slot `s`.  Stage 0 also carries the 1/2 factors of the
  // recursion and the 1/sqrt(2) of the DC term, so that without the stage
  // gains the pipeline computes the orthonormal IDCT.
  function automatic real stage_coef(input int unsigned stage, input int unsigned s);
    real c;
    case (stage)
      0: c = (s[0] == 1'b0 || s == 7) ? d_coef(1) / 2.0 : 0.25;
      1: case (s % 4)
           0: c = 2.0 * d_coef(3);
           1: c = 2.0 * d_coef(2);
           default: c = 1.0;
         endcase
      default: case (s)
           0: c = 2.0 * d_coef(7);
           1: c = 2.0 * d_coef(5);
           2: c = 2.0 * d_coef(6);
           3: c = 2.0 * d_coef(4);
           default: c = 1.0;
         endcase
    endcase
    return c * stage_gain(stage);
  endfunction

endpackage
