// butterfly_pe: processing element of one butterfly stage (pair distance D).
//
// The stage combines samples D slots apart: in each group of 2D slots, slot p
// and slot p+D (0 <= p < D) form a pair.  A feedback shift register of length
// D does both the pairing and the reordering:
//   * first half of a group (slot mod 2D < D): the input goes into the shift
//     register and the output is the register's head, which holds the sums of
//     the previous group;
//   * second half: the head is the partner x_p; the output is x_(p+D) - x_p
//     and the sum x_(p+D) + x_p goes into the shift register, leaving D cycles
//     later in slot p+D.
// Idle cycles count as first-half cycles, so a group's sums drain out even if
// no further samples arrive.  Only one adder and one subtractor are used and
// each works half of the time.
//
// Tags are stored in the shift register beside the data, so the output slot p
// carries the difference of pair p and slot p+D its sum, and every sample
// leaves D+1 cycles after it entered (D in the loop plus an output register).
// Frames must arrive as consecutive cycles.
module butterfly_pe
  import idct_pkg::*;
#(
  parameter int unsigned W = 17,
  parameter int unsigned D = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tag_t                in_tag,
  input  logic signed [W-1:0] in_data,
  output tag_t                out_tag,
  output logic signed [W-1:0] out_data
);

  // Shift register: index 0 is the head (oldest), D-1 the tail.
  logic signed [W-1:0] sr_data [D];
  tag_t                sr_tag  [D];

  logic                second_half;
  logic signed [W-1:0] push_data, pe_out;
  tag_t                push_tag, pe_tag;

  assign second_half = in_tag.valid && ((int'(in_tag.slot) % (2 * D)) >= D);

  always_comb begin
    if (second_half) begin
      pe_out    = in_data - sr_data[0];
      pe_tag    = sr_tag[0];
      push_data = in_data + sr_data[0];
      push_tag  = in_tag;
    end else begin
      pe_out    = sr_data[0];
      pe_tag    = sr_tag[0];
      push_data = in_data;
      push_tag  = in_tag;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < D; i++) begin
        sr_data[i] <= '0;
        sr_tag[i]  <= '0;
      end
      out_tag  <= '0;
      out_data <= '0;
    end else begin
      for (int i = 0; i + 1 < int'(D); i++) begin
        sr_data[i] <= sr_data[i+1];
        sr_tag[i]  <= sr_tag[i+1];
      end
      sr_data[D-1] <= push_data;
      sr_tag[D-1]  <= push_tag;
      out_tag      <= pe_tag;
      out_data     <= pe_out;
    end
  end

endmodule
