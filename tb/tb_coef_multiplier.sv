// tb_coef_multiplier: drives random samples in all slots into four
// multipliers (stages 0, 1, 2 with rounding, stage 2 with truncation) and
// compares each product with a reference built from cos() directly:
//   stage 0: cos(pi/4)/2 in even slots and slot 7, 1/4 in odd slots 1,3,5
//   stage 1: 2cos(3pi/8), 2cos(pi/8), 1, 1 (repeating every 4 slots)
//   stage 2: 2cos(5pi/16), 2cos(7pi/16), 2cos(3pi/16), 2cos(pi/16), 1, 1, 1, 1
// Stages 0 and 2 carry an extra gain of 2.  Coefficients rounded to W-3
// fraction bits; product rounded half up or floored.  Checks the MUL_PIPE-cycle latency.
module tb_coef_multiplier;
  import idct_pkg::*;
  localparam int unsigned W = 17, MUL_PIPE = 2, FB = W - 3;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  tag_t in_tag;
  logic signed [W-1:0] in_data;
  tag_t out_tag [4];
  logic signed [W-1:0] out_data [4];
  int checks = 0, failures = 0;
  longint cycle = 0;

  for (genvar g = 0; g < 4; g++) begin : g_dut
    coef_multiplier #(.W(W), .STAGE(g == 3 ? 2 : g), .QUANT(g == 3 ? QUANT_TRUNC : QUANT_ROUND),
                      .MUL_PIPE(MUL_PIPE)) dut (
      .clk, .rst_n, .in_tag, .in_data, .out_tag(out_tag[g]), .out_data(out_data[g]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ref_coef(input int stage, input int s);
    case (stage)
      0: return (s % 2 == 0 || s == 7) ? $cos(PI / 4.0) / 2.0 : 0.25;
      1: case (s % 4)
           0: return 2.0 * $cos(3.0 * PI / 8.0);
           1: return 2.0 * $cos(PI / 8.0);
           default: return 1.0;
         endcase
      default: case (s)
           0: return 2.0 * $cos(5.0 * PI / 16.0);
           1: return 2.0 * $cos(7.0 * PI / 16.0);
           2: return 2.0 * $cos(3.0 * PI / 16.0);
           3: return 2.0 * $cos(PI / 16.0);
           default: return 1.0;
         endcase
    endcase
  endfunction

  function automatic longint expect_out(input int g, input int s, input longint x);
    longint c, p;
    real gain;
    gain = (g == 1) ? 1.0 : 2.0;
    c = longint'($floor(gain * ref_coef(g == 3 ? 2 : g, s) * real'(longint'(1) << FB) + 0.5));
    p = x * c;
    if (g != 3) p = p + (longint'(1) <<< (FB - 1));
    return p >>> FB;
  endfunction

  typedef struct { longint v [4]; int slot; longint due; } exp_t;
  exp_t expq[$];

  always @(posedge clk) begin
    if (rst_n && out_tag[0].valid) begin
      exp_t e;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = expq.pop_front();
        for (int g = 0; g < 4; g++) begin
          checks++;
          if (longint'(out_data[g]) != e.v[g] || out_tag[g].slot != 3'(e.slot) || cycle != e.due) begin
            failures++;
            if (failures < 10)
              $display("dut %0d slot %0d: got %0d expected %0d (cycle %0d/%0d)",
                       g, e.slot, out_data[g], e.v[g], cycle, e.due);
          end
        end
      end
    end
  end

  initial begin
    exp_t e;
    longint x;
    in_tag = '0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // a quarter of the range keeps every product inside W bits (|coef| < 4)
      x = longint'($signed(W'($urandom))) / 4;
      if (i < 8) x = (i % 2 == 0) ? -(longint'(1) << (W - 3)) : (longint'(1) << (W - 3)) - 1;
      in_tag = '{valid: 1'b1, slot: 3'(i % 8)};
      in_data = W'(x);
      for (int g = 0; g < 4; g++) e.v[g] = expect_out(g, i % 8, x);
      e.slot = i % 8;
      e.due = cycle + longint'(MUL_PIPE);
      expq.push_back(e);
    end
    @(negedge clk);
    in_tag = '0;
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d outputs missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
