// tb_elastic_buffer: sends frames of random samples (with random idle gaps
// between frames) and checks the reordered operand stream: slot 0 -> s0,
// slot 1 -> s2 - s0 (sub set), slot 2 -> s1, slots 3..7 -> s3..s7, each
// output two cycles after the input sample of the same slot.
module tb_elastic_buffer;
  import idct_pkg::*;
  localparam int unsigned W = 17;

  logic clk = 0, rst_n = 0;
  tag_t in_tag, out_tag;
  logic signed [W-1:0] in_data, a, b;
  logic sub;
  int checks = 0, failures = 0;
  longint cycle = 0;

  elastic_buffer #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output per slot: operand a, operand b (only if sub), sub, due cycle
  typedef struct { int a; int b; bit sub; int slot; longint due; } exp_t;
  exp_t expq[$];

  always @(posedge clk) begin
    if (rst_n && out_tag.valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = expq.pop_front();
        if (int'(a) != e.a || sub != e.sub || (e.sub && int'(b) != e.b) ||
            int'(out_tag.slot) != e.slot || cycle != e.due) begin
          failures++;
          if (failures < 10)
            $display("slot %0d: a=%0d b=%0d sub=%0d cyc=%0d, expected a=%0d b=%0d sub=%0d cyc=%0d",
                     out_tag.slot, a, b, sub, cycle, e.a, e.b, e.sub, e.due);
        end
      end
    end
  end

  initial begin
    int s [8];
    longint t [8];
    in_tag = '0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 300; f++) begin
      for (int k = 0; k < 8; k++) begin
        @(negedge clk);
        s[k] = int'(W'($urandom)) - (1 << (W - 1));
        t[k] = cycle;
        in_tag = '{valid: 1'b1, slot: 3'(k)};
        in_data = W'(s[k]);
        // output of slot k appears at the clock edge 2 cycles after its input edge
        if (k == 0) expq.push_back('{s[0], 0, 1'b0, 0, t[0] + 2});
        if (k == 2) begin
          expq.push_back('{s[2], s[0], 1'b1, 1, t[1] + 2});
          expq.push_back('{s[1], 0,    1'b0, 2, t[2] + 2});
        end
        if (k >= 3) expq.push_back('{s[k], 0, 1'b0, k, t[k] + 2});
      end
      if ($urandom_range(0, 2) == 0) begin
        @(negedge clk);
        in_tag = '0;
        repeat ($urandom_range(0, 5)) @(negedge clk);
      end
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
