// tb_butterfly_pe: three PEs (pair distance 1, 2, 4) get the same stream of
// random frames, with idle gaps between some frames.  In every group of 2D
// slots the reference output is x[p+D] - x[p] in slot p and x[p+D] + x[p] in
// slot p+D; every output must appear D+1 cycles after the input of its slot.
module tb_butterfly_pe;
  import idct_pkg::*;
  localparam int unsigned W = 17;

  logic clk = 0, rst_n = 0;
  tag_t in_tag;
  logic signed [W-1:0] in_data;
  tag_t out_tag [3];
  logic signed [W-1:0] out_data [3];
  int checks = 0, failures = 0;
  longint cycle = 0;

  for (genvar g = 0; g < 3; g++) begin : g_dut
    butterfly_pe #(.W(W), .D(1 << g)) dut (
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

  typedef struct { int v; int slot; longint due; } exp_t;
  exp_t expq [3][$];

  for (genvar g = 0; g < 3; g++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && out_tag[g].valid) begin
        exp_t e;
        checks++;
        if (expq[g].size() == 0) begin
          failures++;
          $display("D=%0d: unexpected output", 1 << g);
        end else begin
          e = expq[g].pop_front();
          if (int'(out_data[g]) != e.v || int'(out_tag[g].slot) != e.slot || cycle != e.due) begin
            failures++;
            if (failures < 10)
              $display("D=%0d slot %0d: got %0d expected %0d (cycle %0d/%0d)",
                       1 << g, e.slot, out_data[g], e.v, cycle, e.due);
          end
        end
      end
    end
  end

  initial begin
    int x [8];
    longint t [8];
    int d, base;
    int nxt [3];
    in_tag = '0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 500; f++) begin
      nxt = '{0, 0, 0};
      for (int k = 0; k < 8; k++) begin
        @(negedge clk);
        x[k] = int'($urandom >> (33 - W)) - (1 << (W - 2));
        t[k] = cycle;
        in_tag = '{valid: 1'b1, slot: 3'(k)};
        in_data = W'(x[k]);
        // push, in slot order, every expectation whose operands are known
        for (int g = 0; g < 3; g++) begin
          d = 1 << g;
          while (nxt[g] < 8 && ((nxt[g] % (2 * d) < d) ? k >= nxt[g] + d : k >= nxt[g])) begin
            base = nxt[g];
            if (base % (2 * d) < d) expq[g].push_back('{x[base + d] - x[base], base, t[base] + longint'(d) + 1});
            else                    expq[g].push_back('{x[base] + x[base - d], base, t[base] + longint'(d) + 1});
            nxt[g]++;
          end
        end
      end
      if ($urandom_range(0, 2) == 0) begin
        @(negedge clk);
        in_tag = '0;
        repeat ($urandom_range(0, 9)) @(negedge clk);
      end
    end
    @(negedge clk);
    in_tag = '0;
    repeat (12) @(posedge clk);
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (expq[g].size() != 0) begin
        failures++;
        $display("D=%0d: %0d outputs missing", 1 << g, expq[g].size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
