// tb_idct1d_pipeline: end-to-end test of the 8-point pipeline.
//
// Random coefficient frames (arbitrary ones with |X| < 2^(W-5), and frames
// that are the DCT of random signals within +-12000) are sent in the input order X7,X5,X3,X1,X6,X2,X4,X0,
// with idle gaps between some frames.  Each output slot s is compared with the
// floating-point orthonormal IDCT, times the pipeline gain of 4, at
// n = 5,4,6,7,2,3,1,0; the error must
// stay within 20 LSBs (5 LSBs of x), about 2^-12 of full scale: with the stages using the
// whole word, coefficient and product rounding at W = 17 add up to about
// 16 LSBs in the worst frames.  A second instance with W = 22 and two's-complement
// truncation gets the same frames scaled by 2^5.  Every output must appear
// exactly LATENCY = 14 + 3*MUL_PIPE cycles after the input of its slot.
// A third instance has deeper multipliers (MUL_PIPE = 5): its outputs must
// equal the first instance's bit for bit, 3*(5-2) cycles later, which shows
// that the multipliers can be pipelined freely without touching the PEs.
module tb_idct1d_pipeline;
  import idct_pkg::*;
  import idct_ref_pkg::*;
  localparam int unsigned W = 17, W2 = 22, MUL_PIPE = 2, MUL_PIPE_DEEP = 5;
  localparam int unsigned DEEP_EXTRA = 3 * (MUL_PIPE_DEEP - MUL_PIPE);
  localparam int unsigned LATENCY = 14 + 3 * MUL_PIPE;
  localparam int IN_ORD [8]  = '{7, 5, 3, 1, 6, 2, 4, 0};
  localparam int OUT_ORD [8] = '{5, 4, 6, 7, 2, 3, 1, 0};

  logic clk = 0, rst_n = 0;
  tag_t in_tag, out_tag, out_tag2, out_tag5;
  logic signed [W-1:0]  in_data, out_data, out_data5;
  logic signed [W2-1:0] in_data2, out_data2;
  int checks = 0, failures = 0;
  longint cycle = 0;
  real max_err = 0.0, max_err2 = 0.0;

  idct1d_pipeline #(.W(W), .QUANT(QUANT_ROUND), .MUL_PIPE(MUL_PIPE)) dut (
    .clk, .rst_n, .in_tag, .in_data, .out_tag, .out_data);
  idct1d_pipeline #(.W(W2), .QUANT(QUANT_TRUNC), .MUL_PIPE(MUL_PIPE)) dut22 (
    .clk, .rst_n, .in_tag, .in_data(in_data2), .out_tag(out_tag2), .out_data(out_data2));
  idct1d_pipeline #(.W(W), .QUANT(QUANT_ROUND), .MUL_PIPE(MUL_PIPE_DEEP)) dut_deep (
    .clk, .rst_n, .in_tag, .in_data, .out_tag(out_tag5), .out_data(out_data5));

  // outputs of dut, replayed against the deeper pipeline
  typedef struct { logic signed [W-1:0] v; int slot; longint due; } rep_t;
  rep_t repq[$];
  int n_deep = 0;
  always @(posedge clk) begin
    if (rst_n && out_tag.valid)
      repq.push_back('{out_data, int'(out_tag.slot), cycle + longint'(DEEP_EXTRA)});
    if (rst_n && out_tag5.valid) begin
      rep_t r;
      checks++;
      n_deep++;
      if (repq.size() == 0) begin
        failures++;
        $display("unexpected output of the deep pipeline");
      end else begin
        r = repq.pop_front();
        if (out_data5 != r.v || int'(out_tag5.slot) != r.slot || cycle != r.due) begin
          failures++;
          if (failures < 10)
            $display("deep pipeline slot %0d: got %0d expected %0d, cycle %0d/%0d",
                     r.slot, out_data5, r.v, cycle, r.due);
        end
      end
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { real v; real tol; int slot; longint due; } exp_t;
  exp_t expq[$];

  always @(posedge clk) begin
    if (rst_n && out_tag.valid) begin
      exp_t e;
      real err, err2;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = expq.pop_front();
        err  = fabs(real'(out_data) - e.v);
        err2 = fabs(real'(out_data2) / 32.0 - e.v);
        if (err > max_err) max_err = err;
        if (err2 > max_err2) max_err2 = err2;
        if (err > e.tol || err2 > e.tol / 8.0 || !out_tag2.valid ||
            int'(out_tag.slot) != e.slot || cycle != e.due) begin
          failures++;
          if (failures < 10)
            $display("slot %0d: got %0d (%f) expected %f, cycle %0d/%0d",
                     e.slot, out_data, real'(out_data2) / 32.0, e.v, cycle, e.due);
        end
      end
    end
  end

  initial begin
    real X [8], sig [8], x [8];
    longint t [8];
    int lim;
    real tol;
    in_tag = '0; in_data = '0; in_data2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3000; f++) begin
      if (f % 2 == 0) begin
        // arbitrary coefficients, up to the guaranteed range
        lim = (f < 20) ? (1 << (W - 5)) - 1 : $urandom_range(1, (1 << (W - 5)) - 1);
        for (int k = 0; k < 8; k++)
          X[k] = (f < 20) ? ((($urandom_range(0, 1) == 0) ? -lim : lim))
                          : real'($urandom_range(0, 2 * lim)) - lim;
      end else begin
        // DCT of a random signal bounded by 12000 < 2^(W-1)/5.2
        for (int n = 0; n < 8; n++) sig[n] = real'($urandom_range(0, 2 * 12000)) - 12000;
        for (int k = 0; k < 8; k++) begin
          X[k] = 0.0;
          for (int n = 0; n < 8; n++) X[k] += dct_c(k, n) * sig[n];
          X[k] = real'(round_int(X[k]));
        end
      end
      for (int n = 0; n < 8; n++) begin
        x[n] = 0.0;
        for (int k = 0; k < 8; k++) x[n] += dct_c(k, n) * X[k];
        x[n] = 4.0 * x[n];
      end
      for (int s = 0; s < 8; s++) begin
        @(negedge clk);
        t[s] = cycle;
        in_tag = '{valid: 1'b1, slot: 3'(s)};
        in_data = W'(int'(X[IN_ORD[s]]));
        in_data2 = W2'(int'(X[IN_ORD[s]]) * 32);
      end
      tol = 20.0;
      for (int s = 0; s < 8; s++) expq.push_back('{x[OUT_ORD[s]], tol, s, t[s] + longint'(LATENCY)});
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        in_tag = '0;
        repeat ($urandom_range(0, 12)) @(negedge clk);
      end
    end
    @(negedge clk);
    in_tag = '0;
    repeat (LATENCY + 3 * (MUL_PIPE_DEEP - MUL_PIPE) + 4) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d outputs missing", expq.size());
    end
    checks++;
    if (repq.size() != 0 || n_deep != 3000 * 8) begin
      failures++;
      $display("deep pipeline: %0d outputs, %0d missing", n_deep, repq.size());
    end
    $display("largest error: %f LSB (W=%0d, rounding), %f LSB of the W=%0d input scale (truncation)",
             max_err, W, max_err2, W2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
