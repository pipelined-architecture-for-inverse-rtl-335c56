// tb_round_clip: random and edge values; the reference rounds with real
// arithmetic (floor(d/2^FRAC + 0.5)) and clips to [-256, 255].
module tb_round_clip;
  localparam int unsigned W = 17, FRAC = 5;
  logic signed [W-1:0] d;
  logic signed [8:0]   q;
  int checks = 0, failures = 0;

  round_clip #(.W(W), .FRAC(FRAC)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int v);
    int e;
    d = W'(v);
    #1;
    e = int'($floor(real'(v) / real'(1 << FRAC) + 0.5));
    if (e > 255) e = 255;
    if (e < -256) e = -256;
    checks++;
    if (int'(q) != e) begin
      failures++;
      if (failures < 10) $display("d=%0d q=%0d expected %0d", v, q, e);
    end
  endtask

  initial begin
    for (int v = -256 * 32 - 40; v < 256 * 32 + 40; v++) check(v);
    check(-(1 << (W - 1)));
    check((1 << (W - 1)) - 1);
    for (int i = 0; i < 5000; i++) check(int'(W'($urandom)) - (1 << (W - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
