// tb_special_subtractor: random operands and control; checks y = a - b when
// sub is set and y = a otherwise, one cycle later, and the tag delay.
module tb_special_subtractor;
  import idct_pkg::*;
  localparam int unsigned W = 17;

  logic clk = 0, rst_n = 0;
  tag_t in_tag, out_tag;
  logic signed [W-1:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0;

  special_subtractor #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] ea, eb;
    logic es;
    tag_t et;
    in_tag = '0; a = '0; b = '0; sub = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ea = W'($urandom) >>> 1;  // half range so a - b fits
      eb = W'($urandom) >>> 1;
      es = 1'($urandom);
      et = tag_t'($urandom);
      a = ea; b = eb; sub = es; in_tag = et;
      @(posedge clk); #1;
      checks++;
      if (y !== (es ? ea - eb : ea) || out_tag !== et) begin
        failures++;
        if (failures < 10) $display("mismatch a=%0d b=%0d sub=%0d y=%0d", ea, eb, es, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
