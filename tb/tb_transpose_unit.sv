// tb_transpose_unit: writes blocks whose every word encodes its position
// (block*64 + row*8 + column, with row-frame slot p holding column
// 5,4,6,7,2,3,1,0[p]) and checks that each block is read back column by
// column, rows in the order 7,5,3,1,6,2,4,0, with slot tags 0..7.  Blocks come
// back to back and with idle gaps between rows, so both banks and the
// full-bank wait are exercised.
module tb_transpose_unit;
  import idct_pkg::*;
  localparam int unsigned W = 17;
  localparam int ROW_ORD [8] = '{7, 5, 3, 1, 6, 2, 4, 0};
  localparam int COL_OF_SLOT [8] = '{5, 4, 6, 7, 2, 3, 1, 0};
  localparam int BLOCKS = 200;

  logic clk = 0, rst_n = 0;
  tag_t in_tag, out_tag;
  logic signed [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  int got = 0;

  transpose_unit #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader: the got-th output word must be block got/64, column (got/8)%8,
  // row ROW_ORD[got%8]
  always @(posedge clk) begin
    if (rst_n && out_tag.valid) begin
      int b, n, k, e;
      b = got / 64; n = (got / 8) % 8; k = got % 8;
      e = (b * 64 + ROW_ORD[k] * 8 + n) % (1 << (W - 1));
      checks++;
      if (int'(out_data) != e || int'(out_tag.slot) != k) begin
        failures++;
        if (failures < 10) $display("word %0d: got %0d slot %0d, expected %0d slot %0d",
                                    got, out_data, out_tag.slot, e, k);
      end
      got++;
    end
  end

  initial begin
    in_tag = '0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < BLOCKS; b++) begin
      for (int u = 0; u < 8; u++) begin
        for (int p = 0; p < 8; p++) begin
          @(negedge clk);
          in_tag = '{valid: 1'b1, slot: 3'(p)};
          in_data = W'((b * 64 + u * 8 + COL_OF_SLOT[p]) % (1 << (W - 1)));
        end
        if (b % 3 == 1 && $urandom_range(0, 1) == 0) begin
          @(negedge clk);
          in_tag = '0;
          repeat ($urandom_range(0, 6)) @(negedge clk);
        end
      end
    end
    @(negedge clk);
    in_tag = '0;
    repeat (140) @(posedge clk);
    checks++;
    if (got != BLOCKS * 64) begin
      failures++;
      $display("read %0d words, expected %0d", got, BLOCKS * 64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
