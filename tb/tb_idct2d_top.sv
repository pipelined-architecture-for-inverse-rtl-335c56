// tb_idct2d_top: end-to-end test of the 8x8 IDCT at its default parameters.
//
// Pixel blocks are drawn with the IEEE 1180 generator from the ranges
// [-256,255], [-5,5] and [-300,300] (the last one makes the output clip),
// plus all-zero blocks; their DCT is computed in double precision, rounded
// and clipped to 12 bits, and fed to the design row by row (coefficients of a
// row in the order 7,5,3,1,6,2,4,0), sometimes with idle cycles between rows.
// Every output pixel is compared, at the position out_row/out_col names, with
// the double-precision IDCT rounded and clipped to [-256,255]; the difference
// may be at most 1.  The first pixel must appear 2*(14+3*MUL_PIPE)+66 cycles
// after the first coefficient.
//
// Mechanisms that must each happen at least once: chain subtractions and
// the offset-two subtraction in the front ends, butterflies in all three
// PEs, both transpose banks, a back-to-back bank read, idle gaps between
// rows, clipping at both ends, and all-zero blocks giving all-zero output.
module tb_idct2d_top;
  import idct_pkg::*;
  import idct_ref_pkg::*;
  localparam int BLOCKS = 400;
  localparam int MUL_PIPE = 2;
  localparam int FIRST_OUT = 2 * (14 + 3 * MUL_PIPE) + 66;
  localparam int V_ORD [8] = '{7, 5, 3, 1, 6, 2, 4, 0};

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic signed [11:0] in_coef;
  logic out_valid;
  logic signed [8:0] out_pixel;
  logic [2:0] out_row, out_col;
  int checks = 0, failures = 0;
  longint cycle = 0, first_in = -1, first_out = -1;

  idct2d_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (BLOCKS * 80 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference pixels of the blocks in flight
  int refmem [BLOCKS][8][8];
  int got = 0, exact = 0, zero_blocks = 0, zero_ok = 0;
  bit cur_zero;
  bit zero_flag [BLOCKS];
  bit blk_all_zero;

  // mechanism counters
  int n_chain_sub = 0, n_off2_sub = 0, n_bfly [3] = '{0, 0, 0}, n_bank [2] = '{0, 0};
  int n_b2b_read = 0, n_gaps = 0, n_clip_hi = 0, n_clip_lo = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_row.s1_sub) n_chain_sub++;
    if (dut.u_row.eb_sub && dut.u_row.eb_tag.valid) n_off2_sub++;
    if (dut.u_row.g_stage[0].u_pe.second_half) n_bfly[0]++;
    if (dut.u_row.g_stage[1].u_pe.second_half) n_bfly[1]++;
    if (dut.u_row.g_stage[2].u_pe.second_half) n_bfly[2]++;
    if (dut.u_transpose.wr_last) n_bank[dut.u_transpose.wr_bank]++;
    if (dut.u_transpose.rd_last && (dut.u_transpose.full[!dut.u_transpose.rd_bank])) n_b2b_read++;
    if (out_valid && out_pixel == 9'sd255 && dut.col_out > (17'sd255 <<< 7)) n_clip_hi++;
    if (out_valid && out_pixel == -9'sd256 && dut.col_out < -(17'sd257 <<< 7)) n_clip_lo++;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && got < BLOCKS * 64) begin
      int e, err;
      if (first_out < 0) first_out = cycle;
      if (got % 64 == 0 && got < BLOCKS * 64) begin
        cur_zero = zero_flag[got / 64];
        blk_all_zero = 1;
      end
      e = refmem[got / 64][out_row][out_col];
      err = int'(out_pixel) - e;
      checks++;
      if (err == 0) exact++;
      if (out_pixel != 0) blk_all_zero = 0;
      if (err > 1 || err < -1 || out_col != 3'((got % 64) / 8)) begin
        failures++;
        if (failures < 10) $display("block %0d pixel (%0d,%0d): got %0d expected %0d",
                                    got / 64, out_row, out_col, out_pixel, e);
      end
      got++;
      if (got % 64 == 0 && cur_zero) begin
        checks++;
        zero_ok++;
        if (!blk_all_zero) begin
          failures++;
          $display("all-zero block gave a non-zero pixel");
        end
      end
    end
  end

  initial begin
    ieee_rand rng;
    blk_t p, f, r;
    int fi [8][8], ri [8][8];
    int lo, hi;
    rng = new();
    in_valid = 0; in_coef = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < BLOCKS; b++) begin
      case (b % 8)
        0, 1, 2, 3: begin lo = 256; hi = 255; end
        4, 5:       begin lo = 300; hi = 300; end
        6:          begin lo = 5;   hi = 5;   end
        default:    begin lo = 0;   hi = 0;   end
      endcase
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) p[y][x] = real'(rng.next(lo, hi));
      f = fdct8x8(p);
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          fi[u][v] = clip(round_int(f[u][v]), -2048, 2047);
          f[u][v] = real'(fi[u][v]);
        end
      r = idct8x8(f);
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) ri[y][x] = clip(round_int(r[y][x]), -256, 255);
      refmem[b] = ri;
      zero_flag[b] = (lo == 0 && hi == 0);
      for (int u = 0; u < 8; u++) begin
        for (int s = 0; s < 8; s++) begin
          @(negedge clk);
          if (first_in < 0) first_in = cycle;
          in_valid = 1;
          in_coef = 12'(fi[u][V_ORD[s]]);
        end
        if (b % 5 == 3 && u % 3 == 0) begin
          @(negedge clk);
          in_valid = 0;
          n_gaps++;
          repeat ($urandom_range(0, 4)) @(negedge clk);
        end
      end
    end
    // one more block of zeros pushes the last results out of the pipelines
    for (int i = 0; i < 72; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_coef = '0;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (200) @(posedge clk);

    checks++;
    if (got < BLOCKS * 64) begin
      failures++;
      $display("only %0d of %0d pixels came out", got, BLOCKS * 64);
    end
    checks++;
    if (first_out - first_in != longint'(FIRST_OUT)) begin
      failures++;
      $display("first pixel after %0d cycles, expected %0d", first_out - first_in, FIRST_OUT);
    end
    $display("pixels %0d, exact %0d, all-zero blocks %0d", got, exact, zero_ok);
    $display("mechanisms: chain-sub %0d, offset-2 sub %0d, butterflies %0d/%0d/%0d, bank0 %0d, bank1 %0d, back-to-back reads %0d, row gaps %0d, clip high %0d, clip low %0d",
             n_chain_sub, n_off2_sub, n_bfly[0], n_bfly[1], n_bfly[2], n_bank[0], n_bank[1],
             n_b2b_read, n_gaps, n_clip_hi, n_clip_lo);
    foreach (n_bfly[i]) begin checks++; if (n_bfly[i] == 0) failures++; end
    checks++; if (n_chain_sub == 0) failures++;
    checks++; if (n_off2_sub == 0) failures++;
    checks++; if (n_bank[0] == 0 || n_bank[1] == 0) failures++;
    checks++; if (n_b2b_read == 0) failures++;
    checks++; if (n_gaps == 0) failures++;
    checks++; if (n_clip_hi == 0 || n_clip_lo == 0) failures++;
    checks++; if (zero_ok == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
