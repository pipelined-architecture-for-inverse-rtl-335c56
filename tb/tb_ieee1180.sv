// tb_ieee1180: the IEEE 1180-1990 accuracy test of an 8x8 IDCT, run as a
// word-length sweep on twelve instances of idct2d_top side by side:
// W = 15..20 with round-to-nearest and W = 19..24 with two's-complement
// truncation, each with ROW_SHIFT = W - 14 (3 at the default W = 17).
//   * W >= 18 rounding and W >= 23 truncation must meet every limit of the
//     standard; these are the narrowest words of this design that do.
//   * The default W = 17 rounding must keep the peak error within 1; its mean
//     and mean-square errors exceed the limits and are only printed.
//   * The other widths are printed only, as error-versus-width curves.
// At the end a table gives, per configuration, the worst value of each
// statistic over the six sets.
//
// Six data sets of NBLK blocks each: pixels drawn with the standard's
// generator from [-256,255], [-5,5] and [-300,300], and the same three with
// the sign of every pixel inverted.  Each block gets a double-precision DCT,
// rounded and clipped to [-2048,2047]; the reference output is the
// double-precision IDCT of those coefficients, rounded and clipped to
// [-256,255].  Per set the test demands
//   peak |error| <= 1 at every pixel position,
//   mean square error <= 0.06 at every position and <= 0.02 overall,
//   |mean error| <= 0.015 at every position and <= 0.0015 overall,
// and an all-zero block must give all-zero pixels.  Each limit is one check
// per checked configuration and set; the measured values are printed.
module tb_ieee1180;
  import idct_pkg::*;
  import idct_ref_pkg::*;
  localparam int NBLK = 10000;
  localparam int V_ORD [8] = '{7, 5, 3, 1, 6, 2, 4, 0};

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic signed [11:0] in_coef;
  // Word-length sweep: configurations 0..5 round, 6..11 truncate.  ROW_SHIFT
  // grows with W so that every configuration has the same headroom as the
  // default.  CFG_LEVEL: 0 = statistics printed only, 1 = peak error checked,
  // 2 = every limit of the standard checked.
  localparam int NCFG = 12;
  localparam int CFG_W [NCFG]     = '{15, 16, 17, 18, 19, 20, 19, 20, 21, 22, 23, 24};
  localparam bit CFG_T [NCFG]     = '{0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1};
  localparam int CFG_LEVEL [NCFG] = '{0, 0, 1, 2, 2, 2, 0, 0, 0, 0, 2, 2};
  logic out_valid [NCFG];
  logic signed [8:0] out_pixel [NCFG];
  logic [2:0] out_row [NCFG], out_col [NCFG];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    idct2d_top #(
      .W        (CFG_W[g]),
      .QUANT    (CFG_T[g] ? QUANT_TRUNC : QUANT_ROUND),
      .ROW_SHIFT(CFG_W[g] - 14)
    ) u_dut (
      .clk, .rst_n, .in_valid, .in_coef, .out_valid(out_valid[g]),
      .out_pixel(out_pixel[g]), .out_row(out_row[g]), .out_col(out_col[g]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (6 * (NBLK + 4) * 64 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference pixels, a ring of blocks in flight
  localparam int RING = 8;
  int refmem [RING][8][8];
  int got [NCFG];
  int limit_blocks = 0;

  // error statistics per configuration
  longint sum_err [NCFG][8][8], sum_sq [NCFG][8][8];
  int peak [NCFG][8][8];
  // worst value of each statistic over all six sets
  real sw_pmse [NCFG], sw_omse [NCFG], sw_pme [NCFG], sw_ome [NCFG];
  int  sw_peak [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && out_valid[g] && got[g] < limit_blocks * 64) begin
        int e, err;
        e = refmem[(got[g] / 64) % RING][out_row[g]][out_col[g]];
        err = int'(out_pixel[g]) - e;
        sum_err[g][out_row[g]][out_col[g]] += longint'(err);
        sum_sq[g][out_row[g]][out_col[g]] += err * err;
        if ((err < 0 ? -err : err) > peak[g][out_row[g]][out_col[g]])
          peak[g][out_row[g]][out_col[g]] = (err < 0 ? -err : err);
        got[g]++;
      end
    end
  end

  task automatic send_block(input int fi [8][8]);
    for (int u = 0; u < 8; u++)
      for (int s = 0; s < 8; s++) begin
        @(negedge clk);
        in_valid = 1;
        in_coef = 12'(fi[u][V_ORD[s]]);
      end
  endtask

  function automatic string cfg_name(input int g);
    return $sformatf("W=%0d %s", CFG_W[g], CFG_T[g] ? "trunc" : "round");
  endfunction

  task automatic judge(input int set, input int lo, input int hi, input int sgn);
    for (int g = 0; g < NCFG; g++) begin
      real pmse, pme, omse, ome, worst_mse, worst_me;
      int worst_peak;
      worst_mse = 0.0; worst_me = 0.0; worst_peak = 0; omse = 0.0; ome = 0.0;
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) begin
          pmse = real'(sum_sq[g][y][x]) / NBLK;
          pme  = real'(sum_err[g][y][x]) / NBLK;
          omse += pmse / 64.0;
          ome  += pme / 64.0;
          if (pmse > worst_mse) worst_mse = pmse;
          if (fabs(pme) > worst_me) worst_me = fabs(pme);
          if (peak[g][y][x] > worst_peak) worst_peak = peak[g][y][x];
        end
      $display("set %0d [-%0d,%0d] sign %0d, %s: peak %0d, pixel mse %.4f, overall mse %.5f, pixel mean %.4f, overall mean %.5f",
               set, lo, hi, sgn, cfg_name(g), worst_peak, worst_mse, omse, worst_me, fabs(ome));
      if (worst_peak > sw_peak[g])   sw_peak[g] = worst_peak;
      if (worst_mse > sw_pmse[g])    sw_pmse[g] = worst_mse;
      if (omse > sw_omse[g])         sw_omse[g] = omse;
      if (worst_me > sw_pme[g])      sw_pme[g]  = worst_me;
      if (fabs(ome) > sw_ome[g])     sw_ome[g]  = fabs(ome);
      if (CFG_LEVEL[g] == 0) continue;
      checks++;
      if (worst_peak > 1)      failures++;
      if (CFG_LEVEL[g] == 1) continue;
      checks += 4;
      if (worst_mse > 0.06)    failures++;
      if (omse > 0.02)         failures++;
      if (worst_me > 0.015)    failures++;
      if (fabs(ome) > 0.0015)  failures++;
    end
  endtask

  initial begin
    ieee_rand rng;
    blk_t p, f, r;
    int fi [8][8], ri [8][8], zero [8][8];
    int lo, hi, sgn, set;
    in_valid = 0; in_coef = '0;
    for (int g = 0; g < NCFG; g++) begin
      got[g] = 0; sw_peak[g] = 0;
      sw_pmse[g] = 0.0; sw_omse[g] = 0.0; sw_pme[g] = 0.0; sw_ome[g] = 0.0;
    end
    zero = '{default: '{default: 0}};
    repeat (3) @(posedge clk);
    rst_n = 1;
    set = 0;
    for (int sg = 0; sg < 2; sg++)
      for (int rg = 0; rg < 3; rg++) begin
        case (rg)
          0: begin lo = 256; hi = 255; end
          1: begin lo = 5;   hi = 5;   end
          default: begin lo = 300; hi = 300; end
        endcase
        sgn = (sg != 0) ? -1 : 1;
        rng = new();
        // fresh statistics
        for (int g = 0; g < NCFG; g++) begin
          got[g] = 0;
          for (int y = 0; y < 8; y++)
            for (int x = 0; x < 8; x++) begin
              sum_err[g][y][x] = 0; sum_sq[g][y][x] = 0; peak[g][y][x] = 0;
            end
        end
        limit_blocks = NBLK;
        for (int b = 0; b < NBLK; b++) begin
          for (int y = 0; y < 8; y++)
            for (int x = 0; x < 8; x++) p[y][x] = real'(sgn * rng.next(lo, hi));
          f = fdct8x8(p);
          for (int u = 0; u < 8; u++)
            for (int v = 0; v < 8; v++) begin
              fi[u][v] = clip(round_int(f[u][v]), -2048, 2047);
              f[u][v] = real'(fi[u][v]);
            end
          r = idct8x8(f);
          for (int y = 0; y < 8; y++)
            for (int x = 0; x < 8; x++) ri[y][x] = clip(round_int(r[y][x]), -256, 255);
          // results lag by under three blocks, so a ring of eight suffices
          refmem[b % RING] = ri;
          send_block(fi);
        end
        // flush with zero blocks, which must come out as zeros
        for (int b = 0; b < 3; b++) send_block(zero);
        @(negedge clk);
        in_valid = 0;
        repeat (200) @(posedge clk);
        for (int g = 0; g < NCFG; g++) begin
          checks++;
          if (got[g] != NBLK * 64) begin
            failures++;
            $display("configuration %0d: %0d of %0d pixels", g, got[g], NBLK * 64);
          end
        end
        judge(set, lo, hi, sgn);
        set++;
        // between sets the pipelines are idle and empty; outputs of the flush
        // blocks are zero-checked by the all-zero test below
      end
    // all-zero input gives all-zero output
    limit_blocks = 0;
    begin
      int nz;
      nz = 0;
      fork
        begin
          repeat (2) send_block(zero);
          for (int i = 0; i < 80; i++) begin @(negedge clk); in_valid = 1; in_coef = '0; end
          @(negedge clk);
          in_valid = 0;
          repeat (200) @(posedge clk);
        end
        begin
          repeat (64 * 3 + 300) begin
            @(posedge clk);
            for (int g = 0; g < NCFG; g++) if (out_valid[g] && out_pixel[g] != 0) nz++;
          end
        end
      join
      checks++;
      if (nz != 0) begin
        failures++;
        $display("all-zero blocks gave %0d non-zero pixels", nz);
      end
    end
    // summary over the six sets: the error as a function of the word width
    $display("worst over all sets    peak  pixel mse  overall mse  pixel |mean|  overall |mean|");
    for (int g = 0; g < NCFG; g++)
      $display("%-12s           %0d     %.4f     %.5f      %.4f        %.5f%s", cfg_name(g), sw_peak[g],
               sw_pmse[g], sw_omse[g], sw_pme[g], sw_ome[g],
               (sw_peak[g] <= 1 && sw_pmse[g] <= 0.06 && sw_omse[g] <= 0.02 &&
                sw_pme[g] <= 0.015 && sw_ome[g] <= 0.0015) ? "   meets all limits" : "");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
