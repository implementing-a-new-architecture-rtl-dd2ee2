// tb_wpt_top: end-to-end test of the J-level WPT pipeline at its default
// size (L = 4 taps, J = 3 levels, 16-bit samples and coefficients).
//
// The bench feeds NIN input samples in the cycles in which the pipeline
// asks for one (in_take), and checks:
//   * in_take is high exactly every L/2 = 2 cycles,
//   * every result of every level (lvl_*) against a reference packet tree
//     computed here directly from the filter equations with the same
//     number format (Daubechies-4 filters in Q1.15, results shifted right
//     by 15 and saturated to 16 bits, zero history before sample 0),
//   * the saturation flag against the reference,
//   * the production schedule: P_i finishes window m in cycle m*L + 1 + i
//     for parent band 2^i - 1 - (m mod 2^i), so results appear one cycle
//     later; the first 16 cycles are compared with the published schedule
//     table entry by entry,
//   * that all 2^J output bands are produced in every 2^(J-1)*L = 16 cycles.
// It counts how often each mechanism happened (every band of every level
// produced, reads from the high and the low bank of each memory with two
// banks, saturation, full repetitions of the 32-cycle address pattern) and
// counts a failure for one that never did.
module tb_wpt_top;
  import wpt_pkg::*;

  localparam int L = 4, J = 3, W = 16, CW = 16, FRAC = 15;
  localparam int S = L / 2;
  localparam int NIN = 512;
  localparam int NB = 1 << J;
  localparam int RUN_CYCLES = NIN * S + 8 * NB * L;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_take;
  logic signed [W-1:0]  in_data;
  logic signed [CW-1:0] g_coef [L];
  logic signed [CW-1:0] h_coef [L];
  logic                 lvl_valid [J];
  logic [J-1:0]         lvl_band_hi [J];
  logic signed [W-1:0]  lvl_hi [J];
  logic signed [W-1:0]  lvl_lo [J];
  logic                 lvl_sat [J];
  logic                 out_valid;
  logic [J-1:0]         out_band_hi, out_band_lo;
  logic signed [W-1:0]  out_hi, out_lo;

  wpt_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  // Daubechies-4 analysis filters in Q1.15; g(k) = (-1)^k h(L-1-k).
  localparam int H [L] = '{15826, 27411, 7345, -4240};

  longint x    [NIN];
  longint yref [J+1][NB][NIN];
  bit     sref [J+1][NB][NIN];
  int     cnt  [J+1][NB];

  // mechanism counters
  int band_seen [J+1][NB];
  int bank_hi_reads [J], bank_lo_reads [J];
  int sat_events = 0;
  int out_in_16 [NB];

  initial begin
    for (int k = 0; k < L; k++) begin
      h_coef[k] = CW'(H[k]);
      g_coef[k] = CW'(((k % 2) == 0 ? 1 : -1) * H[L - 1 - k]);
    end
    for (int n = 0; n < NIN; n++) begin
      if (n < NIN / 4)           x[n] = longint'($urandom_range(4000)) - 2000;
      else if (n < NIN / 2)      x[n] = longint'($urandom_range(65535)) - 32768;
      else if (n == NIN / 2 + 7) x[n] = 20000;            // impulse
      else if (n < 3 * NIN / 4)  x[n] = 0;
      else                       x[n] = (n % 16 < 8) ? 30000 : -30000;  // square wave
    end
    // reference tree
    for (int n = 0; n < NIN; n++) yref[0][0][n] = x[n];
    for (int i = 0; i < J; i++)
      for (int b = 0; b < (1 << i); b++)
        for (int l = 0; l < (NIN >> (i + 1)); l++) begin
          longint sg, sh, q;
          sg = 0; sh = 0;
          for (int k = 0; k < L; k++)
            if (2 * l - k >= 0) begin
              sg += longint'(g_coef[k]) * yref[i][b][2 * l - k];
              sh += longint'(h_coef[k]) * yref[i][b][2 * l - k];
            end
          q = sg >>> FRAC;
          sref[i+1][2*b+1][l] = (q > 32767) || (q < -32768);
          yref[i+1][2*b+1][l] = (q > 32767) ? 32767 : (q < -32768) ? -32768 : q;
          q = sh >>> FRAC;
          sref[i+1][2*b][l] = (q > 32767) || (q < -32768);
          yref[i+1][2*b][l] = (q > 32767) ? 32767 : (q < -32768) ? -32768 : q;
        end
  end

  // Published schedule for L = 4, J = 3, cycles 0..15: (cycle, level, high band)
  localparam int NTAB = 12;
  localparam int TAB [NTAB][3] = '{
    '{1, 0, 1}, '{2, 1, 3}, '{3, 2, 7}, '{5, 0, 1}, '{6, 1, 1}, '{7, 2, 5},
    '{9, 0, 1}, '{10, 1, 3}, '{11, 2, 3}, '{13, 0, 1}, '{14, 1, 1}, '{15, 2, 1}};

  int cyc = 0;
  int n_in = 0;

  initial begin
    in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;               // cycle 0 begins
    forever begin
      // ---- drive the input of this cycle
      check(in_take == ((cyc % S) == 0), $sformatf("in_take at cycle %0d", cyc));
      if (in_take) begin
        in_data = (n_in < NIN) ? W'(x[n_in]) : '0;
        n_in++;
      end
      // ---- check the results visible in this cycle
      for (int i = 0; i < J; i++) begin
        bit tab_expect;
        int tab_band;
        tab_expect = 0; tab_band = 0;
        if (cyc >= 1 && cyc <= 16)
          for (int t = 0; t < NTAB; t++)
            if (TAB[t][0] == cyc - 1 && TAB[t][1] == i) begin
              tab_expect = 1; tab_band = TAB[t][2];
            end
        if (cyc >= 1 && cyc <= 16) begin
          check(lvl_valid[i] == tab_expect,
                $sformatf("schedule table: level %0d valid=%0d in cycle %0d", i, lvl_valid[i], cyc));
          if (tab_expect && lvl_valid[i])
            check(int'(lvl_band_hi[i]) == tab_band,
                  $sformatf("schedule table: level %0d band %0d, want %0d", i, lvl_band_hi[i], tab_band));
        end
        begin
          int ph;
          bit want;
          ph = cyc - 2 - i;
          want = (ph >= 0) && (ph % L == 0);
          check(lvl_valid[i] == want, $sformatf("level %0d valid=%0d in cycle %0d", i, lvl_valid[i], cyc));
          if (want && lvl_valid[i]) begin
            int m, b, bh, bl, l;
            m  = ph / L;
            b  = (1 << i) - 1 - (m % (1 << i));
            bh = 2 * b + 1; bl = 2 * b;
            l  = m >> i;
            check(int'(lvl_band_hi[i]) == bh,
                  $sformatf("level %0d cycle %0d band %0d want %0d", i, cyc, lvl_band_hi[i], bh));
            check(cnt[i+1][bh] == l && cnt[i+1][bl] == l,
                  $sformatf("level %0d cycle %0d sample index %0d want %0d", i, cyc, cnt[i+1][bh], l));
            if (l < (NIN >> (i + 1))) begin
              check(longint'(lvl_hi[i]) == yref[i+1][bh][l],
                    $sformatf("y(%0d,%0d)[%0d] = %0d, want %0d", i+1, bh, l, lvl_hi[i], yref[i+1][bh][l]));
              check(longint'(lvl_lo[i]) == yref[i+1][bl][l],
                    $sformatf("y(%0d,%0d)[%0d] = %0d, want %0d", i+1, bl, l, lvl_lo[i], yref[i+1][bl][l]));
              check(lvl_sat[i] == (sref[i+1][bh][l] | sref[i+1][bl][l]),
                    $sformatf("sat flag level %0d index %0d", i, l));
              if (lvl_sat[i]) sat_events++;
              band_seen[i+1][bh]++;
              band_seen[i+1][bl]++;
              if (i > 0) begin
                if (b % 2 == 1) bank_hi_reads[i]++; else bank_lo_reads[i]++;
              end
            end
            cnt[i+1][bh]++;
            cnt[i+1][bl]++;
          end
        end
      end
      if (out_valid) begin
        check(out_band_hi == lvl_band_hi[J-1] && out_band_lo == (lvl_band_hi[J-1] - 1) &&
              out_hi == lvl_hi[J-1] && out_lo == lvl_lo[J-1], "out_* mirror the last level");
        out_in_16[out_band_hi]++;
        out_in_16[out_band_lo]++;
      end
      // every 16 cycles (after the pipeline filled) all 2^J bands came out once
      if (cyc >= J + 2 && ((cyc - (J + 1)) % (NB / 2 * L)) == 0) begin
        for (int j = 0; j < NB; j++) begin
          check(out_in_16[j] == 1, $sformatf("band %0d produced %0d times in a 16-cycle period", j, out_in_16[j]));
          out_in_16[j] = 0;
        end
      end else if (cyc == J + 1) begin
        for (int j = 0; j < NB; j++) out_in_16[j] = 0;
      end
      @(negedge clk);
      cyc++;
      if (cyc == RUN_CYCLES) break;
    end
    // ---- mechanism coverage
    for (int i = 1; i <= J; i++)
      for (int b = 0; b < (1 << i); b++)
        check(band_seen[i][b] > 0, $sformatf("band y(%0d,%0d) never produced", i, b));
    for (int i = 1; i < J; i++) begin
      check(bank_hi_reads[i] > 0, $sformatf("high bank of M_%0d never read", i));
      check(bank_lo_reads[i] > 0, $sformatf("low bank of M_%0d never read", i));
    end
    check(sat_events > 0, "no saturated result");
    check(cyc / (NB / 2 * L * L / 2) >= 2, "address pattern did not repeat");
    $display("mechanisms: bands of level %0d produced: y(%0d,0) %0d times; high/low bank reads M1 %0d/%0d, M2 %0d/%0d; saturations %0d; address patterns %0d",
             J, J, band_seen[J][0], bank_hi_reads[1], bank_lo_reads[1], bank_hi_reads[2], bank_lo_reads[2],
             sat_events, cyc / (NB / 2 * L * L / 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN_CYCLES + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
