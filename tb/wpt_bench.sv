// wpt_bench: reusable end-to-end bench for wpt_top at any even L and any J.
//
// Draws random coefficient pairs and NIN random input samples, computes the
// full packet tree here from the filter equations (same number format as
// the pipeline: Q1.15 coefficients, shift by 15, saturate to 16 bits, zero
// history), feeds the pipeline whenever in_take is high and checks
//   * in_take every L/2 cycles,
//   * every level's results: value, band, sample index and saturation flag,
//   * the schedule: P_i ends window m in cycle m*L + 1 + i with parent band
//     2^i - 1 - (m mod 2^i) (results visible one cycle later),
//   * that every band of every level was produced.
// Reports its counts on the output ports and raises `done` at the end.
module wpt_bench #(
  parameter int L   = 4,
  parameter int J   = 3,
  parameter int NIN = 256
) (
  output int checks,
  output int failures,
  output bit done
);
  localparam int W = 16, CW = 16, FRAC = 15;
  localparam int S = L / 2;
  localparam int NB = 1 << J;
  localparam int RUN_CYCLES = NIN * S + 4 * NB * L;

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

  wpt_top #(.L(L), .J(J)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL (L=%0d J=%0d): %s", L, J, what);
    end
  endtask

  longint x    [NIN];
  longint yref [J+1][NB][NIN];
  bit     sref [J+1][NB][NIN];
  int     cnt  [J+1][NB];

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int k = 0; k < L; k++) begin
      h_coef[k] = CW'(int'($urandom_range(16000)) - 8000);
      g_coef[k] = CW'(int'($urandom_range(16000)) - 8000);
    end
    for (int n = 0; n < NIN; n++)
      x[n] = (n < NIN / 2) ? longint'($urandom_range(8000)) - 4000
                           : longint'($urandom_range(65535)) - 32768;
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

  initial begin
    int cyc, n_in;
    cyc = 0; n_in = 0;
    in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (cyc < RUN_CYCLES) begin
      chk(in_take == ((cyc % S) == 0), $sformatf("in_take at cycle %0d", cyc));
      if (in_take) begin
        in_data = (n_in < NIN) ? W'(x[n_in]) : '0;
        n_in++;
      end
      for (int i = 0; i < J; i++) begin
        int ph;
        bit want;
        ph = cyc - 2 - i;
        want = (ph >= 0) && (ph % L == 0);
        chk(lvl_valid[i] == want, $sformatf("level %0d valid=%0d in cycle %0d", i, lvl_valid[i], cyc));
        if (want && lvl_valid[i]) begin
          int m, b, bh, bl, l;
          m  = ph / L;
          b  = (1 << i) - 1 - (m % (1 << i));
          bh = 2 * b + 1; bl = 2 * b;
          l  = m >> i;
          chk(int'(lvl_band_hi[i]) == bh, $sformatf("level %0d cycle %0d band %0d want %0d", i, cyc, lvl_band_hi[i], bh));
          chk(cnt[i+1][bh] == l, $sformatf("level %0d cycle %0d index", i, cyc));
          if (l < (NIN >> (i + 1))) begin
            chk(longint'(lvl_hi[i]) == yref[i+1][bh][l] && longint'(lvl_lo[i]) == yref[i+1][bl][l],
                $sformatf("y(%0d,%0d/%0d)[%0d] = %0d/%0d, want %0d/%0d", i+1, bh, bl, l,
                          lvl_hi[i], lvl_lo[i], yref[i+1][bh][l], yref[i+1][bl][l]));
            chk(lvl_sat[i] == (sref[i+1][bh][l] | sref[i+1][bl][l]), "saturation flag");
          end
          cnt[i+1][bh]++;
          cnt[i+1][bl]++;
        end
      end
      @(negedge clk);
      cyc++;
    end
    for (int i = 1; i <= J; i++)
      for (int b = 0; b < (1 << i); b++)
        chk(cnt[i][b] > 0, $sformatf("band y(%0d,%0d) never produced", i, b));
    done = 1;
  end
endmodule
