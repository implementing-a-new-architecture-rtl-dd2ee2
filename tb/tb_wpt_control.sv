// tb_wpt_control: data-flow test of the control unit.
//
// Instead of data, the bench keeps a tag (band, sample index) in a model of
// every memory cell. It writes input sample n where and when the control
// unit says (in_take, in_waddr), writes the two results of each processor
// window into the next level's banks at waddr_next, and reads the tag the
// control unit addresses in every cycle. Cells start with the tags of the
// zero history (sample index -L .. -1). It then checks, for the default
// L = 4, J = 3:
//   * in_take is high every second cycle,
//   * each window reads L samples of one band, the band the control unit
//     reports as parent, with consecutive indices oldest first, and with the
//     coefficient index L-1 .. 0,
//   * the newest sample of a window has an even index, is the newest or
//     second newest sample of that band written so far (no stale data), and
//     all windows of one round of a level (all its bands, highest first)
//     share it, the next round being two samples further on,
//   * each band of the next level receives consecutive sample indices.
module tb_wpt_control;
  localparam int L = 4, J = 3, KW = 2, AW = 3, PW = 2;
  localparam int NB = 1 << J;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_take;
  logic [KW-1:0] in_waddr;
  logic          first [J], last [J], rsel_hi [J];
  logic [KW-1:0] cidx [J];
  logic [AW-1:0] raddr [J], waddr_next [J];
  logic [PW-1:0] parent [J];

  wpt_control #(.L(L), .J(J)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  typedef struct { int band; int idx; } tag_t;
  tag_t hi [J][16], lo [J][16];
  int   latest [J+1][NB];
  tag_t win [J][L];
  bit   wvalid [J][L];
  int   kpos [J];
    int   prev_e [J];
  int   prev_band [J];
  int   hi_reads [J], lo_reads [J], windows [J];

  initial begin
    int n_in = 0;
    for (int i = 0; i < J; i++)
      for (int a = 0; a < 16; a++) begin
        hi[i][a] = '{2 * (a / L) + 1, a % L - L};
        lo[i][a] = '{2 * (a / L), a % L - L};
        // a window may already be running at reset: its earlier terms
        // (zero history) are not seen and not checked
        prev_e[i] = -1000; kpos[i] = ((-2 - i) % L + L) % L;
        for (int k = 0; k < L; k++) wvalid[i][k] = 0;
      end
    for (int i = 0; i <= J; i++) for (int b = 0; b < NB; b++) latest[i][b] = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 600; c++) begin
      tag_t rd [J];
      #1;
      chk(in_take == (c % 2 == 0), $sformatf("in_take at %0d", c));
      // reads of this cycle
      for (int i = 0; i < J; i++) begin
        rd[i] = rsel_hi[i] ? hi[i][raddr[i]] : lo[i][raddr[i]];
        if (i > 0) begin if (rsel_hi[i]) hi_reads[i]++; else lo_reads[i]++; end
        if (first[i]) begin
          kpos[i] = 0;
          for (int k = 0; k < L; k++) wvalid[i][k] = 0;
        end
        chk(int'(cidx[i]) == L - 1 - kpos[i], $sformatf("L%0d cidx at %0d", i, c));
        win[i][kpos[i]] = rd[i];
        wvalid[i][kpos[i]] = 1;
        kpos[i]++;
      end
      // window ends: check the window, then write its two results
      for (int i = 0; i < J; i++) begin
        if (last[i]) begin
          int b, e;
          b = int'(parent[i]);
          e = win[i][L - 1].idx;
          windows[i]++;
          chk(kpos[i] == L, $sformatf("L%0d window length", i));
          for (int k = 0; k < L; k++)
            if (wvalid[i][k]) chk(win[i][k].band == b && win[i][k].idx == e - (L - 1 - k),
                $sformatf("L%0d cycle %0d term %0d: band %0d idx %0d, want band %0d idx %0d",
                          i, c, k, win[i][k].band, win[i][k].idx, b, e - (L - 1 - k)));
          chk(e % 2 == 0, $sformatf("L%0d newest index %0d odd", i, e));
          chk(latest[i][b] == e || latest[i][b] == e + 1,
              $sformatf("L%0d cycle %0d newest %0d but band %0d holds up to %0d", i, c, e, b, latest[i][b]));
          if (prev_e[i] != -1000) begin
            if (b == (1 << i) - 1) chk(e == prev_e[i] + 2 && prev_band[i] == 0, $sformatf("L%0d new round at %0d", i, c));
            else                   chk(e == prev_e[i] && b == prev_band[i] - 1, $sformatf("L%0d same round at %0d", i, c));
          end
          prev_e[i] = e; prev_band[i] = b;
        end
      end
      // writes at the end of this cycle
      if (in_take) begin
        lo[0][in_waddr] = '{0, n_in};
        latest[0][0] = n_in;
        n_in++;
      end
      for (int i = 0; i < J; i++)
        if (last[i]) begin
          int b, e;
          b = int'(parent[i]);
          e = win[i][L - 1].idx;
          if (e >= 0) begin
            if (latest[i+1][2*b+1] >= 0) chk(latest[i+1][2*b+1] == e / 2 - 1 && latest[i+1][2*b] == e / 2 - 1,
                $sformatf("L%0d children of band %0d not consecutive", i + 1, b));
            latest[i+1][2*b+1] = e / 2;
            latest[i+1][2*b]   = e / 2;
            if (i < J - 1) begin
              hi[i+1][waddr_next[i]] = '{2 * b + 1, e / 2};
              lo[i+1][waddr_next[i]] = '{2 * b, e / 2};
            end
          end
        end
      @(negedge clk);
    end
    for (int i = 1; i < J; i++) chk(hi_reads[i] > 0 && lo_reads[i] > 0, "both banks read");
    for (int b = 0; b < NB; b++) chk(latest[J][b] > 10, $sformatf("output band %0d", b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
