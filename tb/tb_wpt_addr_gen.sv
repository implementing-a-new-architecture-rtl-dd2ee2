// tb_wpt_addr_gen: self-checking test of the per-level address generators.
//
// Instantiates the generators of levels 0, 1 and 2 of the L = 4, J = 3
// pipeline and checks, cycle by cycle from reset:
//   * window framing: a window of P_i ends in cycles 4m + 1 + i and starts
//     three cycles earlier (the published schedule: P_0 in cycles 1, 5, 9,
//     13, P_1 in 2, 6, 10, 14, P_2 in 3, 7, 11, 15); the coefficient index
//     runs 3, 2, 1, 0 through a window,
//   * band order: P_1 alternates between bands 1 and 0, P_2 visits bands
//     3, 2, 1, 0 (the order of the schedule table),
//   * read addresses: the bank is the parity of the band, the row is the
//     band divided by two, and the four cells of a window are the four
//     cells of that row in cyclic order, starting two cells further on each
//     time the band is visited again (the window slides by two samples),
//   * write addresses for the next level: the row is the band, and the cell
//     advances by one per visit of the band,
//   * the newest cell a window reads is the cell in which its newest sample
//     (sample 2q of the band in round q) was written: input sample n in
//     cell n mod 4 at level 0, the cell the level above gave as write
//     address otherwise,
//   * the whole pattern repeats every 32 cycles (for level 2 the write
//     address of the next level, which does not exist, is left out).
module tb_wpt_addr_gen;
  localparam int L = 4, J = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int f [J], la [J], ci [J], rs [J], ra [J], wa [J], pa [J];

  for (genvar i = 0; i < J; i++) begin : g_ag
    logic first, last, rsel_hi;
    logic [1:0] cidx;
    logic [((i == 0) ? 2 : i + 1) - 1:0] raddr;
    logic [i + 1:0] waddr_next;
    logic [((i > 0) ? i : 1) - 1:0] parent;
    wpt_addr_gen #(.L(L), .J(J), .LEVEL(i)) dut (
      .clk, .rst_n, .first, .last, .cidx, .rsel_hi, .raddr, .waddr_next, .parent);
    always_comb begin
      f[i] = int'(first); la[i] = int'(last); ci[i] = int'(cidx);
      rs[i] = int'(rsel_hi); ra[i] = int'(raddr); wa[i] = int'(waddr_next);
      pa[i] = int'(parent);
    end
  end

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  localparam int NC = 400, P = 32;
  int hist [NC][J][7];
  int start_prev [J][8];
  int wcell_prev [J][8];
  bit seen [J][8];
  int kpos [J];
  // cell in which sample idx of band b of level i was written: wcell_of[i][b][idx]
  int wcell_of [J][8][64];
  int nwritten [J][8];
  int newest_checks = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NC; c++) begin
      #1;
      for (int i = 0; i < J; i++) begin
        bit want_last, want_first;
        want_last  = ((c - 1 - i) % L == 0) && (c >= 1 + i);
        want_first = ((c + L - 2 - i) % L == 0);
        chk(la[i] == int'(want_last), $sformatf("L%0d last at %0d", i, c));
        chk(f[i] == int'(want_first), $sformatf("L%0d first at %0d", i, c));
        // position in the window, from the window end rule: (c - 2 - i) mod L
        kpos[i] = ((c - 2 - i) % L + L) % L;
        chk(ci[i] == L - 1 - kpos[i], $sformatf("L%0d cidx %0d at %0d", i, ci[i], c));
        if (la[i] != 0) begin
          int mw, band;
          mw = (c - 1 - i) / L;
          band = (1 << i) - 1 - (mw % (1 << i));
          chk(pa[i] == band, $sformatf("L%0d band %0d want %0d at %0d", i, pa[i], band, c));
          chk(wa[i] / L == band, $sformatf("L%0d write row at %0d", i, c));
          if (seen[i][band])
            chk(wa[i] % L == (wcell_prev[i][band] + 1) % L, $sformatf("L%0d write cell step at %0d", i, c));
          wcell_prev[i][band] = wa[i] % L;
        end
        if (la[i] != 0) begin
          // the newest cell of the window holds sample e = 2q of the band
          int mw, e;
          mw = (c - 1 - i) / L;
          e  = 2 * (mw >> i);
          if (i == 0) chk(ra[i] == e % L, $sformatf("L0 newest cell at %0d", c));
          else if (e < nwritten[i][pa[i]]) begin
            chk(ra[i] % L == wcell_of[i][pa[i]][e % 64], $sformatf("L%0d newest cell at %0d", i, c));
            newest_checks++;
          end
        end
        chk(rs[i] == ((i > 0) ? pa[i] % 2 : 0), $sformatf("L%0d bank at %0d", i, c));
        chk(ra[i] / L == pa[i] / 2, $sformatf("L%0d read row at %0d", i, c));
        if (c - kpos[i] >= 0) begin           // the window started after reset
          if (f[i] != 0) start_prev[i][7] = ra[i] % L;
          chk(ra[i] % L == (start_prev[i][7] + kpos[i]) % L, $sformatf("L%0d read cell order at %0d", i, c));
          if (la[i] != 0) begin
            if (seen[i][pa[i]])
              chk(start_prev[i][7] == (start_prev[i][pa[i]] + 2) % L, $sformatf("L%0d window slide at %0d", i, c));
            start_prev[i][pa[i]] = start_prev[i][7];
            seen[i][pa[i]] = 1'b1;
          end
        end
        if (la[i] != 0 && i < J - 1) begin
          // level i writes sample nwritten of bands 2b+1 and 2b of level i+1
          for (int h = 0; h < 2; h++) begin
            int cb;
            cb = 2 * pa[i] + h;
            wcell_of[i+1][cb][nwritten[i+1][cb] % 64] = wa[i] % L;
            nwritten[i+1][cb]++;
          end
        end
        hist[c][i] = '{f[i], la[i], ci[i], rs[i], ra[i], (i < J - 1) ? wa[i] : 0, pa[i]};
        if (c >= P + 8)
          chk(hist[c][i] == hist[c - P][i], $sformatf("L%0d pattern repeat at %0d", i, c));
      end
      @(negedge clk);
    end
    chk(newest_checks > 20, "newest-cell check exercised");
    for (int i = 1; i < J; i++)
      for (int b = 0; b < (1 << i); b++) chk(seen[i][b], $sformatf("L%0d band %0d never visited", i, b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NC + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
