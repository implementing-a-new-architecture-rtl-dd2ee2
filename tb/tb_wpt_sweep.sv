// tb_wpt_sweep: the pipeline at filter lengths and tree depths other than
// the default L = 4, J = 3: L = 2, 6 and 8 with J = 3 (filter lengths of
// the published area and multiplier comparisons; odd lengths are not
// supported), and L = 4 with J = 2 and J = 5 (other tree depths). Each
// configuration runs in its own wpt_bench; the counts are summed.
module tb_wpt_sweep;
  localparam int NCFG = 5;
  int  c [NCFG], f [NCFG];
  bit  d [NCFG];

  wpt_bench #(.L(2), .J(3), .NIN(256)) b0 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  wpt_bench #(.L(6), .J(3), .NIN(256)) b1 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  wpt_bench #(.L(8), .J(3), .NIN(256)) b2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  wpt_bench #(.L(4), .J(2), .NIN(256)) b3 (.checks(c[3]), .failures(f[3]), .done(d[3]));
  wpt_bench #(.L(4), .J(5), .NIN(512)) b4 (.checks(c[4]), .failures(f[4]), .done(d[4]));

  initial begin
    int checks, failures;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) #10ns;   // 100000 clock periods
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3] + c[4], f[0] + f[1] + f[2] + f[3] + f[4] + 1);
    $finish;
  end
endmodule
