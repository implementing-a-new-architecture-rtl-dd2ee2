// tb_wpt_mac: self-checking test of one multiply-accumulate filter.
//
// Drives back-to-back windows of L = 4 products with random data and
// coefficients (small, large and full-scale) and checks in every cycle that
// the output equals the running dot product since the window start,
// shifted right by FRAC with rounding towards minus infinity and saturated
// to W bits, and that the saturation flag is right. The expected value is
// computed here with 64-bit integer arithmetic.
module tb_wpt_mac;
  localparam int W = 16, CW = 16, FRAC = 15, L = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic first;
  logic signed [W-1:0]  x;
  logic signed [CW-1:0] c;
  logic signed [W-1:0]  y;
  logic sat;

  wpt_mac #(.W(W), .CW(CW), .FRAC(FRAC), .L(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, sats = 0;

  function automatic longint rnd(int mode, int bits);
    longint full;
    full = longint'(1) << (bits - 1);
    case (mode)
      0: return longint'($urandom_range(200)) - 100;
      1: return longint'($urandom_range(32'(2 * full - 1))) - full;
      default: return ($urandom_range(1) != 0) ? full - 1 : -full;
    endcase
  endfunction

  initial begin
    longint acc, q, want;
    bit want_sat;
    first = 1'b1; x = '0; c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    acc = 0;
    for (int t = 0; t < 4000; t++) begin
      int mode;
      mode  = (t / 40) % 3;
      first = ((t % L) == 0);
      x     = W'(rnd(mode, W));
      c     = CW'(rnd(mode, CW));
      #1;
      acc = (first ? 0 : acc) + longint'(x) * longint'(c);
      q = acc >>> FRAC;
      want_sat = (q > 32767) || (q < -32768);
      want = (q > 32767) ? 32767 : (q < -32768) ? -32768 : q;
      checks++;
      if (longint'(y) != want || sat != want_sat) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d y=%0d sat=%0d want %0d/%0d", t, y, sat, want, want_sat);
      end
      if (want_sat) sats++;
      @(negedge clk);
    end
    checks++;
    if (sats == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
