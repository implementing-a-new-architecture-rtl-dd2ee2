// tb_wpt_processor: self-checking test of a processor (two filters).
//
// Feeds windows of L = 4 samples, oldest first, with coefficient index
// L-1 .. 0, as the control unit does, and checks at the end of each window
// that the high-pass output equals sum_k g(k) x[newest-k] and the low-pass
// output sum_k h(k) x[newest-k] (scaled by 2^-15, saturated to 16 bits),
// both in the same cycle. Coefficients are redrawn every 50 windows.
module tb_wpt_processor;
  localparam int W = 16, CW = 16, FRAC = 15, L = 4, KW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic first;
  logic [KW-1:0] cidx;
  logic signed [W-1:0]  x;
  logic signed [CW-1:0] g_coef [L];
  logic signed [CW-1:0] h_coef [L];
  logic signed [W-1:0]  y_hi, y_lo;
  logic sat;

  wpt_processor #(.W(W), .CW(CW), .FRAC(FRAC), .L(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic longint scale(longint s, output bit f);
    longint q;
    q = s >>> FRAC;
    f = (q > 32767) || (q < -32768);
    return (q > 32767) ? 32767 : (q < -32768) ? -32768 : q;
  endfunction

  initial begin
    longint win [L];
    first = 1'b0; cidx = '0; x = '0;
    for (int k = 0; k < L; k++) begin g_coef[k] = '0; h_coef[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 600; w++) begin
      longint sg, sh, eh, el;
      bit fh, fl;
      if (w % 50 == 0)
        for (int k = 0; k < L; k++) begin
          g_coef[k] = CW'($urandom);
          h_coef[k] = CW'($urandom);
        end
      for (int k = 0; k < L; k++) begin
        first = (k == 0);
        cidx  = KW'(L - 1 - k);
        win[k] = (w < 300) ? longint'($urandom_range(2000)) - 1000 : longint'(signed'(W'($urandom)));
        x = W'(win[k]);
        if (k < L - 1) @(negedge clk);
      end
      #1;
      sg = 0; sh = 0;
      for (int k = 0; k < L; k++) begin
        sg += longint'(g_coef[k]) * win[L - 1 - k];
        sh += longint'(h_coef[k]) * win[L - 1 - k];
      end
      eh = scale(sg, fh);
      el = scale(sh, fl);
      checks++;
      if (longint'(y_hi) != eh || longint'(y_lo) != el || sat != (fh | fl)) begin
        failures++;
        if (failures < 10) $display("FAIL w=%0d hi=%0d/%0d lo=%0d/%0d", w, y_hi, eh, y_lo, el);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
