// tb_wpt_level_mem: self-checking test of the level memories.
//
// Instantiates the level-0 memory (one bank of 4 cells) and a level-2
// memory (high and low bank of 8 cells each). Checks that every cell reads
// zero after reset, then performs random writes and reads against a model
// of the banks, including reads of the cell being written in the same
// cycle, which must return the old contents.
module tb_wpt_level_mem;
  localparam int L = 4, W = 16;
  localparam int D0 = 4, D2 = 8;

  logic clk = 1'b0, rst_n = 1'b0;

  logic we0, we2, rs2;
  logic [1:0] wa0, ra0;
  logic [2:0] wa2, ra2;
  logic signed [W-1:0] wh0, wl0, wh2, wl2, rd0, rd2;

  wpt_level_mem #(.LEVEL(0), .L(L), .W(W)) m0 (
    .clk, .rst_n, .we(we0), .waddr(wa0), .wdata_hi(wh0), .wdata_lo(wl0),
    .rsel_hi(1'b0), .raddr(ra0), .rdata(rd0));
  wpt_level_mem #(.LEVEL(2), .L(L), .W(W)) m2 (
    .clk, .rst_n, .we(we2), .waddr(wa2), .wdata_hi(wh2), .wdata_lo(wl2),
    .rsel_hi(rs2), .raddr(ra2), .rdata(rd2));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [W-1:0] mod0 [D0];
  logic signed [W-1:0] modh [D2], modl [D2];

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    we0 = 0; we2 = 0; rs2 = 0; wa0 = 0; ra0 = 0; wa2 = 0; ra2 = 0;
    wh0 = 0; wl0 = 0; wh2 = 0; wl2 = 0;
    for (int a = 0; a < D0; a++) mod0[a] = '0;
    for (int a = 0; a < D2; a++) begin modh[a] = '0; modl[a] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < D2; a++) begin
      ra0 = 2'(a); ra2 = 3'(a); rs2 = 1'b1;
      #1 chk(rd0 == 0 && rd2 == 0, "reset value (high)");
      rs2 = 1'b0;
      #1 chk(rd2 == 0, "reset value (low)");
    end
    for (int t = 0; t < 3000; t++) begin
      we0 = 1'($urandom); we2 = 1'($urandom);
      wa0 = 2'($urandom); wa2 = 3'($urandom);
      wl0 = W'($urandom); wh0 = W'($urandom);
      wh2 = W'($urandom); wl2 = W'($urandom);
      ra0 = (t % 3 == 0) ? wa0 : 2'($urandom);
      ra2 = (t % 3 == 0) ? wa2 : 3'($urandom);
      rs2 = 1'($urandom);
      #1;
      chk(rd0 == mod0[ra0], $sformatf("M0 read %0d", ra0));
      chk(rd2 == (rs2 ? modh[ra2] : modl[ra2]), $sformatf("M2 read %0d bank %0d", ra2, rs2));
      @(posedge clk);
      if (we0) mod0[wa0] = wl0;
      if (we2) begin modh[wa2] = wh2; modl[wa2] = wl2; end
      @(negedge clk);
    end
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
