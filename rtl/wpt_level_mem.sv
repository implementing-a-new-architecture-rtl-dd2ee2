// wpt_level_mem: memory M_i of WPT tree level LEVEL.
//
// Level 0 holds the last L input samples in one bank. A level i >= 1 holds
// the last L samples of each of its 2^i bands. The processor of the level
// above writes two samples at once, the high-pass output (odd band 2b+1) and
// the low-pass output (even band 2b), so the memory is split into a high
// bank and a low bank with one write port each; band 2b+1 lives in row b of
// the high bank and band 2b in row b of the low bank, L cells per row. Both
// banks take the same write address. The processor of this level reads one
// cell per cycle from either bank, chosen by `rsel_hi`.
//
// Cells are registers and reset to zero, which gives every band a zero
// history before the first sample. Reads are combinational and see the
// contents from before a write in the same cycle; writes take effect at
// the rising clock edge. The address width is that of one bank.
//
// The sizes (L words per band, 2^i * L words at level i) and the split into
// a high-pass and a low-pass half follow the source architecture; registers
// with combinational read and the zero reset are this design's choice.
module wpt_level_mem import wpt_pkg::*; #(
  parameter int unsigned LEVEL = 1,
  parameter int unsigned L     = 4,
  parameter int unsigned W     = 16,
  localparam int unsigned DEPTH  = bank_depth(LEVEL, L),
  localparam int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                we,
  input  logic [ADDR_W-1:0]   waddr,
  input  logic signed [W-1:0] wdata_hi,   // ignored at level 0
  input  logic signed [W-1:0] wdata_lo,   // the input sample at level 0
  input  logic                rsel_hi,    // ignored at level 0
  input  logic [ADDR_W-1:0]   raddr,
  output logic signed [W-1:0] rdata
);

  logic signed [W-1:0] bank_lo [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < DEPTH; a++) bank_lo[a] <= '0;
    end else if (we) begin
      bank_lo[waddr] <= wdata_lo;
    end
  end

  if (LEVEL == 0) begin : g_single
    assign rdata = bank_lo[raddr];
  end else begin : g_dual
    logic signed [W-1:0] bank_hi [DEPTH];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int a = 0; a < DEPTH; a++) bank_hi[a] <= '0;
      end else if (we) begin
        bank_hi[waddr] <= wdata_hi;
      end
    end

    assign rdata = rsel_hi ? bank_hi[raddr] : bank_lo[raddr];
  end

endmodule
