// wpt_mac: one FIR filter of a WPT processor (multiplier, adder and
// accumulator).
//
// Over a window of L consecutive clock cycles the filter receives one data
// sample and one coefficient per cycle and sums their products. The first
// cycle of a window (first = 1) starts a new sum instead of adding to the
// previous one. The running sum `sum` is combinational, so in the last
// cycle of a window it already holds the complete dot product and the
// next level's memory can store it at the closing clock edge; this is the
// "summation is stored in the next memory at the L-th cycle" behaviour of
// the architecture. The accumulator register keeps the partial sum between
// cycles.
//
// Number format (a choice of this design, the architecture leaves it
// open): data are W-bit two's complement integers, coefficients CW-bit two's
// complement with FRAC fractional bits. The accumulator is wide enough for
// L full-scale products. The result `y` is the sum shifted right by FRAC
// bits (arithmetic shift, rounding towards minus infinity) and saturated to
// W bits; `sat` flags a saturated result.
//
// Timing: one product per clock, no pipeline register between multiplier
// and adder; `y` and `sat` are valid in every cycle but meaningful in the
// last cycle of a window.
module wpt_mac #(
  parameter int unsigned W    = 16,
  parameter int unsigned CW   = 16,
  parameter int unsigned FRAC = 15,
  parameter int unsigned L    = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 first,   // first product of a window
  input  logic signed [W-1:0]  x,       // data sample
  input  logic signed [CW-1:0] c,       // filter coefficient
  output logic signed [W-1:0]  y,       // scaled, saturated window sum
  output logic                 sat      // y was saturated
);

  localparam int unsigned AW = W + CW + $clog2(L) + 1;

  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] prod;
  logic signed [AW-1:0] sum;
  logic signed [AW-1:0] shifted;

  localparam logic signed [AW-1:0] YMAX = AW'((longint'(1) <<< (W - 1)) - 1);
  localparam logic signed [AW-1:0] YMIN = -YMAX - 1;

  always_comb begin
    prod    = AW'(x * c);
    sum     = (first ? '0 : acc) + prod;
    shifted = sum >>> FRAC;
    if (shifted > YMAX) begin
      y   = YMAX[W-1:0];
      sat = 1'b1;
    end else if (shifted < YMIN) begin
      y   = YMIN[W-1:0];
      sat = 1'b1;
    end else begin
      y   = shifted[W-1:0];
      sat = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= sum;
  end

endmodule
