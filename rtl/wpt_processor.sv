// wpt_processor: processor P_i of one WPT tree level.
//
// A processor holds two filters that work side by side: a high-pass filter
// with coefficients g(k) and a low-pass filter with coefficients h(k). Both
// receive the same sample from the level memory in the same cycle, so both
// finish a window together and produce the two child samples of a parent
// band at once. This pairing of the two filters is what lets one processor
// per level keep up with an input sample every L/2 cycles.
//
// In a window the samples arrive oldest first; the control unit supplies
// `cidx`, the coefficient index that belongs to the current sample (L-1 for
// the oldest sample of the window, 0 for the newest), and `first` in the
// first cycle of a window. `y_hi` / `y_lo` hold the finished outputs in the
// last cycle of the window (combinational, see wpt_mac). The coefficient
// sets come in as ports so that any length-L filter pair can be used; the
// architecture fixes only that there are two filters with L taps each.
module wpt_processor #(
  parameter int unsigned W    = 16,
  parameter int unsigned CW   = 16,
  parameter int unsigned FRAC = 15,
  parameter int unsigned L    = 4,
  localparam int unsigned KW  = (L > 1) ? $clog2(L) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 first,
  input  logic [KW-1:0]        cidx,
  input  logic signed [W-1:0]  x,
  input  logic signed [CW-1:0] g_coef [L],  // high-pass coefficients g(k)
  input  logic signed [CW-1:0] h_coef [L],  // low-pass coefficients h(k)
  output logic signed [W-1:0]  y_hi,
  output logic signed [W-1:0]  y_lo,
  output logic                 sat
);

  logic signed [CW-1:0] g_now, h_now;
  logic                 sat_hi, sat_lo;

  assign g_now = g_coef[cidx];
  assign h_now = h_coef[cidx];
  assign sat   = sat_hi | sat_lo;

  wpt_mac #(.W(W), .CW(CW), .FRAC(FRAC), .L(L)) u_high (
    .clk, .rst_n, .first, .x, .c(g_now), .y(y_hi), .sat(sat_hi)
  );

  wpt_mac #(.W(W), .CW(CW), .FRAC(FRAC), .L(L)) u_low (
    .clk, .rst_n, .first, .x, .c(h_now), .y(y_lo), .sat(sat_lo)
  );

endmodule
