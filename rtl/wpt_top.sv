// wpt_top: J-level direct wavelet packet transform (WPT), word-serial
// pipeline with parallel high-pass/low-pass filters.
//
// The complete packet tree splits the input y(0,0) into two bands with a
// high-pass filter g and a low-pass filter h, each followed by decimation by
// two, and splits every band again, down to 2^J bands at level J. Band j of
// level i is y(i,j); the high-pass child of y(i,b) is y(i+1,2b+1) and the
// low-pass child y(i+1,2b), with
//   y(i+1,2b+1)[l] = sum_k g(k) y(i,b)[2l-k],  y(i+1,2b)[l] = sum_k h(k) y(i,b)[2l-k].
// Samples before the first one are taken as zero.
//
// One stage per tree level does all the work of that level:
//   M_i  (wpt_level_mem)  the last L samples of every band of level i,
//   P_i  (wpt_processor)  a high-pass and a low-pass filter fed the same
//                         sample; in L cycles it produces both children of
//                         one band,
// and one control unit (wpt_control) sequences all stages. A new input
// sample is taken every L/2 cycles (in_take = 1, in_data sampled at the
// clock edge that ends the cycle; there is no back-pressure), and every
// processor ends a window every L cycles, which is exactly the rate its
// level needs whatever the level's number of bands.
//
// Schedule: counting cycles from 0 after reset, input sample n is taken in
// cycle n*L/2 and P_i ends its window m in cycle m*L + 1 + i, writing
// samples l = m div 2^i of bands 2b+1 and 2b of level i+1, where
// b = 2^i - 1 - (m mod 2^i). The results of P_i appear one cycle later on
// lvl_valid / lvl_hi / lvl_lo / lvl_band_hi (bands 2b+1 and 2b, the low
// band is lvl_band_hi - 1). out_* repeat the last level: the J-level
// transform, two bands every L cycles, all 2^J bands every 2^(J-1)*L cycles.
// lvl_sat flags a result that was saturated to W bits.
//
// The structure (memories, two filters per processor, control unit), the
// memory sizes (L samples per band) and the production schedule follow the
// published architecture; number formats, coefficient ports, saturation,
// reset and the port protocol are this design's own.
module wpt_top import wpt_pkg::*; #(
  parameter int unsigned L    = 4,    // filter taps
  parameter int unsigned J    = 3,    // decomposition levels
  parameter int unsigned W    = 16,   // sample width
  parameter int unsigned CW   = 16,   // coefficient width
  parameter int unsigned FRAC = 15    // fractional bits of the coefficients
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 in_take,
  input  logic signed [W-1:0]  in_data,
  input  logic signed [CW-1:0] g_coef [L],
  input  logic signed [CW-1:0] h_coef [L],
  output logic                 lvl_valid   [J],
  output logic [J-1:0]         lvl_band_hi [J],
  output logic signed [W-1:0]  lvl_hi      [J],
  output logic signed [W-1:0]  lvl_lo      [J],
  output logic                 lvl_sat     [J],
  output logic                 out_valid,
  output logic [J-1:0]         out_band_hi,
  output logic [J-1:0]         out_band_lo,
  output logic signed [W-1:0]  out_hi,
  output logic signed [W-1:0]  out_lo
);

  localparam int unsigned KW = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned AW = addr_width(J, L);
  localparam int unsigned PW = (J > 1) ? J - 1 : 1;

  logic          first      [J];
  logic          last       [J];
  logic [KW-1:0] cidx       [J];
  logic          rsel_hi    [J];
  logic [AW-1:0] raddr      [J];
  logic [AW-1:0] waddr_next [J];
  logic [PW-1:0] parent     [J];
  logic [KW-1:0] in_waddr;

  logic signed [W-1:0] rdata [J];
  logic signed [W-1:0] y_hi  [J];
  logic signed [W-1:0] y_lo  [J];
  logic                sat   [J];

  // age[i] = 1 from cycle i+1 on: the first window of P_i that holds real
  // samples ends in cycle i+1; earlier windows only see the zero history.
  logic [J-1:0] age;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) age <= '0;
    else        age <= (age << 1) | J'(1);
  end

  wpt_control #(.L(L), .J(J)) u_ctrl (
    .clk, .rst_n, .in_take, .in_waddr,
    .first, .last, .cidx, .rsel_hi, .raddr, .waddr_next, .parent
  );

  for (genvar i = 0; i < J; i++) begin : g_lvl
    localparam int unsigned MAW = (bank_depth(i, L) > 1) ? $clog2(bank_depth(i, L)) : 1;

    logic                we;
    logic [MAW-1:0]      wa;
    logic signed [W-1:0] wd_hi, wd_lo;

    if (i == 0) begin : g_in
      assign we    = in_take;
      assign wa    = MAW'(in_waddr);
      assign wd_hi = in_data;
      assign wd_lo = in_data;
    end else begin : g_chain
      assign we    = last[i-1];
      assign wa    = MAW'(waddr_next[i-1]);
      assign wd_hi = y_hi[i-1];
      assign wd_lo = y_lo[i-1];
    end

    wpt_level_mem #(.LEVEL(i), .L(L), .W(W)) u_mem (
      .clk, .rst_n, .we, .waddr(wa), .wdata_hi(wd_hi), .wdata_lo(wd_lo),
      .rsel_hi(rsel_hi[i]), .raddr(MAW'(raddr[i])), .rdata(rdata[i])
    );

    wpt_processor #(.W(W), .CW(CW), .FRAC(FRAC), .L(L)) u_proc (
      .clk, .rst_n, .first(first[i]), .cidx(cidx[i]), .x(rdata[i]),
      .g_coef, .h_coef, .y_hi(y_hi[i]), .y_lo(y_lo[i]), .sat(sat[i])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        lvl_valid[i]   <= 1'b0;
        lvl_band_hi[i] <= '0;
        lvl_hi[i]      <= '0;
        lvl_lo[i]      <= '0;
        lvl_sat[i]     <= 1'b0;
      end else begin
        lvl_valid[i] <= last[i] && age[i];
        if (last[i]) begin
          lvl_band_hi[i] <= J'({parent[i], 1'b1}) & J'((1 << (i + 1)) - 1);
          lvl_hi[i]      <= y_hi[i];
          lvl_lo[i]      <= y_lo[i];
          lvl_sat[i]     <= sat[i];
        end
      end
    end
  end

  assign out_valid   = lvl_valid[J-1];
  assign out_band_hi = lvl_band_hi[J-1];
  assign out_band_lo = lvl_band_hi[J-1] & ~J'(1);
  assign out_hi      = lvl_hi[J-1];
  assign out_lo      = lvl_lo[J-1];

endmodule
