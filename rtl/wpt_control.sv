// wpt_control: control unit of the J-level WPT pipeline.
//
// The control unit paces the whole pipeline; nothing in the datapath makes
// decisions of its own. It
//   * takes an input sample every L/2 cycles (`in_take`, first in the cycle
//     after reset) and counts the write address of the input memory M_0,
//   * runs one address generator (wpt_addr_gen) per processor, which gives
//     the read address and bank of M_i, the coefficient index, the window
//     start and end strobes, and the write address of M_(i+1).
// With the paper's sizes (L = 4, J = 3) the pipeline accepts a sample every
// 2 cycles and every processor ends a window every 4 cycles; the read and
// write address pattern repeats every 2^(J-2) * L * L = 32 cycles.
//
// The input interval of L/2 cycles and the step-per-write counter of M_0
// follow the source architecture; splitting the sequencing into one
// counter pair per level is this design's own arrangement. L must be even.
//
// Per-level outputs are arrays indexed by level; address buses have the
// width of the largest bank and are zero-extended for smaller banks. The
// next-level write address of the last level is not used (its results
// leave the pipeline) and is not brought out.
module wpt_control import wpt_pkg::*; #(
  parameter int unsigned L  = 4,
  parameter int unsigned J  = 3,
  localparam int unsigned KW = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned AW = addr_width(J, L),
  localparam int unsigned PW = (J > 1) ? J - 1 : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          in_take,            // input memory writes in_data now
  output logic [KW-1:0] in_waddr,           // cell of M_0 being written
  output logic          first      [J],
  output logic          last       [J],
  output logic [KW-1:0] cidx       [J],
  output logic          rsel_hi    [J],
  output logic [AW-1:0] raddr      [J],
  output logic [AW-1:0] waddr_next [J],     // entry J-1 is zero
  output logic [PW-1:0] parent     [J]
);

  localparam int unsigned S = L / 2;        // cycles between input samples

  if ((L % 2) != 0 || L < 2) begin : g_bad_l
    $error("wpt_control: L must be even and at least 2");
  end

  logic [KW-1:0] in_phase;
  logic [KW-1:0] wa0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_phase <= '0;
      wa0      <= '0;
    end else begin
      in_phase <= (int'(in_phase) == S - 1) ? '0 : in_phase + 1'b1;
      if (in_take) wa0 <= (int'(wa0) == L - 1) ? '0 : wa0 + 1'b1;
    end
  end

  assign in_take  = (in_phase == '0);
  assign in_waddr = wa0;

  for (genvar i = 0; i < J; i++) begin : g_lvl
    localparam int unsigned RAW = (bank_depth(i, L) > 1) ? $clog2(bank_depth(i, L)) : 1;
    localparam int unsigned WAW = (bank_depth(i + 1, L) > 1) ? $clog2(bank_depth(i + 1, L)) : 1;
    localparam int unsigned LPW = (i > 0) ? i : 1;

    logic [RAW-1:0] ra;
    logic [WAW-1:0] wa;
    logic [LPW-1:0] par;

    wpt_addr_gen #(.L(L), .J(J), .LEVEL(i)) u_ag (
      .clk, .rst_n,
      .first(first[i]), .last(last[i]), .cidx(cidx[i]), .rsel_hi(rsel_hi[i]),
      .raddr(ra), .waddr_next(wa), .parent(par)
    );

    assign raddr[i]  = AW'(ra);
    assign parent[i] = PW'(par);
    if (i < J - 1) begin : g_w
      assign waddr_next[i] = AW'(wa);
    end else begin : g_nw
      assign waddr_next[i] = '0;
    end
  end

endmodule
