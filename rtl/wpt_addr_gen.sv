// wpt_addr_gen: address generation for processor P_LEVEL of a J-level WPT.
//
// Each processor repeats windows of L cycles. In window m it filters one
// parent band b of its level with both filters and writes the two children
// (bands 2b+1 and 2b of the next level) at the end of the window. With
// r = m mod 2^LEVEL and q = m div 2^LEVEL:
//   parent band      b     = 2^LEVEL - 1 - r  (highest band first, as in the
//                                              published schedule)
//   newest sample    s     = 2q of band b, so the window covers samples
//                            2q-L+1 .. 2q, oldest first (term k reads sample
//                            2q-L+1+k and uses coefficient L-1-k)
//   sample -> cell   a     = (b div 2) * L + (s mod L) in the bank of b's
//                            parity (odd bands: high bank)
//   children written       row b, cell q mod L, of both banks of the next
//                            level (they are sample q of bands 2b+1 and 2b)
// Level 0 has a single band and a single bank; b = 0.
//
// The counters are aligned to a cycle count t that starts at 0 in the first
// cycle after reset; the input takes sample n in cycle n*L/2. Window m of
// P_LEVEL occupies cycles (m-1)L + 2 + LEVEL .. mL + 1 + LEVEL, so level
// LEVEL+1 runs exactly one cycle behind level LEVEL, and the last product
// of every window uses a sample written one cycle earlier. The samples a
// window reads are never overwritten before they are read; the memories
// need no more than L cells per band. For L = 4, J = 3 this reproduces the
// published production schedule cycle for cycle (P_0 in cycles 1, 5, 9, 13,
// P_1 in 2, 6, 10, 14, P_2 in 3, 7, 11, 15). The formulas are this design's
// own; the published address circuit is given only for L = 4, J = 3.
//
// All outputs are decoded combinationally from the two counter registers.
module wpt_addr_gen import wpt_pkg::*; #(
  parameter int unsigned L     = 4,
  parameter int unsigned J     = 3,
  parameter int unsigned LEVEL = 0,
  localparam int unsigned KW   = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned WRAP = (1 << (J - 1)) * L,          // windows
  localparam int unsigned MW   = $clog2(WRAP),
  localparam int unsigned RAW  = (bank_depth(LEVEL, L) > 1) ? $clog2(bank_depth(LEVEL, L)) : 1,
  localparam int unsigned WAW  = (bank_depth(LEVEL + 1, L) > 1) ? $clog2(bank_depth(LEVEL + 1, L)) : 1,
  localparam int unsigned PW   = (LEVEL > 0) ? LEVEL : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            first,       // first term of a window
  output logic            last,        // last term: results are written now
  output logic [KW-1:0]   cidx,        // coefficient index of this term
  output logic            rsel_hi,     // read the high bank of M_LEVEL
  output logic [RAW-1:0]  raddr,       // read address in that bank
  output logic [WAW-1:0]  waddr_next,  // write address of both banks of M_LEVEL+1
  output logic [PW-1:0]   parent       // parent band b of this window
);

  localparam int          PHASE = -(2 + int'(LEVEL));
  localparam logic [KW-1:0] K_RST = KW'(pmod(PHASE, L));
  localparam logic [MW-1:0] M_RST = MW'(pmod(fdiv(PHASE, L) + 1, WRAP));

  logic [KW-1:0] k;
  logic [MW-1:0] m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k <= K_RST;
      m <= M_RST;
    end else if (int'(k) == L - 1) begin
      k <= '0;
      m <= (int'(m) == WRAP - 1) ? '0 : m + 1'b1;
    end else begin
      k <= k + 1'b1;
    end
  end

  always_comb begin
    int r, q, b;
    r          = int'(m) % (1 << LEVEL);
    q          = int'(m) >> LEVEL;
    b          = (1 << LEVEL) - 1 - r;
    first      = (k == '0);
    last       = (int'(k) == L - 1);
    cidx       = KW'(L - 1 - int'(k));
    rsel_hi    = (LEVEL > 0) && (b % 2 == 1);
    raddr      = RAW'((b / 2) * L + (2 * q + 1 + int'(k)) % L);
    waddr_next = WAW'(b * L + q % L);
    parent     = PW'(b);
  end

endmodule
