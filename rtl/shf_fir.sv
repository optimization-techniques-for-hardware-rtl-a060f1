// shf_fir: reconfigurable L-tap linear-phase FIR filter in symmetric hybrid form (SHF).
//
// Computes y(t) = sum_{i=0}^{L-1} h(i) x(t-2-i) for a filter whose coefficients are
// symmetric, h(i) = h(L-1-i), using ceil(L/2) multipliers. The filter is a row of
// ceil(L/4) shf_unit basic units, each covering four taps. Three lines run along the row:
//   * the forward input line F (one register per unit) carries the input sample outwards,
//   * the returning input line Bx (three registers per unit) brings it back for the
//     direct-style pre-adders,
//   * the accumulation chain A (three registers per unit) runs outwards, turns at the far
//     end into chain B (one register per unit), which runs back to the output.
// No register drives more than one multiplier, one adder and one register, so the input
// fan-out does not grow with L, and the longest path is one multiplier and two adders.
// For L = 4K the filter holds 2L-1 registers (input and output registers included) and
// L-1 adders. Lengths 4K+1, 4K+2 and 4K+3 end the row with a reduced unit (see shf_unit);
// the last chain-A segment and the first Bx segment are then lengthened or shortened so
// every tap keeps its delay. The unit structure, the register and adder counts and the
// arbitrary-length extension follow the published symmetric hybrid form; the coefficient
// write port, the clock enable, the valid flag and the widths are this design's choices.
//
// Interface: one sample per clock cycle in which en is high. x is registered by the input
// register; the output register y_full holds the full-precision sum, y its most
// significant N bits of the 2N-bit product range (y_full[2N-1:N], wrapping like any N-bit
// result). A sample taken into the input register at an enabled edge reaches y_full as its
// tap-0 term at the next enabled edge, so after m enabled edges since reset y_full holds
// sum h(i) * s(m-2-i), s(j) being the j-th sample taken. out_valid goes high once the
// whole window of L taps holds samples taken after reset: L+1 enabled edges, counting the
// one that took the first sample (the minimum latency of an L-tap filter).
// Coefficients h(0)..h(ceil(L/2)-1) are written one at a time through coef_we/coef_addr/
// coef_wdata at any time (independent of en) and reset to zero.
module shf_fir
  import fir_pkg::*;
#(
  parameter int L  = 512,  // number of taps
  parameter int N  = 12,   // sample width (signed)
  parameter int CW = 12,   // coefficient width (signed)
  localparam int NC = (L + 1) / 2,              // stored coefficients
  localparam int AB = (NC > 1) ? $clog2(NC) : 1,
  localparam int AW = N + CW + 1 + $clog2(L + 1)  // accumulation width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [N-1:0]  x,
  input  logic                 coef_we,
  input  logic [AB-1:0]        coef_addr,
  input  logic signed [CW-1:0] coef_wdata,
  output logic signed [AW-1:0] y_full,
  output logic signed [N-1:0]  y,
  output logic                 out_valid
);

  localparam int K   = L / 4;
  localparam int R   = L % 4;
  localparam int NU  = (L + 3) / 4;                           // units
  localparam int UA  = (R == 0 || R == 1) ? K - 1 : K;        // last unit on chain A
  localparam int AEND = L - 3 * UA - NU;                      // chain A registers after it
  localparam int BXTOP = L + 1 - 4 * K;                       // first Bx segment length

  initial begin
    assert (L >= 1) else $error("shf_fir: L must be at least 1");
  end

  // coefficient registers
  logic signed [CW-1:0] coef [NC];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < NC; i++) coef[i] <= '0;
    end else if (coef_we && int'(coef_addr) < NC) begin
      coef[coef_addr] <= coef_wdata;
    end

  // input register
  logic signed [N-1:0] x_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  x_q <= '0;
    else if (en) x_q <= x;

  logic signed [N-1:0]  f   [NU+1];   // f[u]: forward line entering unit u
  logic signed [N-1:0]  bxi [NU];     // returning line entering unit u
  logic signed [N-1:0]  bxo [NU];     // returning line tapped at unit u
  logic signed [AW-1:0] ai  [NU];
  logic signed [AW-1:0] ao  [NU];
  logic signed [AW-1:0] bi  [NU];
  logic signed [AW-1:0] bo  [NU];

  assign f[0] = x_q;

  for (genvar u = 0; u < NU; u++) begin : g_unit
    localparam shf_mode_e MODE = (u < K) ? SHF_FULL :
                                 (R == 1) ? SHF_SINGLE :
                                 (R == 2) ? SHF_A_ONLY : SHF_A_MID;
    localparam int AREGS  = (MODE == SHF_SINGLE) ? 0 : (u == UA) ? AEND : 3;
    localparam int BXREGS = (MODE != SHF_FULL) ? 0 : (u == K - 1) ? BXTOP : 3;
    localparam int IA = 2 * u;
    localparam int IB = (2 * u + 1 < NC) ? 2 * u + 1 : 2 * u;

    shf_unit #(
      .N(N), .CW(CW), .AW(AW), .MODE(MODE), .A_REGS(AREGS), .BX_REGS(BXREGS)
    ) u_unit (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (en),
      .f_in   (f[u]),
      .f_out  (f[u+1]),
      .bx_in  (bxi[u]),
      .bx_out (bxo[u]),
      .coef_a (coef[IA]),
      .coef_b ((MODE == SHF_FULL || MODE == SHF_A_MID) ? coef[IB] : '0),
      .a_in   (ai[u]),
      .a_out  (ao[u]),
      .b_in   (bi[u]),
      .b_out  (bo[u])
    );

    // chain A runs outwards from unit 0 and turns into chain B after unit UA
    if (u == 0) begin : g_a0
      assign ai[u] = '0;
    end else begin : g_an
      assign ai[u] = ao[u-1];
    end
    if (u == NU - 1) begin : g_turn
      if (UA >= 0) begin : g_fold
        assign bi[u] = ao[UA];
      end else begin : g_nofold
        assign bi[u] = '0;
      end
    end else begin : g_bn
      assign bi[u] = bo[u+1];
    end
    // the returning input line starts from the forward line at the last full unit
    if (u == K - 1) begin : g_bxtop
      assign bxi[u] = f[u+1];
    end else if (u < K - 1) begin : g_bxn
      assign bxi[u] = bxo[u+1];
    end else begin : g_bxnone
      assign bxi[u] = '0;
    end
  end

  assign y_full = bo[0];
  assign y      = y_full[2*N-1:N];

  // valid flag: counts enabled cycles up to L+1 after reset
  localparam int VW = $clog2(L + 2) + 1;
  logic [VW-1:0] fill;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) fill <= '0;
    else if (en && fill != VW'(L + 1)) fill <= fill + 1'b1;
  assign out_valid = (fill == VW'(L + 1));

endmodule
