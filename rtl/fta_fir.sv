// fta_fir: fixed linear-phase FIR filter in symmetric transpose form (STF) with a CSD
// pattern multiplier block and an accumulation chain of faithfully truncated adders.
//
// The sample goes through the pattern block (registered x, 3x, 5x). One csd_amb per
// distinct coefficient forms the exact product h(j) * x; because h(j) = h(L-1-j), each
// product feeds two positions of the transpose-form chain. The chain registers R(L-1)..R(0)
// hold sums without their K least significant bits: every adder is an fta_adder that adds
// only the top 2N-K bits of its product. R(0) is the output register.
//
// Interface: one sample per clock cycle with en high. y_trunc holds the chain value
// (units of 2^K), y its most significant N bits of the 2N-bit product range, i.e.
// floor(sum / 2^N) with the truncation error. A sample registered at an enabled edge
// contributes its tap-0 term to the output one enabled edge later; out_valid rises once
// all L taps hold samples taken after reset (L+1 enabled edges). K = 0 gives the ordinary
// full-width adder chain.
// The structure (STF, CSD pattern multipliers, truncated adder chain, n = 12, k = 10 for the
// 6-tap case) follows the published design; the coefficient set, the clock enable and the
// guard bits are this design's own. The default coefficients form a 6-tap low-pass with a
// zero at 50 Hz for a 360 Hz sample rate, in Q1.11 with DC gain 2046/2048.
module fta_fir
  import fir_pkg::*;
#(
  parameter int L  = 6,
  parameter int N  = 12,
  parameter int CW = 12,
  parameter int K  = 10,
  parameter int COEFS [(L+1)/2] = '{358, 614, 51},
  localparam int PW = N + CW,
  localparam int TW = PW - K + $clog2(L + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [N-1:0]  x,
  output logic signed [TW-1:0] y_trunc,
  output logic signed [N-1:0]  y,
  output logic                 out_valid
);
  localparam int NC = (L + 1) / 2;

  initial begin
    assert (K >= 0 && K <= N) else $error("fta_fir: K must lie in 0..N");
  end

  logic signed [N-1:0]  p1;
  logic signed [N+1:0]  p3;
  logic signed [N+2:0]  p5;
  logic signed [PW-1:0] prod [NC];
  logic signed [TW-1:0] r    [L];
  logic signed [TW-1:0] nxt  [L];
  logic signed [TW-1:0] acc  [L];

  csd_pattern_block #(.N(N)) u_pb (.clk, .rst_n, .en, .x, .p1, .p3, .p5);

  for (genvar j = 0; j < NC; j++) begin : g_amb
    csd_amb #(.N(N), .CW(CW), .COEF(COEFS[j])) u_amb (.p1, .p3, .p5, .prod(prod[j]));
  end

  for (genvar i = 0; i < L; i++) begin : g_tap
    localparam int J = (i < L - 1 - i) ? i : L - 1 - i;
    if (i == L - 1) begin : g_end
      assign acc[i] = '0;
    end else begin : g_mid
      assign acc[i] = r[i+1];
    end
    fta_adder #(.PW(PW), .K(K), .TW(TW)) u_add (.prod(prod[J]), .acc_in(acc[i]), .sum(nxt[i]));
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)  r[i] <= '0;
      else if (en) r[i] <= nxt[i];
  end

  assign y_trunc = r[0];
  assign y       = N'(r[0] >>> (N - K));

  localparam int VW = $clog2(L + 2) + 1;
  logic [VW-1:0] fill;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) fill <= '0;
    else if (en && fill != VW'(L + 1)) fill <= fill + 1'b1;
  assign out_valid = (fill == VW'(L + 1));
endmodule
