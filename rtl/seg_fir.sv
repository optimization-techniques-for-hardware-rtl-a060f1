// seg_fir: fixed linear-phase FIR filter in symmetric transpose form with CSD pattern
// multipliers and adder segmentation.
//
// Every adder after the bit shifter, in the multiplier additions (AMB) and in the
// transpose-form accumulation chain (ATB), is split at bit K into a high-bit (HB) and a
// low-bit (LB) adder that do not exchange carries. The HB chain (PW-K bits plus guard bits)
// and the LB chain (K bits plus the carry bits of the multiplier and chain additions) run
// side by side; both carry chains are roughly half as long as the full-width one. A final
// stage adds the HB sum, shifted up by K, to the LB sum, which delivers the LB carries, so
// the result is exact. K balances the two segments: with carry bits c = ceil(log2(ceil(n/3)))
// the balanced split is k = (2n - c - log2 L)/2, about 9 for n = 12, L = 6; 8 gives the
// shortest delay for the published 6-tap example and is the default here.
//
// Interface: one sample per clock with en high. The pattern block registers the sample,
// the HB/LB chain registers R(0) hold the tap-0 term one enabled edge later, and the
// combining stage registers y_full one further edge later: the tap-0 term of a sample
// reaches y_full two enabled edges after the edge that registers it. out_valid rises when
// all L taps hold samples taken after reset (L+2 enabled edges). y is y_full[2N-1:N].
// lb_gate high clears the LB chain at each enabled edge and so stops its activity: the
// result is then the HB sum alone, low by up to 2^K per multiplier term, like a truncated
// adder. After lb_gate returns low the LB chain needs L enabled edges to refill before the
// result is exact again.
// The segmentation and the option of gating the LB block follow the published method;
// the gating control as a clearing input, registering the combining adder, the
// clock enable, the guard bits and the default coefficients (the same 6-tap 50 Hz filter as
// fta_fir) are this design's own choices.
module seg_fir
  import fir_pkg::*;
#(
  parameter int L  = 6,
  parameter int N  = 12,
  parameter int CW = 12,
  parameter int K  = 8,
  parameter int COEFS [(L+1)/2] = '{358, 614, 51},
  localparam int PW  = N + CW,
  localparam int LCW = $clog2((CW + 2) / 3) + 1,
  localparam int G   = $clog2(L + 1),
  localparam int HBW = PW - K + G,     // HB chain width
  localparam int LBW = K + LCW + G,    // LB chain width
  localparam int YW  = PW + G
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [N-1:0]  x,
  input  logic                 lb_gate,  // 1: low segment switched off (truncated result)
  output logic signed [YW-1:0] y_full,
  output logic signed [N-1:0]  y,
  output logic                 out_valid
);
  localparam int NC = (L + 1) / 2;
  localparam int HW = PW - K;
  localparam int LW = K + LCW;

  logic signed [N-1:0]   p1;
  logic signed [N+1:0]   p3;
  logic signed [N+2:0]   p5;
  logic signed [HW-1:0]  hi [NC];
  logic        [LW-1:0]  lo [NC];
  logic signed [HBW-1:0] rh [L];
  logic        [LBW-1:0] rl [L];

  csd_pattern_block #(.N(N)) u_pb (.clk, .rst_n, .en, .x, .p1, .p3, .p5);

  for (genvar j = 0; j < NC; j++) begin : g_amb
    csd_amb_seg #(.N(N), .CW(CW), .COEF(COEFS[j]), .K(K), .LCW(LCW)) u_amb (
      .p1, .p3, .p5, .hi(hi[j]), .lo(lo[j]));
  end

  // segmented transpose-form chain: HB and LB adders side by side, no carry between them
  for (genvar i = 0; i < L; i++) begin : g_tap
    localparam int J = (i < L - 1 - i) ? i : L - 1 - i;
    logic signed [HBW-1:0] h_acc;
    logic        [LBW-1:0] l_acc;
    if (i == L - 1) begin : g_end
      assign h_acc = '0;
      assign l_acc = '0;
    end else begin : g_mid
      assign h_acc = rh[i+1];
      assign l_acc = rl[i+1];
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        rh[i] <= '0;
        rl[i] <= '0;
      end else if (en) begin
        rh[i] <= h_acc + HBW'(hi[J]);
        rl[i] <= lb_gate ? '0 : l_acc + LBW'(lo[J]);
      end
  end

  // combining stage: HB sum plus the carries (and low bits) of the LB sum
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  y_full <= '0;
    else if (en) y_full <= (YW'(rh[0]) <<< K) + YW'(rl[0]);

  assign y = y_full[2*N-1:N];

  localparam int VW = $clog2(L + 3) + 1;
  logic [VW-1:0] fill;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) fill <= '0;
    else if (en && fill != VW'(L + 2)) fill <= fill + 1'b1;
  assign out_valid = (fill == VW'(L + 2));
endmodule
