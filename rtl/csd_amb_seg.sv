// csd_amb_seg: segmented addition of multiplier block for one fixed coefficient.
//
// Same terms as csd_amb (CSD digits of COEF, pairs merged into 3x / 5x patterns, shifted
// by wiring), but every term is cut at bit K into a high (HB) and a low (LB) piece, and the
// two groups of pieces are summed by separate, independent adders: no carry crosses from
// the low to the high segment here. The low sum keeps its carries in LCW extra bits, so
// hi * 2^K + lo is the exact product COEF * x. A subtracted term -t is split as
// ~t_hi in the high segment and (~t_lo + 1) in the low segment, so the carry-in of the
// subtraction stays in the low segment as well.
// Combinational. The default LCW is ceil(log2(ceil(CW/3))) + 1: the carry bits of up to
// ceil(CW/3) low pieces, as in the published bit-width analysis, plus one bit because a
// subtracted low piece can reach 2^K; that extra bit is this design's own choice.
module csd_amb_seg
  import fir_pkg::*;
#(
  parameter int N    = 12,
  parameter int CW   = 12,
  parameter int COEF = 358,
  parameter int K    = 8,                          // low segment width
  parameter int LCW  = $clog2((CW + 2) / 3) + 1,   // carry bits of the low sum
  localparam int PW  = N + CW,
  localparam int HW  = PW - K,
  localparam int LW  = K + LCW
) (
  input  logic signed [N-1:0]  p1,
  input  logic signed [N+1:0]  p3,
  input  logic signed [N+2:0]  p5,
  output logic signed [HW-1:0] hi,
  output logic        [LW-1:0] lo
);
  localparam int ND = csd_ndigits(CW);

  initial begin
    assert (K >= 1 && K < PW) else $error("csd_amb_seg: K must lie in 1..PW-1");
    assert (lb_carry_bits(csd_nterms(COEF, ND)) + 1 <= LCW)
      else $error("csd_amb_seg: LCW too small for coefficient %0d", COEF);
  end

  logic signed [HW-1:0] hi_t [ND];
  logic        [LW-1:0] lo_t [ND];

  for (genvar b = 0; b < ND; b++) begin : g_term
    localparam int T = csd_term(COEF, b, ND);
    logic signed [PW-1:0] mag;
    if (T == 1 || T == -1)      begin : g_s1 assign mag = PW'(p1) <<< b; end
    else if (T == 3 || T == -3) begin : g_s3 assign mag = PW'(p3) <<< b; end
    else if (T == 5 || T == -5) begin : g_s5 assign mag = PW'(p5) <<< b; end
    else                        begin : g_s0 assign mag = '0;            end
    if (T > 0) begin : g_add
      assign hi_t[b] = mag[PW-1:K];
      assign lo_t[b] = LW'(mag[K-1:0]);
    end else if (T < 0) begin : g_sub
      logic [K-1:0] lo_inv;
      assign lo_inv  = ~mag[K-1:0];
      assign hi_t[b] = ~mag[PW-1:K];
      assign lo_t[b] = LW'(lo_inv) + LW'(1);
    end else begin : g_none
      assign hi_t[b] = '0;
      assign lo_t[b] = '0;
    end
  end

  always_comb begin
    hi = '0;
    lo = '0;
    for (int b = 0; b < ND; b++) begin
      hi = hi + hi_t[b];
      lo = lo + lo_t[b];
    end
  end
endmodule
