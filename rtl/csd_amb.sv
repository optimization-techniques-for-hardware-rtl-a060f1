// csd_amb: bit shifter (BS) and addition of multiplier block (AMB) for one fixed
// coefficient.
//
// The coefficient COEF is recoded at elaboration into canonical signed digits, and digit
// pairs "+-0+-" are merged into one 3x or 5x pattern term (fir_pkg::csd_term). Each term
// selects x, 3x or 5x from the pattern block, shifts it (wiring only) and adds or
// subtracts it; the sum of the terms is the exact product COEF * x. With CSD no two
// non-zero digits are adjacent, so a CW-bit coefficient needs at most about CW/3 terms.
// Purely combinational: prod follows the pattern inputs in the same cycle.
// The recoding and grouping follow the published CSD pattern multiplier; the choice of
// which digit pairs merge (scanning from the most significant digit) is this design's own.
module csd_amb
  import fir_pkg::*;
#(
  parameter int N    = 12,    // sample width
  parameter int CW   = 12,    // coefficient width
  parameter int COEF = 358,   // fixed coefficient value (signed, fits CW bits)
  localparam int PW  = N + CW // product width
) (
  input  logic signed [N-1:0]  p1,
  input  logic signed [N+1:0]  p3,
  input  logic signed [N+2:0]  p5,
  output logic signed [PW-1:0] prod
);
  localparam int ND = csd_ndigits(CW);

  logic signed [PW-1:0] term [ND];

  for (genvar b = 0; b < ND; b++) begin : g_term
    localparam int T = csd_term(COEF, b, ND);
    if (T == 1)       begin : g_p1 assign term[b] =   PW'(p1) <<< b;  end
    else if (T == -1) begin : g_m1 assign term[b] = -(PW'(p1) <<< b); end
    else if (T == 3)  begin : g_p3 assign term[b] =   PW'(p3) <<< b;  end
    else if (T == -3) begin : g_m3 assign term[b] = -(PW'(p3) <<< b); end
    else if (T == 5)  begin : g_p5 assign term[b] =   PW'(p5) <<< b;  end
    else if (T == -5) begin : g_m5 assign term[b] = -(PW'(p5) <<< b); end
    else              begin : g_z  assign term[b] = '0;              end
  end

  always_comb begin
    prod = '0;
    for (int b = 0; b < ND; b++) prod = prod + term[b];
  end
endmodule
