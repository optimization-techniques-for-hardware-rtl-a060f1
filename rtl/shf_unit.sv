// shf_unit: basic unit of the symmetric hybrid form (SHF) FIR filter.
//
// A full unit computes four taps of a linear-phase filter with two multipliers, by joining
// a symmetric transpose-form pair and a symmetric direct-form pair:
//   * pair A (taps 2u and L-1-2u), transpose style: the product cA * f_in is added into
//     two accumulation chains, the backward chain B (which ends in the filter output) and
//     the forward chain A (which runs to the far end of the filter and then turns into
//     chain B). The chains pass this unit at different remaining distances to the output,
//     which gives the product its two tap delays.
//   * pair B (taps 2u+1 and L-2-2u), direct style: the two samples f_out (forward input
//     line, one cycle older than f_in) and bx_out (returning input line) are pre-added and
//     multiplied once by cB; the product is added into chain B only.
// Registers per full unit: 1 on the forward input line, BX_REGS (3) on the returning input
// line, A_REGS (3) on chain A and 1 on chain B: eight for four taps, and each register
// drives at most one register, one adder and one multiplier. Chain B adds pair A's
// product first and pair B's product last, so the pre-adder is never in series with two
// adders after the multipliers: the longest path is one multiplier and two adders.
//
// MODE selects the reduced end units used when L is not a multiple of four:
// SHF_A_ONLY drops pair B, SHF_A_MID replaces pair B by the single middle tap (cB * f_out,
// no pre-add), SHF_SINGLE keeps only cA * f_in added into chain B (a transpose-form tap).
//
// The unit structure, register and adder counts and the critical-path ordering follow the
// published symmetric hybrid form; the exact chain assignment of each pair, the clock enable
// and the chain widths are this design's own choices. Timing: all registers advance on
// clk when en is high; rst_n is an asynchronous active-low reset to zero.
module shf_unit
  import fir_pkg::*;
#(
  parameter int        N       = 12,        // sample width (signed)
  parameter int        CW      = 12,        // coefficient width (signed)
  parameter int        AW      = 34,        // accumulation chain width (signed)
  parameter shf_mode_e MODE    = SHF_FULL,
  parameter int        A_REGS  = 3,         // registers on chain A after this unit
  parameter int        BX_REGS = 3          // registers on the returning input line
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [N-1:0]  f_in,    // forward input line at this unit
  output logic signed [N-1:0]  f_out,   // forward input line, one register later
  input  logic signed [N-1:0]  bx_in,   // returning input line from the next unit
  output logic signed [N-1:0]  bx_out,  // returning input line tapped at this unit
  input  logic signed [CW-1:0] coef_a,
  input  logic signed [CW-1:0] coef_b,
  input  logic signed [AW-1:0] a_in,    // chain A from the previous unit
  output logic signed [AW-1:0] a_out,   // chain A after A_REGS registers
  input  logic signed [AW-1:0] b_in,    // chain B from the next unit
  output logic signed [AW-1:0] b_out    // chain B register of this unit
);

  localparam int PW = N + CW + 1;  // product width, pre-added operand included

  logic signed [PW-1:0] prod_a, prod_b;
  logic signed [AW-1:0] a_sum, b_sum;

  // forward input line register (needed by pair B / middle tap, and by the next unit)
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  f_out <= '0;
    else if (en) f_out <= f_in;

  // returning input line
  if (BX_REGS > 0) begin : g_bx
    logic signed [N-1:0] bx_q [BX_REGS];
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        for (int i = 0; i < BX_REGS; i++) bx_q[i] <= '0;
      end else if (en) begin
        bx_q[0] <= bx_in;
        for (int i = 1; i < BX_REGS; i++) bx_q[i] <= bx_q[i-1];
      end
    assign bx_out = bx_q[BX_REGS-1];
  end else begin : g_no_bx
    assign bx_out = bx_in;
  end

  // multipliers
  assign prod_a = PW'(f_in) * PW'(coef_a);
  if (MODE == SHF_FULL) begin : g_pre
    logic signed [N:0] pre;
    assign pre    = (N+1)'(f_out) + (N+1)'(bx_out);
    assign prod_b = PW'(pre) * PW'(coef_b);
  end else if (MODE == SHF_A_MID) begin : g_mid
    assign prod_b = PW'(f_out) * PW'(coef_b);
  end else begin : g_nob
    assign prod_b = '0;
  end

  // chain B: previous chain value, then pair A, then pair B (shortest path from pre-adder)
  assign b_sum = b_in + AW'(prod_a) + AW'(prod_b);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  b_out <= '0;
    else if (en) b_out <= b_sum;

  // chain A
  if (MODE != SHF_SINGLE && A_REGS > 0) begin : g_a
    logic signed [AW-1:0] a_q [A_REGS];
    assign a_sum = a_in + AW'(prod_a);
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        for (int i = 0; i < A_REGS; i++) a_q[i] <= '0;
      end else if (en) begin
        a_q[0] <= a_sum;
        for (int i = 1; i < A_REGS; i++) a_q[i] <= a_q[i-1];
      end
    assign a_out = a_q[A_REGS-1];
  end else begin : g_no_a
    assign a_sum = '0;
    assign a_out = a_in;
  end

endmodule
