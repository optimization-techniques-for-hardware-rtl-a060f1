// csd_pattern_block: pattern block (PB) of a CSD pattern multiplier block.
//
// Every coefficient of a fixed filter is multiplied by the same input sample. In canonical
// signed digit form any coefficient can be written with the sample itself and the two
// patterns 3x = (x << 1) + x and 5x = (x << 2) + x, each shifted and added or subtracted,
// so these two patterns are computed once here for all taps. The three values are held in
// output registers, which cut the path between the pattern adders and the multiplier
// additions that follow. Following the published CSD pattern approach, the PB results are
// registered; the clock enable and the reset are this design's choices.
// Timing: p1/p3/p5 show the x present at the last rising edge with en high.
module csd_pattern_block #(
  parameter int N = 12   // sample width (signed)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [N-1:0] x,
  output logic signed [N-1:0] p1,   // x
  output logic signed [N+1:0] p3,   // 3x
  output logic signed [N+2:0] p5    // 5x
);
  logic signed [N+1:0] x3;
  logic signed [N+2:0] x5;

  assign x3 = ((N+2)'(x) <<< 1) + (N+2)'(x);
  assign x5 = ((N+3)'(x) <<< 2) + (N+3)'(x);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      p1 <= '0;
      p3 <= '0;
      p5 <= '0;
    end else if (en) begin
      p1 <= x;
      p3 <= x3;
      p5 <= x5;
    end
endmodule
