// fta_adder: (2n-k)-bit faithfully truncated adder (FTA) of an accumulation chain.
//
// A full-precision FIR adder would add the 2n-bit product of a multiplier to the running
// sum, although only the top n bits of the final sum are kept. The truncated adder drops
// the k least significant bits of the product (the "truncated bits") and adds only the
// remaining 2n-k bits, the n "important" and n-k "middle" bits, to a chain that is itself
// kept without those k bits. The carries the dropped bits would have produced are lost,
// which makes the final n-bit result low by at most a few units in the last place; the
// expected error for a given k, n and tap count follows a closed form, and k is chosen as
// the largest value that keeps the mean error below one unit in the last place.
// Combinational: sum = acc_in + floor(prod / 2^K).
// The truncation scheme follows the published FTA; the chain guard bits are this design's.
module fta_adder #(
  parameter int PW = 24,   // product width (2n)
  parameter int K  = 10,   // truncated bits
  parameter int TW = 17    // chain width, at least PW-K
) (
  input  logic signed [PW-1:0] prod,
  input  logic signed [TW-1:0] acc_in,
  output logic signed [TW-1:0] sum
);
  logic signed [PW-K-1:0] prod_t;

  assign prod_t = prod[PW-1:K];          // important + middle bits
  assign sum    = acc_in + TW'(prod_t);
endmodule
