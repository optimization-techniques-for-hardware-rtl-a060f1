// fir_opt_top: the three area/power-efficient FIR filters side by side.
//
// Three independent filters, one for each level at which the design saves hardware:
//   * shf   : reconfigurable 512-tap, 12-bit linear-phase filter in symmetric hybrid form
//             (structure level: half the multipliers, bounded fan-out, short critical path),
//   * fta   : fixed 6-tap, 12-bit filter whose accumulation chain uses faithfully
//             truncated adders with k = 10 (unit level: narrower adders, mean error below
//             one unit in the last place),
//   * seg   : the same fixed 6-tap filter with every adder after the bit shifter split at
//             k = 8 into high and low segments (bit level: shorter carry chains, exact).
// They share only the clock and the asynchronous active-low reset. Each has its own sample
// enable, input and outputs; see shf_fir, fta_fir and seg_fir for their timing. The
// grouping of the three filters into one top is this design's own; each filter's sizes
// are the published ones.
module fir_opt_top
  import fir_pkg::*;
#(
  parameter int SHF_L  = 512,
  parameter int N      = 12,
  parameter int FTA_K  = 10,
  parameter int SEG_K  = 8,
  localparam int SHF_NC = (SHF_L + 1) / 2,
  localparam int SHF_AB = (SHF_NC > 1) ? $clog2(SHF_NC) : 1,
  localparam int SHF_AW = 2 * N + 1 + $clog2(SHF_L + 1),
  localparam int FTA_TW = 2 * N - FTA_K + $clog2(7),
  localparam int SEG_YW = 2 * N + $clog2(7)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // symmetric hybrid form filter
  input  logic                     shf_en,
  input  logic signed [N-1:0]      shf_x,
  input  logic                     shf_coef_we,
  input  logic [SHF_AB-1:0]        shf_coef_addr,
  input  logic signed [N-1:0]      shf_coef_wdata,
  output logic signed [SHF_AW-1:0] shf_y_full,
  output logic signed [N-1:0]      shf_y,
  output logic                     shf_valid,
  // truncated-adder filter
  input  logic                     fta_en,
  input  logic signed [N-1:0]      fta_x,
  output logic signed [FTA_TW-1:0] fta_y_trunc,
  output logic signed [N-1:0]      fta_y,
  output logic                     fta_valid,
  // segmented-adder filter
  input  logic                     seg_en,
  input  logic signed [N-1:0]      seg_x,
  input  logic                     seg_lb_gate,
  output logic signed [SEG_YW-1:0] seg_y_full,
  output logic signed [N-1:0]      seg_y,
  output logic                     seg_valid
);

  shf_fir #(.L(SHF_L), .N(N), .CW(N)) u_shf (
    .clk, .rst_n, .en(shf_en), .x(shf_x),
    .coef_we(shf_coef_we), .coef_addr(shf_coef_addr), .coef_wdata(shf_coef_wdata),
    .y_full(shf_y_full), .y(shf_y), .out_valid(shf_valid));

  fta_fir #(.L(6), .N(N), .CW(N), .K(FTA_K)) u_fta (
    .clk, .rst_n, .en(fta_en), .x(fta_x),
    .y_trunc(fta_y_trunc), .y(fta_y), .out_valid(fta_valid));

  seg_fir #(.L(6), .N(N), .CW(N), .K(SEG_K)) u_seg (
    .clk, .rst_n, .en(seg_en), .x(seg_x), .lb_gate(seg_lb_gate),
    .y_full(seg_y_full), .y(seg_y), .out_valid(seg_valid));

endmodule
