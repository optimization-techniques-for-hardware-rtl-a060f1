// tb_seg_fir: self-checking test of the adder-segmented FIR filter. Filters with segment
// widths k = 6 to 12 and one with negative coefficients run 3600 uniformly distributed
// random samples each; every output must equal the exact filter sum (segmentation loses
// nothing), and the first valid output must come L+2 enabled edges after the first sample.
// It also requires that the low segment delivered a carry into the result at least once.
// For 300 samples in the middle of the run the low segment is gated off: the result must
// then stay at or below the exact sum, within 4 * 2^k per tap, and the exact result must
// return L+1 enabled edges after the gating ends.
module tb_seg_fir;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  localparam int NH = 8;
  localparam int KS [NH] = '{6, 7, 8, 9, 10, 11, 12, 8};
  int ch [NH], fl [NH], st [NH], emax [NH], en_ [NH], gt [NH];
  longint es [NH];
  logic dn [NH];
  int checks = 0, failures = 0, lb_carries = 0;

  for (genvar g = 0; g < NH; g++) begin : g_h
    localparam int C [3] = (g == NH - 1) ? '{-683, 1365, -7} : '{358, 614, 51};
    fixed_fir_harness #(.SEG(1), .K(KS[g]), .COEFS(C)) h (
      .clk, .rst_n, .checks(ch[g]), .failures(fl[g]), .stalls(st[g]),
      .err_sum(es[g]), .err_max(emax[g]), .err_n(en_[g]), .gated(gt[g]), .done(dn[g]));
  end

  // carries from the low segment of the k = 8 filter into the combined result
  always @(posedge clk)
    if ((g_h[2].h.g_seg.dut.rl[0] >> 8) != 0) lb_carries++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    bit all_done;
    all_done = 1'b0;
    while (!all_done) begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NH; i++) if (!dn[i]) all_done = 1'b0;
    end
    for (int i = 0; i < NH; i++) begin
      checks += ch[i]; failures += fl[i];
      checks++;
      if (st[i] == 0) failures++;
      checks++;
      if (gt[i] == 0) begin failures++; $display("k=%0d: gating the low segment changed nothing", KS[i]); end
      $display("k=%0d: stalls %0d, outputs changed by low-segment gating %0d", KS[i], st[i], gt[i]);
    end
    checks++;
    if (lb_carries == 0) begin failures++; $display("no low-segment carry seen"); end
    $display("low-segment carries into the result: %0d cycles", lb_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
