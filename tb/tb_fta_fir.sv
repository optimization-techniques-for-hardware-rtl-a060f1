// tb_fta_fir: self-checking test of the truncated-adder FIR filter. Six filters with
// truncation k = 0 (ordinary adders), 8, 9, 10, 11 and 12, and one with negative
// coefficients, each run 3600 uniformly distributed random samples. Every output must match
// the bit-exact model, the first valid output must come L+1 enabled edges after the first
// sample, and the error statistics must behave as the truncation analysis predicts for a
// 6-tap 12-bit filter: no error for k = 0, a mean error below one unit in the last place
// for k = 10, above one for k = 12, and a mean that grows with k.
module tb_fta_fir;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  localparam int NH = 7;
  localparam int KS [NH] = '{0, 8, 9, 10, 11, 12, 10};
  int ch [NH], fl [NH], st [NH], emax [NH], en_ [NH], gt [NH];
  longint es [NH];
  logic dn [NH];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NH; g++) begin : g_h
    localparam int C [3] = (g == NH - 1) ? '{-683, 1365, -7} : '{358, 614, 51};
    fixed_fir_harness #(.SEG(0), .K(KS[g]), .COEFS(C)) h (
      .clk, .rst_n, .checks(ch[g]), .failures(fl[g]), .stalls(st[g]),
      .err_sum(es[g]), .err_max(emax[g]), .err_n(en_[g]), .gated(gt[g]), .done(dn[g]));
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    real mean [NH];
    bit all_done;
    all_done = 1'b0;
    while (!all_done) begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NH; i++) if (!dn[i]) all_done = 1'b0;
    end
    for (int i = 0; i < NH; i++) begin
      checks += ch[i]; failures += fl[i];
      mean[i] = real'(es[i]) / real'(en_[i]);
      $display("k=%0d: outputs %0d, mean error %0.3f ulp, max error %0d ulp, stalls %0d",
               KS[i], en_[i], mean[i], emax[i], st[i]);
      checks++;
      if (st[i] == 0) failures++;
    end
    checks++; if (es[0] != 0) begin failures++; $display("k=0 shows an error"); end
    checks++; if (!(mean[3] < 1.0)) begin failures++; $display("k=10 mean error not below 1 ulp"); end
    checks++; if (!(mean[5] > 1.0)) begin failures++; $display("k=12 mean error not above 1 ulp"); end
    for (int i = 1; i < 6; i++) begin
      checks++;
      if (!(mean[i] >= mean[i-1])) begin failures++; $display("mean error not growing at k=%0d", KS[i]); end
    end
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
