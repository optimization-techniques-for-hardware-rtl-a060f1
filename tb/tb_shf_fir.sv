// tb_shf_fir: self-checking test of the symmetric hybrid form filter. Runs the default
// 512-tap filter and short filters of every length class (4K, 4K+1, 4K+2, 4K+3, and
// lengths below one full unit) with random coefficients, random samples and a random clock
// enable; each output is compared with a direct evaluation of the filter sum, and the
// first valid output must come L+1 enabled cycles after the first sample.
module tb_shf_fir;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 13;
  localparam int LS [NH] = '{1, 2, 3, 4, 5, 6, 7, 8, 9, 11, 16, 19, 512};

  int ch [NH];
  int fl [NH];
  int st [NH];
  logic dn [NH];

  for (genvar g = 0; g < NH; g++) begin : g_h
    shf_harness #(.L(LS[g]), .NSAMP(LS[g] > 100 ? 1200 : 150)) h (
      .clk(clk), .rst_n(rst_n), .checks(ch[g]), .failures(fl[g]), .stalls(st[g]), .done(dn[g]));
  end

  int checks, failures;

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
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin
      checks += ch[i]; failures += fl[i];
      $display("L=%0d checks=%0d failures=%0d stalls=%0d", LS[i], ch[i], fl[i], st[i]);
      checks++;
      if (st[i] == 0) begin
        failures++;
        $display("no stall cycle exercised for L=%0d", LS[i]);
      end
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
