// tb_fta_adder: checks the truncated adder for several truncation widths with random
// products and chain values: the sum must be the chain value plus the product rounded
// down to a multiple of 2^K (expressed in units of 2^K).
module tb_fta_adder;
  localparam int PW = 24;
  localparam int NK = 4;
  localparam int KS [NK] = '{0, 8, 10, 12};
  localparam int TW = 16;
  logic signed [PW-1:0] prod;
  logic signed [TW-1:0] acc;
  longint sv [NK];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NK; k++) begin : g_k
    logic signed [PW-KS[k]+7:0] s;
    fta_adder #(.PW(PW), .K(KS[k]), .TW(PW - KS[k] + 8)) dut (.prod, .acc_in((PW-KS[k]+8)'(acc)), .sum(s));
    assign sv[k] = longint'(s);
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      prod = PW'($urandom);
      acc  = $signed(16'($urandom));
      #1;
      for (int k = 0; k < NK; k++) begin
        longint e;
        e = longint'(acc) + (longint'(prod) >>> KS[k]);
        checks++;
        if (sv[k] != e) begin
          failures++;
          if (failures < 10) $display("K=%0d prod %0d acc %0d: %0d expected %0d", KS[k], prod, acc, sv[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
