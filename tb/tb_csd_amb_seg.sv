// tb_csd_amb_seg: exhaustive check of the segmented multiplier-addition block. For several
// coefficients and segment widths K every 12-bit sample is applied; hi * 2^K + lo must
// equal coefficient times sample, and at least one sample must produce a carry out of the
// low segment (lo >= 2^K), which the high segment never sees.
module tb_csd_amb_seg;
  localparam int N = 12, CW = 12, PW = 24;
  localparam int NCO = 6;
  localparam int CO [NCO] = '{358, -683, 1365, -2048, 2047, 51};
  localparam int NK = 3;
  localparam int KS [NK] = '{6, 8, 12};
  localparam int LCW = 3;
  logic signed [N-1:0] p1;
  logic signed [N+1:0] p3;
  logic signed [N+2:0] p5;
  longint hv [NK][NCO];
  longint lv [NK][NCO];
  int checks = 0, failures = 0, lb_carries = 0;

  for (genvar k = 0; k < NK; k++) begin : g_k
    for (genvar g = 0; g < NCO; g++) begin : g_c
      logic signed [PW-KS[k]-1:0] hi;
      logic [KS[k]+LCW-1:0] lo;
      csd_amb_seg #(.N(N), .CW(CW), .COEF(CO[g]), .K(KS[k]), .LCW(LCW)) dut (.p1, .p3, .p5, .hi, .lo);
      assign hv[k][g] = longint'(hi);
      assign lv[k][g] = longint'(lo);
    end
  end

  initial begin
    for (int v = -2048; v < 2048; v++) begin
      p1 = N'(v); p3 = (N+2)'(3 * v); p5 = (N+3)'(5 * v);
      #1;
      for (int k = 0; k < NK; k++)
        for (int g = 0; g < NCO; g++) begin
          checks++;
          if (lv[k][g] >= (longint'(1) << KS[k])) lb_carries++;
          if (hv[k][g] * (longint'(1) << KS[k]) + lv[k][g] != longint'(CO[g] * v)) begin
            failures++;
            if (failures < 10) $display("K=%0d coef %0d x %0d: hi %0d lo %0d", KS[k], CO[g], v, hv[k][g], lv[k][g]);
          end
        end
    end
    checks++;
    if (lb_carries == 0) begin failures++; $display("no low-segment carry seen"); end
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
