// tb_csd_amb: exhaustive check of the CSD multiplier-addition block. For a set of fixed
// coefficients (positive, negative, extremes, dense CSD patterns using every 3x/5x
// combination) every 12-bit sample is applied, with x, 3x and 5x formed in the testbench,
// and the product must equal coefficient times sample.
module tb_csd_amb;
  localparam int N = 12, CW = 12, PW = 24;
  localparam int NCO = 14;
  localparam int CO [NCO] = '{358, 614, 51, 7, -7, 1365, -1365, 2047, -2048, 1, -1, 0, 1023, -683};
  logic signed [N-1:0]  p1;
  logic signed [N+1:0]  p3;
  logic signed [N+2:0]  p5;
  logic signed [PW-1:0] prod [NCO];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NCO; g++) begin : g_dut
    csd_amb #(.N(N), .CW(CW), .COEF(CO[g])) dut (.p1, .p3, .p5, .prod(prod[g]));
  end

  initial begin
    for (int v = -2048; v < 2048; v++) begin
      p1 = N'(v); p3 = (N+2)'(3 * v); p5 = (N+3)'(5 * v);
      #1;
      for (int g = 0; g < NCO; g++) begin
        checks++;
        if (int'(prod[g]) != CO[g] * v) begin
          failures++;
          if (failures < 10) $display("coef %0d x %0d: prod %0d", CO[g], v, prod[g]);
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
