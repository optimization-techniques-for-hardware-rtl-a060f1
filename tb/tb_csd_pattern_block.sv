// tb_csd_pattern_block: checks that the pattern block registers x, 3x and 5x of the sample
// present at each enabled edge and holds them while en is low, over random samples
// including the extreme values.
module tb_csd_pattern_block;
  localparam int N = 12;
  logic clk = 1'b0, rst_n = 1'b0, en;
  always #5 clk = ~clk;
  logic signed [N-1:0] x, p1;
  logic signed [N+1:0] p3;
  logic signed [N+2:0] p5;
  int checks = 0, failures = 0, holds = 0;
  int exp_x;

  csd_pattern_block #(.N(N)) dut (.*);

  initial begin
    en = 0; x = 0; exp_x = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks++;
      if (int'(p1) != exp_x || int'(p3) != 3 * exp_x || int'(p5) != 5 * exp_x) begin
        failures++;
        if (failures < 5) $display("x=%0d p1=%0d p3=%0d p5=%0d", exp_x, p1, p3, p5);
      end
      en = ($urandom % 4) != 0;
      x  = (c < 2) ? ((c == 0) ? -12'sd2048 : 12'sd2047) : N'($urandom);
      if (c < 2) en = 1;
      if (en) exp_x = int'(x); else holds++;
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
