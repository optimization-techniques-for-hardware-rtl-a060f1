// tb_shf_unit: self-checking test of the symmetric-hybrid-form basic unit. Three units
// (full, pair plus middle tap, single tap) get random line, chain and coefficient values
// every cycle under a random clock enable; a cycle model in the testbench computes the
// forward-line register, the returning-line delay, the chain A delay line and the chain B
// register independently and all outputs are compared every cycle.
module tb_shf_unit;
  import fir_pkg::*;
  localparam int N = 12, CW = 12, AW = 30;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en;
  always #5 clk = ~clk;

  logic signed [N-1:0]  f_in, bx_in;
  logic signed [CW-1:0] ca, cb;
  logic signed [AW-1:0] a_in, b_in;

  logic signed [N-1:0]  f_out [3], bx_out [3];
  logic signed [AW-1:0] a_out [3], b_out [3];

  shf_unit #(.N(N), .CW(CW), .AW(AW), .MODE(SHF_FULL), .A_REGS(3), .BX_REGS(3)) u_full (
    .clk, .rst_n, .en, .f_in, .f_out(f_out[0]), .bx_in, .bx_out(bx_out[0]),
    .coef_a(ca), .coef_b(cb), .a_in, .a_out(a_out[0]), .b_in, .b_out(b_out[0]));
  shf_unit #(.N(N), .CW(CW), .AW(AW), .MODE(SHF_A_MID), .A_REGS(2), .BX_REGS(0)) u_mid (
    .clk, .rst_n, .en, .f_in, .f_out(f_out[1]), .bx_in, .bx_out(bx_out[1]),
    .coef_a(ca), .coef_b(cb), .a_in, .a_out(a_out[1]), .b_in, .b_out(b_out[1]));
  shf_unit #(.N(N), .CW(CW), .AW(AW), .MODE(SHF_SINGLE), .A_REGS(0), .BX_REGS(0)) u_single (
    .clk, .rst_n, .en, .f_in, .f_out(f_out[2]), .bx_in, .bx_out(bx_out[2]),
    .coef_a(ca), .coef_b(cb), .a_in, .a_out(a_out[2]), .b_in, .b_out(b_out[2]));

  // reference state
  longint m_f [3];
  longint m_bx [3][3];
  longint m_a [3][3];
  longint m_b [3];
  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    en = 0; f_in = 0; bx_in = 0; ca = 0; cb = 0; a_in = 0; b_in = 0;
    for (int i = 0; i < 3; i++) begin
      m_f[i] = 0; m_b[i] = 0;
      for (int j = 0; j < 3; j++) begin m_bx[i][j] = 0; m_a[i][j] = 0; end
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // compare outputs with the model
      check("full f_out", f_out[0], m_f[0]);
      check("full bx_out", bx_out[0], m_bx[0][2]);
      check("full a_out", a_out[0], m_a[0][2]);
      check("full b_out", b_out[0], m_b[0]);
      check("mid f_out", f_out[1], m_f[1]);
      check("mid bx_out", bx_out[1], bx_in);
      check("mid a_out", a_out[1], m_a[1][1]);
      check("mid b_out", b_out[1], m_b[1]);
      check("single a_out", a_out[2], a_in);
      check("single b_out", b_out[2], m_b[2]);
      // new stimulus
      en    = ($urandom % 5) != 0;
      f_in  = N'($urandom);
      bx_in = N'($urandom);
      ca    = CW'($urandom);
      cb    = CW'($urandom);
      a_in  = AW'($signed(22'($urandom)));
      b_in  = AW'($signed(22'($urandom)));
      // model update for the coming edge
      if (en) begin
        longint pa, pb_full, pb_mid;
        pa      = longint'(f_in) * longint'(ca);
        pb_full = (longint'(m_f[0]) + longint'(m_bx[0][2])) * longint'(cb);
        pb_mid  = longint'(m_f[1]) * longint'(cb);
        m_b[0] = longint'(b_in) + pa + pb_full;
        m_b[1] = longint'(b_in) + pa + pb_mid;
        m_b[2] = longint'(b_in) + pa;
        for (int i = 0; i < 2; i++) begin
          m_a[i][2] = m_a[i][1];
          m_a[i][1] = m_a[i][0];
          m_a[i][0] = longint'(a_in) + pa;
        end
        m_bx[0][2] = m_bx[0][1];
        m_bx[0][1] = m_bx[0][0];
        m_bx[0][0] = bx_in;
        for (int i = 0; i < 3; i++) m_f[i] = f_in;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
