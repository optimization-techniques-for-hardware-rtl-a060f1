// shf_harness: drives one shf_fir instance of length L with random coefficients and
// random samples under a random clock enable, and checks every output against a direct
// evaluation of y = sum h(i) x(m-2-i) kept in the harness. It also checks that out_valid
// first rises after exactly L+1 enabled cycles, then reloads new coefficients and checks
// again once the new window has filled. Counts are reported through its outputs.
module shf_harness #(
  parameter int L      = 8,
  parameter int NSAMP  = 200,   // samples per phase
  parameter int EN_PCT = 80     // percentage of cycles with en high
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,
  output logic done
);
  localparam int N  = 12;
  localparam int CW = 12;
  localparam int NC = (L + 1) / 2;
  localparam int AB = (NC > 1) ? $clog2(NC) : 1;
  localparam int AW = N + CW + 1 + $clog2(L + 1);

  logic en, coef_we, out_valid;
  logic signed [N-1:0]  x, y;
  logic [AB-1:0]        coef_addr;
  logic signed [CW-1:0] coef_wdata;
  logic signed [AW-1:0] y_full;

  shf_fir #(.L(L), .N(N), .CW(CW)) dut (.*);

  int h [L];
  int s [$];       // samples accepted since reset
  int m;           // enabled edges since reset
  int phase_start; // m at which current coefficients became fully effective

  function automatic longint expected(int mm);
    longint acc = 0;
    for (int i = 0; i < L; i++)
      if (mm - 2 - i >= 0) acc += longint'(h[i]) * longint'(s[mm - 2 - i]);
    return acc;
  endfunction

  task automatic load_coefs();
    for (int j = 0; j < NC; j++) begin
      int c = $signed(12'($urandom));
      h[j] = c;
      h[L-1-j] = c;
      @(negedge clk);
      coef_we = 1'b1; coef_addr = AB'(j); coef_wdata = CW'(c);
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  initial begin
    checks = 0; failures = 0; stalls = 0; done = 1'b0;
    en = 1'b0; x = '0; coef_we = 1'b0; coef_addr = '0; coef_wdata = '0;
    m = 0;
    @(posedge rst_n);
    load_coefs();
    phase_start = 0;
    for (int phase = 0; phase < 2; phase++) begin
      int taken;
      taken = 0;
      if (phase == 1) begin
        load_coefs();
        phase_start = m + L;   // older products may still use the old coefficients
      end
      while (taken < NSAMP) begin
        @(negedge clk);
        // outputs after the last edge
        if (m >= phase_start + 1 || (phase == 0 && m > 0)) begin
          longint e;
          e = expected(m);
          if (phase == 1 && m < phase_start + 1) begin
          end else begin
            checks++;
            if (y_full !== AW'(e)) begin
              failures++;
              if (failures < 5) $display("%0t shf L=%0d m=%0d: y_full=%0d expected %0d", $time, L, m, y_full, e);
            end
          end
        end
        if (phase == 0) begin
          checks++;
          if (out_valid !== (m >= L + 1)) begin
            failures++;
            $display("shf L=%0d m=%0d: out_valid=%0b", L, m, out_valid);
          end
        end
        en = (($urandom % 100) < EN_PCT);
        if (!en) stalls++;
        x  = N'($urandom);
        if (en) begin
          s.push_back(int'(x));
          m++;
          taken++;
        end
      end
    end
    @(negedge clk);
    en = 1'b0;
    done = 1'b1;
  end
endmodule
