// fixed_fir_harness: drives one fixed 6-tap filter, either the truncated-adder filter
// (SEG = 0, truncation K) or the segmented filter (SEG = 1, segment width K), with
// uniformly distributed random 12-bit samples under a random clock enable. Every output is
// compared with a model evaluated here from the coefficient list: the truncated filter
// must equal the sum of the products each rounded down to a multiple of 2^K, the
// segmented filter the exact sum. For the truncated filter the harness also accumulates
// the error of y against the exact floor(sum / 2^N), in units of the output's last place,
// and reports its sum, maximum and the number of outputs measured.
module fixed_fir_harness #(
  parameter int SEG   = 0,
  parameter int K     = 10,
  parameter int COEFS [3] = '{358, 614, 51},
  parameter int NSAMP = 3600
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,
  output longint err_sum,
  output int   err_max,
  output int   err_n,
  output int   gated,
  output logic done
);
  localparam int L = 6, N = 12, CW = 12;
  localparam int LAT = SEG ? 3 : 2;     // enabled edges from sample to its tap-0 term
  localparam int TW  = 2 * N - K + $clog2(L + 1);
  localparam int YW  = 2 * N + $clog2(L + 1);

  logic en, out_valid, lb_gate;
  logic signed [N-1:0] x, y;
  longint yv;

  if (SEG) begin : g_seg
    logic signed [YW-1:0] y_full;
    seg_fir #(.L(L), .N(N), .CW(CW), .K(K), .COEFS(COEFS)) dut (.clk, .rst_n, .en, .x, .lb_gate, .y_full, .y, .out_valid);
    assign yv = longint'(y_full);
  end else begin : g_fta
    logic signed [TW-1:0] y_trunc;
    fta_fir #(.L(L), .N(N), .CW(CW), .K(K), .COEFS(COEFS)) dut (.clk, .rst_n, .en, .x, .y_trunc, .y, .out_valid);
    assign yv = longint'(y_trunc);
  end

  int s [$];
  int m;
  int m_g;   // enabled edges since reset at the last edge with the low segment gated

  function automatic int h(int i);
    return COEFS[(i < L - 1 - i) ? i : L - 1 - i];
  endfunction

  initial begin
    checks = 0; failures = 0; stalls = 0; err_sum = 0; err_max = 0; err_n = 0; done = 1'b0;
    en = 1'b0; x = '0; m = 0; m_g = -100; gated = 0; lb_gate = 1'b0;
    @(posedge rst_n);
    while (m < NSAMP + LAT + L) begin
      @(negedge clk);
      begin
        longint exact, model, ymodel;
        exact = 0; model = 0;
        for (int i = 0; i < L; i++)
          if (m - LAT - i >= 0) begin
            longint p;
            p = longint'(h(i)) * longint'(s[m - LAT - i]);
            exact += p;
            model += SEG ? p : (p >>> K);
          end
        checks++;
        if (SEG && m < m_g + L + 1) begin
          // low segment gated or refilling: HB sum plus part of the LB sum, never above
          // the exact sum and below it by at most 4 terms of 2^K per tap
          if (!(yv <= model && model - yv <= longint'(4 * L) << K)) begin
            failures++;
            if (failures < 5) $display("SEG K=%0d m=%0d gated: got %0d exact %0d", K, m, yv, model);
          end
          if (yv != model) gated++;
          model = yv;
        end else if (yv != model) begin
          failures++;
          if (failures < 5) $display("SEG=%0d K=%0d m=%0d: got %0d expected %0d", SEG, K, m, yv, model);
        end
        ymodel = SEG ? (model >>> N) : (model >>> (N - K));
        checks++;
        if (longint'(y) != longint'($signed(N'(ymodel)))) begin
          failures++;
          if (failures < 5) $display("SEG=%0d K=%0d m=%0d: y %0d expected %0d", SEG, K, m, y, ymodel);
        end
        checks++;
        if (out_valid !== (m >= L + LAT - 1)) begin
          failures++;
          $display("SEG=%0d K=%0d m=%0d: out_valid %0b", SEG, K, m, out_valid);
        end
        if (en && m >= L + LAT - 1 && !SEG) begin
          int e;
          e = int'((exact >>> N) - ymodel);
          err_sum += e;
          err_n++;
          if (e > err_max) err_max = e;
        end
      end
      en = ($urandom % 10) != 0;
      if (!en) stalls++;
      x = N'($urandom);
      lb_gate = SEG && (m >= NSAMP / 2) && (m < NSAMP / 2 + 300);
      if (en) begin
        s.push_back(int'(x));
        m++;
        if (lb_gate) m_g = m;
      end
    end
    done = 1'b1;
  end
endmodule
