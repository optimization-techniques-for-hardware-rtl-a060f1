// tb_fir_opt_top: end-to-end test of the top with every parameter at its default: the
// 512-tap symmetric hybrid form filter, the 6-tap truncated-adder filter (k = 10) and the
// 6-tap segmented filter (k = 8) run at the same time.
//  * shf: 256 random coefficients are written, 1500 random samples filtered under a random
//    clock enable, then a second coefficient set is written while the filter keeps its
//    samples and 1500 more are filtered; each output is compared with the direct filter
//    sum, and the first valid output must come exactly 513 enabled edges after the first
//    sample.
//  * fta / seg: 3000 random samples each, compared with the bit-exact truncated model and
//    with the exact sum respectively.
// Each mechanism is counted and must occur at least once: stalled cycles of each filter,
// the coefficient reload, the valid flag of each filter, outputs where truncation changed
// the result, cycles where the low segment carried into the result, and outputs changed by
// gating the low segment of the segmented filter (200 samples, checked against bounds).
module tb_fir_opt_top;
  localparam int N = 12, L = 512, NC = 256, AB = 8, SHF_AW = 35, FTA_TW = 17, SEG_YW = 27;
  localparam int FK = 10, SK = 8;
  localparam int FC [3] = '{358, 614, 51};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic shf_en, shf_coef_we, shf_valid, fta_en, fta_valid, seg_en, seg_valid, seg_lb_gate;
  logic signed [N-1:0] shf_x, shf_coef_wdata, shf_y, fta_x, fta_y, seg_x, seg_y;
  logic [AB-1:0] shf_coef_addr;
  logic signed [SHF_AW-1:0] shf_y_full;
  logic signed [FTA_TW-1:0] fta_y_trunc;
  logic signed [SEG_YW-1:0] seg_y_full;

  fir_opt_top dut (.*);

  int checks = 0, failures = 0;
  int n_shf_stall = 0, n_fta_stall = 0, n_seg_stall = 0, n_reload = 0;
  int n_shf_valid = 0, n_fta_valid = 0, n_seg_valid = 0, n_trunc_err = 0, n_lb_carry = 0, n_gated = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  function automatic int fh(int i);
    return FC[(i < 5 - i) ? i : 5 - i];
  endfunction

  // ---------------- symmetric hybrid form filter ----------------
  int h [L];
  int hs [$];
  int hm;
  bit shf_done = 0;

  task automatic shf_load();
    for (int j = 0; j < NC; j++) begin
      int c;
      c = $signed(12'($urandom));
      @(negedge clk);
      shf_coef_we = 1'b1; shf_coef_addr = AB'(j); shf_coef_wdata = N'(c);
      h[j] = c; h[L-1-j] = c;
    end
    @(negedge clk);
    shf_coef_we = 1'b0;
  endtask

  initial begin
    int checked_from;
    shf_en = 0; shf_x = 0; shf_coef_we = 0; shf_coef_addr = 0; shf_coef_wdata = 0; hm = 0;
    @(posedge rst_n);
    shf_load();
    checked_from = 0;
    for (int phase = 0; phase < 2; phase++) begin
      int taken;
      taken = 0;
      if (phase == 1) begin
        shf_load();
        n_reload++;
        checked_from = hm + L;
      end
      while (taken < 1500) begin
        @(negedge clk);
        if (hm >= checked_from + 1 || (phase == 0 && hm > 0)) begin
          longint e;
          e = 0;
          for (int i = 0; i < L; i++)
            if (hm - 2 - i >= 0) e += longint'(h[i]) * longint'(hs[hm - 2 - i]);
          check("shf y_full", shf_y_full, e);
          check("shf y", shf_y, longint'($signed(N'(e >>> N))));
        end
        check("shf valid", shf_valid, hm >= L + 1);
        if (shf_valid && hm == L + 1 && phase == 0) n_shf_valid++;
        shf_en = ($urandom % 8) != 0;
        if (!shf_en) n_shf_stall++;
        shf_x = N'($urandom);
        if (shf_en) begin hs.push_back(int'(shf_x)); hm++; taken++; end
      end
    end
    shf_done = 1;
  end

  // ---------------- truncated-adder and segmented filters ----------------
  int fs [$], ss [$];
  int fm, sm;
  int sm_g;
  bit fix_done = 0;

  initial begin
    fta_en = 0; seg_en = 0; fta_x = 0; seg_x = 0; fm = 0; sm = 0; sm_g = -100; seg_lb_gate = 0;
    @(posedge rst_n);
    while (fm < 3000 || sm < 3000) begin
      longint fe, fx, se;
      @(negedge clk);
      fe = 0; fx = 0; se = 0;
      for (int i = 0; i < 6; i++) begin
        if (fm - 2 - i >= 0) begin
          fe += (longint'(fh(i)) * longint'(fs[fm - 2 - i])) >>> FK;
          fx += longint'(fh(i)) * longint'(fs[fm - 2 - i]);
        end
        if (sm - 3 - i >= 0) se += longint'(fh(i)) * longint'(ss[sm - 3 - i]);
      end
      check("fta y_trunc", fta_y_trunc, fe);
      check("fta y", fta_y, fe >>> (N - FK));
      if ((fe >>> (N - FK)) != (fx >>> N)) n_trunc_err++;
      check("fta valid", fta_valid, fm >= 7);
      if (fta_valid && fm == 7) n_fta_valid++;
      if (sm < sm_g + 7) begin
        // low segment gated or refilling
        checks++;
        if (!(seg_y_full <= se && se - seg_y_full <= longint'(24) << SK)) begin
          failures++;
          $display("%0t seg gated: got %0d exact %0d", $time, seg_y_full, se);
        end
        if (seg_y_full != se) n_gated++;
        check("seg y", seg_y, seg_y_full >>> N);
      end else begin
        check("seg y_full", seg_y_full, se);
        check("seg y", seg_y, se >>> N);
      end
      check("seg valid", seg_valid, sm >= 8);
      if (seg_valid && sm == 8) n_seg_valid++;
      if ((dut.u_seg.rl[0] >> SK) != 0) n_lb_carry++;
      fta_en = ($urandom % 6) != 0;
      seg_en = ($urandom % 6) != 0;
      if (!fta_en) n_fta_stall++;
      if (!seg_en) n_seg_stall++;
      fta_x = N'($urandom);
      seg_x = N'($urandom);
      if (fta_en) begin fs.push_back(int'(fta_x)); fm++; end
      seg_lb_gate = (sm >= 1000 && sm < 1200);
      if (seg_en) begin ss.push_back(int'(seg_x)); sm++; if (seg_lb_gate) sm_g = sm; end
    end
    fix_done = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (shf_done && fix_done);
    $display("stalls shf/fta/seg %0d/%0d/%0d, reloads %0d, valid rises %0d/%0d/%0d, truncation errors %0d, low-segment carries %0d, gated outputs %0d",
             n_shf_stall, n_fta_stall, n_seg_stall, n_reload, n_shf_valid, n_fta_valid, n_seg_valid,
             n_trunc_err, n_lb_carry, n_gated);
    checks += 10;
    if (n_gated == 0)     failures++;
    if (n_shf_stall == 0) failures++;
    if (n_fta_stall == 0) failures++;
    if (n_seg_stall == 0) failures++;
    if (n_reload == 0)    failures++;
    if (n_shf_valid == 0) failures++;
    if (n_fta_valid == 0) failures++;
    if (n_seg_valid == 0) failures++;
    if (n_trunc_err == 0) failures++;
    if (n_lb_carry == 0)  failures++;
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
