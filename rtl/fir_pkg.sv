// fir_pkg: types and elaboration-time helpers shared by the FIR filters.
//
// Fixed-coefficient filters in this design multiply by constants with shift-and-add
// networks built from the canonical signed digit (CSD) form of each coefficient. The
// functions below recode a coefficient into CSD digits and then group any two non-zero
// digits that are two places apart ("+0+", "+0-", ...) into one term that uses a
// precomputed pattern 3x or 5x, so one coefficient becomes a short list of terms
// (+-1, +-3 or +-5) x x << shift. They are only called with constants, while the design is
// elaborated, and produce no logic of their own.
package fir_pkg;

  // Number of CSD digits used for a CW-bit two's complement coefficient.
  function automatic int csd_ndigits(int cw);
    return cw + 1;
  endfunction

  // CSD digit (-1, 0 or +1) at position pos of coefficient c.
  function automatic int csd_digit(int c, int pos);
    int v;
    int d;
    v = c;
    d = 0;
    for (int i = 0; i <= pos; i++) begin
      if ((v % 2) != 0) begin
        // v mod 4 is 1 or 3 (-1 or -3 for negative v in SystemVerilog's % rules)
        d = ((((v % 4) + 4) % 4) == 1) ? 1 : -1;
        v = v - d;
      end else begin
        d = 0;
      end
      v = v / 2;
    end
    return d;
  endfunction

  // Multiplier (0, +-1, +-3, +-5) of the term whose least significant position is pos.
  // Digits are scanned from the most significant end; a non-zero digit whose partner
  // two places lower is also non-zero forms one pattern term based at the lower place.
  function automatic int csd_term(int c, int pos, int nd);
    int d [64];
    bit used [64];
    int t [64];
    for (int p = 0; p < nd; p++) begin
      d[p] = csd_digit(c, p);
      used[p] = 1'b0;
      t[p] = 0;
    end
    for (int p = nd - 1; p >= 0; p--) begin
      if (!used[p] && d[p] != 0) begin
        used[p] = 1'b1;
        if (p >= 2 && d[p-2] != 0 && !used[p-2]) begin
          used[p-2] = 1'b1;
          t[p-2] = 4 * d[p] + d[p-2];
        end else begin
          t[p] = d[p];
        end
      end
    end
    return t[pos];
  endfunction

  // Number of non-zero terms of coefficient c.
  function automatic int csd_nterms(int c, int nd);
    int n;
    n = 0;
    for (int p = 0; p < nd; p++) if (csd_term(c, p, nd) != 0) n++;
    return n;
  endfunction

  // Extra bits the low (LB) segment of a segmented multiplier needs to hold the carries of
  // summing nterms k-bit pieces: ceil(log2(nterms)).
  function automatic int lb_carry_bits(int nterms);
    return (nterms <= 1) ? 0 : $clog2(nterms);
  endfunction

  // How a symmetric-hybrid-form basic unit is populated (see shf_unit).
  typedef enum logic [1:0] {
    SHF_FULL   = 2'd0,  // transpose-style pair + direct-style pre-added pair
    SHF_A_ONLY = 2'd1,  // transpose-style pair only (last unit when L = 4K+2)
    SHF_A_MID  = 2'd2,  // transpose-style pair + the single middle tap (L = 4K+3)
    SHF_SINGLE = 2'd3   // the single middle tap, transpose style (L = 4K+1)
  } shf_mode_e;

endpackage
