// tb_pkg: reference models shared by the testbenches.
//
// ref_fcode  ifmap coding written as the sub-range search of the coding
//            algorithm (division into D equal sub-ranges of R, zero kept
//            apart), independent of the bit-slice form used in the RTL.
// ref_wcode  the offline filter encoder: a coefficient becomes 0 or
//            +/-2^c, c being the index of the sub-range of |w| when the
//            filter range R_filter is split into D_filter sub-ranges,
//            half of them per sign; magnitudes beyond the range saturate.
// ref_pval   the integer value of a coded coefficient.
// rand_pix / rand_wgt  random ifmap values (many zeros, some beyond the
//            coding range) and coefficients in (-1.25, 1.25).
package tb_pkg;
  import accel_pkg::*;

  function automatic int ref_fcode(longint unsigned act, longint unsigned range, int d);
    longint unsigned seg = range / longint'(d);
    if (act == 0) return 0;
    for (int v = 0; v < d; v++)
      if (act >= longint'(v) * seg && act < longint'(v + 1) * seg) return v + 1;
    return d;
  endfunction

  function automatic wcode_t ref_wcode(int w);
    longint seg = (longint'(1) << FILT_RANGE_LOG2) / D_FILTER;
    longint a = (w < 0) ? -longint'(w) : longint'(w);
    wcode_t c;
    c.nz  = (w != 0);
    c.neg = (w < 0);
    c.exp = EXP_W'(D_FILTER / 2 - 1);
    for (int v = 0; v < D_FILTER / 2; v++)
      if (a >= v * seg && a < (v + 1) * seg) begin
        c.exp = EXP_W'(v);
        break;
      end
    return c;
  endfunction

  function automatic int ref_pval(wcode_t c);
    if (!c.nz) return 0;
    return c.neg ? -(1 << c.exp) : (1 << c.exp);
  endfunction

  function automatic pix_t rand_pix();
    int unsigned r = $urandom_range(0, 99);
    if (r < 25) return '0;
    if (r < 30) return pix_t'($urandom_range(0, 255)) << 24;       // beyond R_fmaps
    return pix_t'($urandom_range(0, (1 << 24) - 1));                // within R_fmaps
  endfunction

  function automatic wgt_t rand_wgt();
    int unsigned r = $urandom_range(0, 99);
    if (r < 10) return '0;
    return wgt_t'(int'($urandom_range(0, 163840)) - 81920);          // +/-1.25
  endfunction
endpackage
