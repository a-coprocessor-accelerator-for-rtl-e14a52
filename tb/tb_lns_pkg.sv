// tb_lns_pkg: real-number reference helpers shared by the testbenches.
//
// to_lns / to_real convert between double precision and the 16-bit LNS
// format of mpc_pkg (sign bit, 15-bit two's-complement log2 with LNS_F
// fractional bits, most negative log code = zero). close() tells whether an
// LNS result is acceptably near an exact real value: within tol_ulp units
// of the log, or within lin_tol in the linear domain (for results formed
// by cancellation).
package tb_lns_pkg;
  import mpc_pkg::*;

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic real to_real(lns_t v);
    real l;
    if (lns_is_zero(v)) return 0.0;
    l = real'($signed(v[LOG_W-1:0])) / real'(1 << LNS_F);
    return (v[LNS_W-1] ? -1.0 : 1.0) * $pow(2.0, l);
  endfunction

  function automatic lns_t to_lns(real r);
    real l;
    int  li;
    if (r == 0.0) return LNS_ZERO;
    l  = $ln(absr(r)) / $ln(2.0) * real'(1 << LNS_F);
    li = $rtoi(l < 0.0 ? l - 0.5 : l + 0.5);
    if (li > int'(LOG_MAX)) li = int'(LOG_MAX);
    if (li <= int'(LOG_MIN)) return LNS_ZERO;
    return {r < 0.0, LOG_W'(li)};
  endfunction

  function automatic bit close(lns_t got, real exact, real tol_ulp, real lin_tol);
    real g, lg, le;
    g = to_real(got);
    if (absr(g - exact) <= lin_tol) return 1;
    if (exact == 0.0 || lns_is_zero(got)) return 0;
    if ((g < 0.0) != (exact < 0.0)) return 0;
    lg = $ln(absr(g)) / $ln(2.0) * real'(1 << LNS_F);
    le = $ln(absr(exact)) / $ln(2.0) * real'(1 << LNS_F);
    return absr(lg - le) <= tol_ulp;
  endfunction

endpackage
