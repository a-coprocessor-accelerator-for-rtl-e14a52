// lns_add: LNS adder / subtractor.
//
// Computes y = x + y_in (sub = 0) or y = x - y_in (sub = 1) on 16-bit LNS
// words. Addition is the hard operation of a logarithmic number system:
// with |big| >= |small| and n = log2|big| - log2|small| >= 0, the result is
//     log2|y| = log2|big| + log2(1 +/- 2^-n)
// with "+" when the two signs agree and "-" otherwise; the sign is that of
// the larger operand. The design description adopts LNS but does not say
// how its adder works, so this unit uses a conversion method that needs no
// stored function table:
//   1. 2^-n is formed in fixed point (G fractional bits) as 2^-int(n) times
//      the product of the constants 2^(-2^-m) selected by the fraction bits
//      of n. The constants are computed at elaboration by repeated integer
//      square roots of 2.
//   2. s = 1 +/- 2^-n is normalised to [1,2) by a leading-one search, which
//      yields the integer part of log2(s).
//   3. The LNS_F+1 fraction bits of log2(s) come from repeated squaring of
//      the normalised mantissa (each squaring that reaches 2 gives a 1 bit);
//      the extra bit rounds to nearest.
// For n >= LNS_F+3 the correction is below half a unit and the larger
// operand is returned unchanged. Exact cancellation returns zero. The
// result saturates and underflows like lns_mul.
//
// Interface: x, y_in (lns_t), sub; y = result. Timing: purely
// combinational (a long path, meant for the low clock rate of a small
// embedded controller).
module lns_add
  import mpc_pkg::*;
(
  input  lns_t x,
  input  lns_t y_in,
  input  logic sub,
  output lns_t y
);

  localparam int unsigned G = LNS_F + 12;   // fractional bits of the linear domain

  typedef logic [G+1:0] fix_t;              // unsigned Q2.G
  typedef logic [LNS_F:1][G:0] rtab_t;      // 2^(-2^-m), m = 1..LNS_F, Q1.G

  function automatic longint unsigned isqrt(longint unsigned v);
    longint unsigned res, bitv;
    res  = 0;
    bitv = 64'd1 << 62;
    while (bitv > v) bitv = bitv >> 2;
    while (bitv != 0) begin
      if (v >= res + bitv) begin
        v   = v - (res + bitv);
        res = (res >> 1) + bitv;
      end else begin
        res = res >> 1;
      end
      bitv = bitv >> 2;
    end
    return res;
  endfunction

  function automatic rtab_t make_rtab();
    rtab_t           t;
    longint unsigned s;
    s = 64'd2 << G;                                        // 2.0
    for (int m = 1; m <= int'(LNS_F); m++) begin
      s = isqrt(s << G);                                   // 2^(2^-m)
      t[m] = (G+1)'(((64'd1 << (2*G)) + (s >> 1)) / s);   // 2^(-2^-m), rounded
    end
    return t;
  endfunction

  localparam rtab_t RTAB = make_rtab();

  lns_t                    op_big, op_sml;
  logic                    s_big, s_small, eff_sub;
  logic [LOG_W:0]          n;          // log2|big| - log2|small| >= 0
  logic [LOG_W-LNS_F:0]    n_int;
  logic [LNS_F-1:0]        n_frac;
  logic [2*G+3:0]          prod;
  fix_t                    t, s, m;
  int                      msb;
  logic signed [LOG_W+2:0] lg;         // log2(s), LNS_F+1 fractional bits
  logic [LNS_F:0]          fbits;
  logic signed [LOG_W+2:0] res;

  always_comb begin
    s_small = y_in[LNS_W-1] ^ sub;
    if ($signed(x[LOG_W-1:0]) < $signed(y_in[LOG_W-1:0])) begin
      op_big = {s_small, y_in[LOG_W-1:0]};
      op_sml = x;
    end else begin
      op_big = x;
      op_sml = {s_small, y_in[LOG_W-1:0]};
    end
    s_big   = op_big[LNS_W-1];
    eff_sub = s_big ^ op_sml[LNS_W-1];
    n       = {op_big[LOG_W-1], op_big[LOG_W-1:0]} - {op_sml[LOG_W-1], op_sml[LOG_W-1:0]};
    n_int   = n[LOG_W:LNS_F];
    n_frac  = n[LNS_F-1:0];

    // 1. t = 2^-n in Q1.G
    t = fix_t'(1) << G;
    for (int m_i = 1; m_i <= int'(LNS_F); m_i++) begin
      if (n_frac[LNS_F-m_i]) begin
        prod = (2*G+4)'(t) * (2*G+4)'(RTAB[m_i]);
        t    = fix_t'(prod >> G);
      end
    end
    t = t >> n_int;

    // 2. s = 1 +/- t, normalised to m in [1,2)
    s = eff_sub ? (fix_t'(1) << G) - t : (fix_t'(1) << G) + t;
    msb = 0;
    for (int b = 0; b <= int'(G) + 1; b++) if (s[b]) msb = b;
    if (msb > int'(G)) m = s >> 1;
    else               m = s << (int'(G) - msb);

    // 3. fraction bits of log2(m) by repeated squaring
    for (int b = LNS_F; b >= 0; b--) begin
      prod = (2*G+4)'(m) * (2*G+4)'(m);
      if (prod[2*G+1]) begin
        fbits[b] = 1'b1;
        m        = fix_t'(prod >> (G + 1));
      end else begin
        fbits[b] = 1'b0;
        m        = fix_t'(prod >> G);
      end
    end
    lg  = ((LOG_W+3)'(msb - int'(G)) <<< (LNS_F + 1)) + $signed((LOG_W+3)'({1'b0, fbits}));
    res = $signed({{3{op_big[LOG_W-1]}}, op_big[LOG_W-1:0]}) + ((lg + 1) >>> 1);

    if (lns_is_zero(x)) begin
      y = {s_small, y_in[LOG_W-1:0]};
      if (lns_is_zero(y_in)) y = LNS_ZERO;
    end else if (lns_is_zero(y_in)) begin
      y = x;
    end else if (n >= (LOG_W+1)'((LNS_F + 3) << LNS_F)) begin
      y = op_big;
    end else if (s == '0) begin
      y = LNS_ZERO;
    end else if (res > $signed((LOG_W+3)'(LOG_MAX))) begin
      y = {s_big, LOG_MAX};
    end else if (res <= $signed({{3{1'b1}}, LOG_MIN})) begin
      y = LNS_ZERO;
    end else begin
      y = {s_big, res[LOG_W-1:0]};
    end
  end

endmodule
