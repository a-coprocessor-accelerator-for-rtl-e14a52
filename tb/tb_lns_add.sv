// tb_lns_add: self-checking test of the LNS adder/subtractor.
//
// Random operand pairs (plus directed cases: zero operands, exact
// cancellation, saturation, operands far apart) are added and subtracted.
// The reference is computed in double precision from the operands' real
// values. A result passes when it is within 1 unit of the last place of the
// log of the exact result, or, where the exact result is much smaller than
// the operands (cancellation), when its linear error is within 2^-(F-1) of
// the larger operand.
module tb_lns_add;
  import mpc_pkg::*;

  lns_t x, yi, y;
  logic sub;
  int   checks = 0, failures = 0;

  lns_add dut (.x(x), .y_in(yi), .sub(sub), .y(y));

  function automatic real to_real(lns_t v);
    real l;
    if (lns_is_zero(v)) return 0.0;
    l = real'($signed(v[LOG_W-1:0])) / real'(1 << LNS_F);
    return (v[LNS_W-1] ? -1.0 : 1.0) * $pow(2.0, l);
  endfunction

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(lns_t a, lns_t b, logic s);
    real ra, rb, exact, got, big, lexp, lgot, maxmag;
    bit  ok;
    x = a; yi = b; sub = s;
    #1;
    ra = to_real(a); rb = to_real(b);
    exact = s ? ra - rb : ra + rb;
    got   = to_real(y);
    big   = absr(ra) > absr(rb) ? absr(ra) : absr(rb);
    maxmag = $pow(2.0, real'(LOG_MAX) / real'(1 << LNS_F));
    ok = 0;
    if (absr(exact) >= maxmag) begin
      ok = (y[LOG_W-1:0] == LOG_MAX) && (y[LNS_W-1] == (exact < 0.0));
    end else if (exact == 0.0) begin
      ok = lns_is_zero(y);
    end else begin
      if (!lns_is_zero(y) && ((got < 0.0) == (exact < 0.0))) begin
        lexp = $ln(absr(exact)) / $ln(2.0) * real'(1 << LNS_F);
        lgot = $ln(absr(got)) / $ln(2.0) * real'(1 << LNS_F);
        if (absr(lexp - lgot) <= 1.0) ok = 1;
      end
      if (absr(got - exact) <= big * $pow(2.0, -real'(LNS_F - 1))) ok = 1;
    end
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h %s %h -> %h (got %g, exact %g)", a, s ? "-" : "+", b, y, got, exact);
    end
  endtask

  function automatic lns_t rnd(int span);
    lns_t v;
    v[LNS_W-1]   = 1'($urandom);
    v[LOG_W-1:0] = LOG_W'($signed($urandom_range(0, 2*span)) - span);
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed cases
    check(16'h0000, 16'h0000, 0);                 // 1 + 1 = 2
    check(16'h0000, 16'h0000, 1);                 // 1 - 1 = 0
    check(16'h0000, 16'h8000, 0);                 // 1 + -1 = 0
    check(LNS_ZERO, 16'h0400, 0);                 // 0 + 4
    check(LNS_ZERO, 16'h0400, 1);                 // 0 - 4
    check(16'h0400, LNS_ZERO, 1);                 // 4 - 0
    check(16'h0200, 16'h0000, 1);                 // 2 - 1 = 1
    check(16'h0400, 16'h0000, 0);                 // 4 + 1 = 5
    check({1'b0, LOG_MAX}, {1'b0, LOG_MAX}, 0);   // saturation
    check(16'h0000, 16'h7000, 0);                 // 1 + tiny
    check(16'h0001, 16'h0000, 1);                 // near cancellation
    check(16'h8001, 16'h8000, 1);
    for (int i = 0; i < 3000; i++) check(rnd(6 << LNS_F), rnd(6 << LNS_F), 1'($urandom));
    for (int i = 0; i < 3000; i++) check(rnd(LNS_F << LNS_F), rnd(LNS_F << LNS_F), 1'($urandom));
    for (int i = 0; i < 2000; i++) begin
      lns_t a;
      a = rnd(20 << LNS_F);
      check(a, {1'($urandom), a[LOG_W-1:0] + LOG_W'($urandom_range(0, 40)) - LOG_W'(20)}, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
