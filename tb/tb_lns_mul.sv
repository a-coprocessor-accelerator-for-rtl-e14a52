// tb_lns_mul: self-checking test of the LNS multiplier/divider.
//
// Products and quotients of random operands are compared with the result
// of the same operation done in double precision and rounded back to LNS,
// which must match exactly (a product is exact in LNS). Directed cases
// cover zero operands, division by zero, overflow (saturation) and
// underflow (to zero).
module tb_lns_mul;
  import mpc_pkg::*;
  import tb_lns_pkg::*;

  lns_t a, b, y;
  logic div;
  int   checks = 0, failures = 0;

  lns_mul dut (.a(a), .b(b), .div(div), .y(y));

  task automatic expect_eq(lns_t ea, lns_t eb, logic d, lns_t exp);
    a = ea; b = eb; div = d;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h -> %h expected %h", ea, d ? "/" : "*", eb, y, exp);
    end
  endtask

  function automatic lns_t rnd(int span);
    return {1'($urandom), LOG_W'($signed($urandom_range(0, 2*span)) - span)};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_eq(LNS_ZERO, 16'h0400, 0, LNS_ZERO);
    expect_eq(16'h8400, LNS_ZERO, 0, LNS_ZERO);
    expect_eq(16'h8400, LNS_ZERO, 1, {1'b1, LOG_MAX});          // x/0 saturates
    expect_eq({1'b0, LOG_MAX}, 16'h0200, 0, {1'b0, LOG_MAX});   // overflow
    expect_eq(16'h6000, 16'h6000, 0, LNS_ZERO); // underflow
    expect_eq(to_lns(3.0), to_lns(-5.0), 1, to_lns(to_real(to_lns(3.0)) / to_real(to_lns(-5.0))));
    for (int i = 0; i < 20000; i++) begin
      lns_t ra, rb;
      logic d;
      real  r;
      ra = rnd(15 << LNS_F);
      rb = rnd(15 << LNS_F);
      d  = 1'($urandom);
      r  = d ? to_real(ra) / to_real(rb) : to_real(ra) * to_real(rb);
      expect_eq(ra, rb, d, to_lns(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
