// tb_lns_alu: self-checking test of the LNS ALU.
//
// Every operation (pass, add, sub, multiply-accumulate, multiply-subtract,
// divide, 1/a^2, 1/a^3) and the magnitude comparison are exercised with
// random operands and checked against double-precision arithmetic on the
// operands' real values, with a tolerance of two units of the log (MAC
// rounds twice) or a small linear error where the result comes from
// cancellation.
module tb_lns_alu;
  import mpc_pkg::*;
  import tb_lns_pkg::*;

  alu_op_e op;
  lns_t    a, b, c, y;
  logic    mag_gt;
  int      checks = 0, failures = 0;

  lns_alu dut (.op(op), .a(a), .b(b), .c(c), .y(y), .mag_gt(mag_gt));

  function automatic lns_t rnd(int span);
    return {1'($urandom), LOG_W'($signed($urandom_range(0, 2*span)) - span)};
  endfunction

  task automatic run(alu_op_e o, lns_t ia, lns_t ib, lns_t ic);
    real ra, rb, rc, ex, big;
    bit  ok;
    op = o; a = ia; b = ib; c = ic;
    #1;
    ra = to_real(ia); rb = to_real(ib); rc = to_real(ic);
    big = absr(ra) + absr(rb);
    unique case (o)
      ALU_PASS: ex = ra;
      ALU_ADD:  ex = ra + rb;
      ALU_SUB:  ex = ra - rb;
      ALU_MAC:  begin ex = rc + ra * rb; big = absr(rc) + absr(ra * rb); end
      ALU_MSB:  begin ex = rc - ra * rb; big = absr(rc) + absr(ra * rb); end
      ALU_DIV:  ex = ra / rb;
      ALU_IP2:  ex = 1.0 / (ra * ra);
      ALU_IP3:  ex = 1.0 / (ra * ra * ra);
      default:  ex = 0.0;
    endcase
    ok = close(y, ex, 2.0, big * $pow(2.0, -real'(LNS_F - 2)));
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL op=%s a=%h b=%h c=%h y=%h (%g vs %g)", o.name(), ia, ib, ic, y, to_real(y), ex);
    end
    checks++;
    if (mag_gt !== (absr(ra) > absr(rb))) begin
      failures++;
      if (failures < 10) $display("FAIL mag_gt a=%h b=%h", ia, ib);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e o;
    op = ALU_IP2; a = LNS_ZERO; b = 16'h0000; c = 16'h0000;   // 1/0 -> largest magnitude
    #1;
    checks++;
    if (y !== {1'b0, LOG_MAX}) failures++;
    run(ALU_MAC, 16'h0000, 16'h0000, 16'h0000);     // 1 + 1*1 = 2
    checks++;
    if (y !== 16'h0200) failures++;
    run(ALU_MSB, 16'h0400, 16'h0000, 16'h0400);     // 4 - 4*1 = 0
    checks++;
    if (y !== LNS_ZERO) failures++;
    for (int i = 0; i < 8000; i++) begin
      o = alu_op_e'($urandom_range(0, 7));
      run(o, rnd(6 << LNS_F), rnd(6 << LNS_F), rnd(8 << LNS_F));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
