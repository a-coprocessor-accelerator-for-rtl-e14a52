// tb_coproc_ctrl: self-checking test of the command controller.
//
// The controller is wired to a matrix_mem and an lns_alu and driven
// directly through its command port and its data streams (with random
// gaps on both streams). Every command is run: LOADC and OUTC (round trip),
// STOREC, ADDC, SUBC, POW2A, POW3A, MULC, MULV, PIVOT and a full
// Gauss-Jordan inversion built from PIVOT and GJSTEP. Results are read
// back with OUTC and compared with double-precision arithmetic on the
// LNS operand values. Cycle counts are checked against the schedule:
// one cycle per element for the elementwise commands and one cycle per
// multiply-accumulate for MULC / MULV, plus one cycle to accept the command.
module tb_coproc_ctrl;
  import mpc_pkg::*;
  import tb_lns_pkg::*;

  logic              clk = 1'b0, rst_n;
  logic              cmd_valid, busy, done;
  cmd_t              cmd;
  logic [DIM_W-1:0]  result;
  logic              in_valid, in_ready, out_valid, out_ready;
  lns_t              in_data, out_data;
  logic [ADDR_W-1:0] ra_addr, rb_addr, wa;
  lns_t              ra_data, rb_data, wd;
  logic              we;
  alu_op_e           alu_op;
  lns_t              alu_a, alu_b, alu_c, alu_y;
  logic              alu_mag_gt;

  int checks = 0, failures = 0;

  coproc_ctrl dut (.*);
  matrix_mem #(.DEPTH(1 << ADDR_W)) u_mem (.clk, .ra_addr, .ra_data, .rb_addr, .rb_data, .we, .wa, .wd);
  lns_alu u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .c(alu_c), .y(alu_y), .mag_gt(alu_mag_gt));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // run one command; last_cycles = clock cycles after the accepting cycle
  // up to and including the last working cycle
  int last_cycles;
  task automatic run(cmd_t c);
    @(negedge clk);
    cmd = c; cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    last_cycles = 0;
    while (!done) begin
      @(negedge clk);
      last_cycles++;
    end
  endtask

  function automatic cmd_t mk(opcode_e op, int dst, int a, int b, int rows, int cols, int k = 0, int p = 0);
    cmd_t c;
    c.op = op; c.dst = ADDR_W'(dst); c.src_a = ADDR_W'(a); c.src_b = ADDR_W'(b);
    c.rows = DIM_W'(rows); c.cols = DIM_W'(cols); c.k = DIM_W'(k); c.p = DIM_W'(p);
    return c;
  endfunction

  // LOADC with a stream that has random gaps
  lns_t feed [$];
  logic took = 1'b0;
  always @(posedge clk) took <= in_valid && in_ready;
  always @(negedge clk) begin
    if (took) void'(feed.pop_front());
    in_valid <= (feed.size() > 0) && ($urandom_range(0, 3) != 0);
  end
  assign in_data = (feed.size() > 0) ? feed[0] : LNS_ZERO;

  task automatic load(int base, lns_t v [$]);
    cmd_t c;
    feed = v;
    c = mk(OP_LOADC, base, 0, 0, 1, v.size());
    run(c);
    @(negedge clk);
    check(feed.size() == 0, $sformatf("LOADC consumed all words (%0d left, %0d cycles)", feed.size(), last_cycles));
  endtask

  // OUTC with random back-pressure
  lns_t got [$];
  always @(negedge clk) out_ready <= 1'($urandom);
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_data);

  task automatic fetch(int base, int n, output lns_t v [$]);
    got = {};
    run(mk(OP_OUTC, 0, base, 0, 1, n));
    v = got;
  endtask

  function automatic lns_t rnd_val(real lo, real hi);
    real r;
    r = lo + (hi - lo) * real'($urandom_range(0, 10000)) / 10000.0;
    if ($urandom_range(0, 1)) r = -r;
    return to_lns(r);
  endfunction

  localparam int BA = 0, BB = 100, BV = 200, BD = 300, BE = 400, BG = 500;

  initial begin
    lns_t a [$], b [$], v [$], r [$], r2 [$];
    real  ex, mag;
    int   n, m, kd;

    rst_n = 1'b0; cmd_valid = 1'b0; cmd = '0; in_valid = 1'b0; out_ready = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- LOADC / OUTC round trip
    n = 4; m = 3; kd = 5;
    for (int x = 0; x < n * kd; x++) a.push_back(rnd_val(0.1, 8.0));
    for (int x = 0; x < kd * m; x++) b.push_back(rnd_val(0.1, 8.0));
    for (int x = 0; x < kd; x++) v.push_back(rnd_val(0.1, 8.0));
    load(BA, a); load(BB, b); load(BV, v);
    fetch(BA, a.size(), r);
    check(r.size() == a.size(), "OUTC length");
    foreach (r[x]) check(r[x] === a[x], $sformatf("round trip word %0d", x));

    // ---- MULC: D[n x m] = A[n x kd] * B[kd x m]
    run(mk(OP_MULC, BD, BA, BB, n, m, kd));
    check(last_cycles == n * m * kd, $sformatf("MULC cycles %0d", last_cycles));
    fetch(BD, n * m, r);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < m; j++) begin
        ex = 0.0; mag = 0.0;
        for (int k = 0; k < kd; k++) begin
          ex  += to_real(a[i*kd+k]) * to_real(b[k*m+j]);
          mag += absr(to_real(a[i*kd+k]) * to_real(b[k*m+j]));
        end
        check(close(r[i*m+j], ex, 3.0, mag * 0.005), $sformatf("MULC (%0d,%0d) %g vs %g", i, j, to_real(r[i*m+j]), ex));
      end

    // ---- MULV: E[n] = A[n x kd] * v[kd]
    run(mk(OP_MULV, BE, BA, BV, n, kd));
    check(last_cycles == n * kd, $sformatf("MULV cycles %0d", last_cycles));
    fetch(BE, n, r);
    for (int i = 0; i < n; i++) begin
      ex = 0.0; mag = 0.0;
      for (int k = 0; k < kd; k++) begin
        ex  += to_real(a[i*kd+k]) * to_real(v[k]);
        mag += absr(to_real(a[i*kd+k]) * to_real(v[k]));
      end
      check(close(r[i], ex, 3.0, mag * 0.005), $sformatf("MULV %0d", i));
    end

    // ---- elementwise commands on the first 12 words of A and B
    n = 12;
    run(mk(OP_ADDC, BD, BA, BB, 3, 4));
    check(last_cycles == n, $sformatf("ADDC cycles %0d", last_cycles));
    fetch(BD, n, r);
    for (int x = 0; x < n; x++)
      check(close(r[x], to_real(a[x]) + to_real(b[x]), 1.0, (absr(to_real(a[x])) + absr(to_real(b[x]))) * 0.002), "ADDC");
    run(mk(OP_SUBC, BD, BA, BB, 3, 4));
    fetch(BD, n, r);
    for (int x = 0; x < n; x++)
      check(close(r[x], to_real(a[x]) - to_real(b[x]), 1.0, (absr(to_real(a[x])) + absr(to_real(b[x]))) * 0.002), "SUBC");
    run(mk(OP_STOREC, BG, BA, 0, 3, 4));
    fetch(BG, n, r);
    for (int x = 0; x < n; x++) check(r[x] === a[x], "STOREC");
    run(mk(OP_POW2A, BD, BA, 0, n, 1));
    check(last_cycles == n, $sformatf("POW2A cycles %0d", last_cycles));
    fetch(BD, n, r);
    for (int x = 0; x < n; x++) check(close(r[x], 1.0 / (to_real(a[x]) ** 2), 0.6, 0.0), "POW2A");
    run(mk(OP_POW3A, BD, BA, 0, n, 1));
    fetch(BD, n, r);
    for (int x = 0; x < n; x++) check(close(r[x], 1.0 / (to_real(a[x]) ** 3), 0.6, 0.0), "POW3A");

    // ---- PIVOT on column 1 of A (4 x 5), from row 1
    begin
      int best; real bv;
      best = 1; bv = 0.0;
      for (int i = 1; i < 4; i++)
        if (absr(to_real(a[i*5+1])) > bv) begin bv = absr(to_real(a[i*5+1])); best = i; end
      run(mk(OP_PIVOT, 0, BA, 0, 4, 5, 1));
      check(last_cycles == 3, $sformatf("PIVOT cycles %0d", last_cycles));
      check(result == DIM_W'(best), $sformatf("PIVOT result %0d expected %0d", result, best));
    end

    // ---- Gauss-Jordan inversion of a 4 x 4 matrix held as [H | I]
    begin
      lns_t h [$], aug [$];
      int   nn;
      real  s;
      nn = 4;
      for (int x = 0; x < nn * nn; x++) h.push_back(rnd_val(0.2, 4.0));
      for (int i = 0; i < nn; i++) h[i*nn+i] = to_lns(to_real(h[i*nn+i]) + 8.0 * (to_real(h[i*nn+i]) > 0 ? 1.0 : -1.0));
      for (int i = 0; i < nn; i++)
        for (int j = 0; j < 2 * nn; j++)
          aug.push_back(j < nn ? h[i*nn+j] : (j - nn == i ? to_lns(1.0) : LNS_ZERO));
      load(BG, aug);
      for (int k = 0; k < nn; k++) begin
        run(mk(OP_PIVOT, 0, BG, 0, nn, 2 * nn, k));
        run(mk(OP_GJSTEP, 0, BG, 0, nn, 2 * nn, k, int'(result)));
      end
      fetch(BG, 2 * nn * nn, r);
      // left half must be the identity, H * right half must be the identity
      for (int i = 0; i < nn; i++)
        for (int j = 0; j < nn; j++) begin
          check(close(r[i*2*nn+j], (i == j) ? 1.0 : 0.0, 3.0, 0.01), $sformatf("GJ left (%0d,%0d)", i, j));
          s = 0.0;
          for (int k = 0; k < nn; k++) s += to_real(h[i*nn+k]) * to_real(r[k*2*nn+nn+j]);
          check(absr(s - ((i == j) ? 1.0 : 0.0)) < 0.03, $sformatf("H*inv (%0d,%0d) = %g", i, j, s));
        end
    end

    // ---- GJSTEP with an explicit row swap on a 2 x 3 matrix [0 1 | 5 ; 2 4 | 6]
    load(BE, '{LNS_ZERO, to_lns(1.0), to_lns(5.0), to_lns(2.0), to_lns(4.0), to_lns(6.0)});
    run(mk(OP_PIVOT, 0, BE, 0, 2, 3, 0));
    check(result == 1, "PIVOT picks row 1");
    run(mk(OP_GJSTEP, 0, BE, 0, 2, 3, 0, 1));
    check(last_cycles == 2 * 3 + 1 + 3 + 2 * 1 + 3 + 1, $sformatf("GJSTEP cycles %0d", last_cycles));
    fetch(BE, 6, r2);
    // after swap: [2 4 6; 0 1 5] -> row0/2 = [1 2 3]; row1 - 0*row0 = [0 1 5]
    check(close(r2[0], 1.0, 1.0, 0.0) && close(r2[1], 2.0, 1.0, 0.0) && close(r2[2], 3.0, 1.0, 0.0), "GJSTEP pivot row");
    check(lns_is_zero(r2[3]) && close(r2[4], 1.0, 1.0, 0.0) && close(r2[5], 5.0, 1.0, 0.0), "GJSTEP other row");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
