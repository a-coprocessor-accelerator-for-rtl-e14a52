// tb_mpc_coproc: end-to-end test of the coprocessor through its host bus.
//
// A bus-master model plays the host microprocessor and runs one Newton
// update of an MPC optimiser with M = 20 control moves (the largest that
// fits the 1024-word data memory with this layout),
//     u_new = u - H^-1 g,   g = H u - c - 1/x.^2,
// entirely with coprocessor commands:
//   LOADC  [H | I] (M x 2M), [u ; 0], c, x, [0 ; 0]
//   MULV   H u  (as [H | I] * [u ; 0])       SUBC  H u - c
//   POW2A  1/x.^2                             SUBC  g = H u - c - 1/x.^2
//   POW3A  1/x.^3 (read back and checked)     STOREC  copy of u
//   PIVOT + GJSTEP, M times (Gauss-Jordan with partial pivoting) -> [I | H^-1]
//   MULV   H^-1 g (as [I | H^-1] * [0 ; g])   SUBC  u_new = u - H^-1 g
//   MULC   a small matrix product              OUTC  results to the host
// H is random with its large entries placed off the diagonal, so partial
// pivoting must swap rows. The result is compared with the same update
// computed in double precision from the LNS inputs.
//
// Mechanisms counted (each must occur): an opcode write stalled because a
// command was still running, a DATA read stalled until the output word was
// ready, a PIVOT that chose a row other than the diagonal one (row swap in
// GJSTEP), completion signalled through irq, and host bus work done while
// a command was running. The busy time of MULV is checked against one
// multiply-accumulate per cycle.
module tb_mpc_coproc;
  import mpc_pkg::*;
  import tb_lns_pkg::*;

  localparam int M = 20;   // largest Newton step that fits the 1024-word memory

  logic        clk = 1'b0, rst_n;
  logic        bus_sel, bus_we, bus_ready, irq;
  logic [3:0]  bus_addr;
  logic [15:0] bus_wdata, bus_rdata;

  int checks = 0, failures = 0;
  int n_busy_stall = 0, n_read_stall = 0, n_swap = 0, n_irq = 0, n_overlap = 0;

  mpc_coproc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // ---------------------------------------------------------------- host bus
  // One transfer per call; consecutive calls give back-to-back transfers.
  int waits;
  task automatic xfer(logic we, logic [3:0] addr, logic [15:0] wdata, output logic [15:0] rdata);
    @(negedge clk);
    bus_sel = 1'b1; bus_we = we; bus_addr = addr; bus_wdata = wdata;
    waits = 0;
    @(posedge clk);
    while (!bus_ready) begin
      waits++;
      @(posedge clk);
    end
    rdata = bus_rdata;
    #1 bus_sel = 1'b0;
  endtask

  task automatic wr(logic [3:0] addr, int data);
    logic [15:0] d;
    xfer(1'b1, addr, 16'(data), d);
  endtask

  task automatic rd(logic [3:0] addr, output logic [15:0] data);
    xfer(1'b0, addr, '0, data);
  endtask

  // issue a command; the opcode write may stall while the previous one runs
  task automatic issue(opcode_e op, int dst, int a, int b, int rows, int cols, int k = 0, int p = 0);
    wr(REG_DST, dst); wr(REG_SRCA, a); wr(REG_SRCB, b);
    wr(REG_ROWS, rows); wr(REG_COLS, cols); wr(REG_K, k); wr(REG_P, p);
    wr(REG_OP, int'(op));
    if (waits > 0) n_busy_stall++;
  endtask

  task automatic wait_irq();
    logic [15:0] s;
    while (!irq) @(negedge clk);
    n_irq++;
    rd(REG_STATUS, s);
  endtask

  task automatic poll(output logic [15:0] s);
    do rd(REG_STATUS, s); while (s[15]);
  endtask

  // words are sent as one row, or as rows of `cols` words (dimensions are 8 bits)
  task automatic load(int base, lns_t v [$], int cols = 0);
    if (cols == 0) cols = v.size();
    issue(OP_LOADC, base, 0, 0, v.size() / cols, cols);
    foreach (v[x]) wr(REG_DATA, int'(v[x]));
    wait_irq();
  endtask

  task automatic fetch(int base, int n, output lns_t v [$], input int cols = 0);
    logic [15:0] d;
    v = {};
    if (cols == 0) cols = n;
    issue(OP_OUTC, 0, base, 0, n / cols, cols);
    for (int x = 0; x < n; x++) begin
      rd(REG_DATA, d);
      if (waits > 0) n_read_stall++;
      v.push_back(d);
    end
    wait_irq();
  endtask

  // busy time of the controller, measured on its busy output
  int busy_cycles, busy_total = 0, cyc = 0, t_start, t_load;
  always @(posedge clk) begin
    cyc++;
    if (dut.u_ctrl.busy) begin
      busy_cycles++;
      busy_total++;
    end
  end

  // ---------------------------------------------------------- memory map
  // 2*M*M + 11*M words; P3 shares DV, and the MULC test reuses AUG at the end
  localparam int AUG = 0, UZ = AUG + 2*M*M, CV = UZ + 2*M, XV = CV + M, TV = XV + M,
                 WV = TV + M, ZG = WV + M, DV = ZG + 2*M, UN = DV + M, US = UN + M,
                 P3 = DV, MA = AUG, MB = MA + 6, MD = MB + 6;

  function automatic real rnd_r(real lo, real hi);
    real r;
    r = lo + (hi - lo) * real'($urandom_range(0, 10000)) / 10000.0;
    return $urandom_range(0, 1) ? -r : r;
  endfunction

  real  h [M][M], aug_r [M][2*M];
  real  u [M], c [M], x [M], g [M], d [M], un [M];
  lns_t q [$], r [$];

  initial begin
    logic [15:0] s;
    int          perm [M];
    int          pr, t;
    real         big, piv, f, sc;

    rst_n = 1'b0; bus_sel = 1'b0; bus_we = 1'b0; bus_addr = '0; bus_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- problem data, rounded to LNS so the reference sees the same inputs
    for (int i = 0; i < M; i++) perm[i] = i;
    for (int i = M - 1; i > 0; i--) begin
      t = $urandom_range(0, i); pr = perm[i]; perm[i] = perm[t]; perm[t] = pr;
    end
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < M; j++) h[i][j] = to_real(to_lns(rnd_r(0.1, 1.0)));
      h[i][perm[i]] = to_real(to_lns(rnd_r(6.0, 9.0)));
      u[i] = to_real(to_lns(rnd_r(0.5, 2.0)));
      c[i] = to_real(to_lns(rnd_r(0.5, 4.0)));
      x[i] = to_real(to_lns(1.0 + real'($urandom_range(0, 1000)) / 500.0));
    end

    // ---- load
    t_start = cyc;
    q = {};
    for (int i = 0; i < M; i++)
      for (int j = 0; j < 2*M; j++) q.push_back(j < M ? to_lns(h[i][j]) : to_lns((j - M == i) ? 1.0 : 0.0));
    load(AUG, q, 2*M);
    q = {};
    for (int i = 0; i < 2*M; i++) q.push_back(i < M ? to_lns(u[i]) : LNS_ZERO);
    load(UZ, q);
    q = {}; foreach (c[i]) q.push_back(to_lns(c[i])); load(CV, q);
    q = {}; foreach (x[i]) q.push_back(to_lns(x[i])); load(XV, q);
    q = {}; for (int i = 0; i < M; i++) q.push_back(LNS_ZERO); load(ZG, q);

    // ---- gradient g = H u - c - 1/x^2, written into the lower half of ZG
    t_load = cyc;
    busy_total = 0;
    busy_cycles = 0;
    issue(OP_MULV, TV, AUG, UZ, M, 2*M);
    wait_irq();
    check(busy_cycles == 2*M*M, $sformatf("MULV busy %0d cycles, expected %0d", busy_cycles, 2*M*M));
    issue(OP_SUBC, TV, TV, CV, M, 1);        // in place, element by element
    rd(REG_ROWS, s);                          // host bus work while busy
    if (s == 16'(M)) n_overlap++;
    issue(OP_POW2A, WV, XV, 0, M, 1);         // stalls until SUBC is done
    issue(OP_SUBC, ZG + M, TV, WV, M, 1);
    issue(OP_POW3A, P3, XV, 0, M, 1);
    issue(OP_STOREC, US, UZ, 0, M, 1);
    wait_irq();
    fetch(P3, M, r);
    for (int i = 0; i < M; i++)
      check(close(r[i], 1.0 / (x[i] * x[i] * x[i]), 0.6, 0.0), $sformatf("1/x^3 [%0d]", i));

    // ---- Gauss-Jordan inversion of H in [H | I]
    for (int k = 0; k < M; k++) begin
      issue(OP_PIVOT, 0, AUG, 0, M, 2*M, k);
      poll(s);
      if (int'(s[7:0]) != k) n_swap++;
      issue(OP_GJSTEP, 0, AUG, 0, M, 2*M, k, int'(s[7:0]));
    end
    // ---- step d = H^-1 g and update u_new = u - d
    issue(OP_MULV, DV, AUG, ZG, M, 2*M);
    issue(OP_SUBC, UN, US, DV, M, 1);
    wait_irq();
    $display("Newton update, M = %0d: %0d cycles loading, %0d cycles computing (coprocessor busy %0d)",
             M, t_load - t_start, cyc - t_load, busy_total);

    // ---- reference in double precision
    for (int i = 0; i < M; i++) begin
      g[i] = -c[i] - 1.0 / (x[i] * x[i]);
      for (int j = 0; j < M; j++) g[i] += h[i][j] * u[j];
    end
    for (int i = 0; i < M; i++)
      for (int j = 0; j < 2*M; j++) aug_r[i][j] = j < M ? h[i][j] : ((j - M == i) ? 1.0 : 0.0);
    for (int k = 0; k < M; k++) begin
      pr = k; big = 0.0;
      for (int i = k; i < M; i++) if (absr(aug_r[i][k]) > big) begin big = absr(aug_r[i][k]); pr = i; end
      for (int j = 0; j < 2*M; j++) begin f = aug_r[k][j]; aug_r[k][j] = aug_r[pr][j]; aug_r[pr][j] = f; end
      piv = aug_r[k][k];
      for (int j = 0; j < 2*M; j++) aug_r[k][j] /= piv;
      for (int i = 0; i < M; i++) if (i != k) begin
        f = aug_r[i][k];
        for (int j = 0; j < 2*M; j++) aug_r[i][j] -= f * aug_r[k][j];
      end
    end
    sc = 0.0;
    for (int i = 0; i < M; i++) begin
      d[i] = 0.0;
      for (int j = 0; j < M; j++) d[i] += aug_r[i][M+j] * g[j];
      un[i] = u[i] - d[i];
      if (absr(un[i]) > sc) sc = absr(un[i]);
      if (absr(u[i]) > sc) sc = absr(u[i]);
    end

    // ---- results back to the host and compared
    fetch(UN, M, r);
    for (int i = 0; i < M; i++)
      check(absr(to_real(r[i]) - un[i]) <= 0.03 * sc, $sformatf("u_new[%0d] = %g, expected %g", i, to_real(r[i]), un[i]));
    fetch(AUG, 2*M*M, r, 2*M);
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        check(absr(to_real(r[i*2*M + M + j]) - aug_r[i][M+j]) <= 0.02 * (absr(aug_r[i][M+j]) + 0.05),
              $sformatf("H^-1 (%0d,%0d) = %g, expected %g", i, j, to_real(r[i*2*M + M + j]), aug_r[i][M+j]));

    // ---- a 2 x 3 by 3 x 2 matrix product
    q = '{to_lns(1.0), to_lns(2.0), to_lns(3.0), to_lns(-1.0), to_lns(0.5), to_lns(4.0)};
    load(MA, q);
    q = '{to_lns(2.0), to_lns(1.0), to_lns(-1.0), to_lns(1.0), to_lns(0.5), to_lns(2.0)};
    load(MB, q);
    busy_cycles = 0;
    issue(OP_MULC, MD, MA, MB, 2, 2, 3);
    wait_irq();
    check(busy_cycles == 2*2*3, $sformatf("MULC busy %0d cycles", busy_cycles));
    fetch(MD, 4, r);
    check(close(r[0], 1.5, 2.0, 0.0) && close(r[1], 9.0, 2.0, 0.0) &&
          close(r[2], -0.5, 2.0, 0.0) && close(r[3], 7.5, 2.0, 0.0), "MULC result");

    // ---- every mechanism must have occurred
    $display("busy stalls %0d, read stalls %0d, pivot swaps %0d, irq completions %0d, overlapped host work %0d",
             n_busy_stall, n_read_stall, n_swap, n_irq, n_overlap);
    check(n_busy_stall > 0, "opcode write stalled on a running command");
    check(n_read_stall > 0, "DATA read stalled");
    check(n_swap > 0, "pivot row swap");
    check(n_irq > 0, "completion by irq");
    check(n_overlap > 0, "host work overlapped with a command");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
