// tb_matrix_mem: self-checking test of the matrix data memory.
//
// Fills every word with a random value, reads all of it back through both
// read ports, then runs random mixed write/read cycles against a reference
// array, checking that a write becomes visible after the clock edge and
// that a read of the word being written still returns the old value.
module tb_matrix_mem;
  import mpc_pkg::*;

  localparam int unsigned DEPTH = 1024;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic          clk = 0;
  logic [AW-1:0] ra_addr, rb_addr, wa;
  lns_t          ra_data, rb_data, wd;
  logic          we;
  lns_t          ref_mem [DEPTH];
  int            checks = 0, failures = 0;

  matrix_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [AW-1:0] a1, logic [AW-1:0] a2);
    ra_addr = a1; rb_addr = a2;
    #1;
    checks += 2;
    if (ra_data !== ref_mem[a1]) failures++;
    if (rb_data !== ref_mem[a2]) failures++;
  endtask

  initial begin
    we = 0; wa = '0; wd = '0; ra_addr = '0; rb_addr = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; wa = AW'(i); wd = lns_t'($urandom); ref_mem[i] = wd;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < DEPTH; i++) chk(AW'(i), AW'(DEPTH - 1 - i));
    for (int i = 0; i < 5000; i++) begin
      we = 1'($urandom); wa = AW'($urandom); wd = lns_t'($urandom);
      chk(wa, AW'($urandom));                 // old value before the edge
      @(negedge clk);
      if (we) ref_mem[wa] = wd;
      chk(wa, AW'($urandom));                 // new value after it
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
