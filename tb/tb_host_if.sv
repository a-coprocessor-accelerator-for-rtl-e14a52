// tb_host_if: self-checking test of the host bus interface.
//
// A bus-master model writes and reads registers while a small controller
// model drives busy, done, result and the two data streams. Checked:
// register write/read-back, the command word presented with the one-cycle
// cmd_valid pulse, wait states (an opcode written while busy, a DATA write
// into a full mailbox, a DATA read with no output word) and their exact
// lengths, the data words passed in both directions, and STATUS / irq.
module tb_host_if;
  import mpc_pkg::*;

  logic        clk = 1'b0, rst_n;
  logic        bus_sel, bus_we, bus_ready, irq;
  logic [3:0]  bus_addr;
  logic [15:0] bus_wdata, bus_rdata;
  logic        cmd_valid, busy, done;
  cmd_t        cmd;
  logic [DIM_W-1:0] result;
  logic        in_valid, in_ready, out_valid, out_ready;
  lns_t        in_data, out_data;

  int checks = 0, failures = 0;

  host_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // bus master: one transfer, returns read data and the wait states seen
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
    @(negedge clk);
    bus_sel = 1'b0;
  endtask

  logic [15:0] rd;
  cmd_t        seen;
  int          pulses = 0;
  always @(posedge clk) if (cmd_valid) begin seen <= cmd; pulses <= pulses + 1; end

  initial begin
    rst_n = 1'b0; bus_sel = 1'b0; bus_we = 1'b0; bus_addr = '0; bus_wdata = '0;
    busy = 1'b0; done = 1'b0; result = '0; in_ready = 1'b0; out_valid = 1'b0; out_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // operand registers and read-back
    xfer(1, REG_DST, 16'd17, rd);   xfer(1, REG_SRCA, 16'd300, rd);
    xfer(1, REG_SRCB, 16'd513, rd); xfer(1, REG_ROWS, 16'd6, rd);
    xfer(1, REG_COLS, 16'd7, rd);   xfer(1, REG_K, 16'd2, rd);
    xfer(1, REG_P, 16'd4, rd);
    xfer(0, REG_SRCB, 0, rd); check(rd == 16'd513, "SRCB read-back");
    xfer(0, REG_ROWS, 0, rd); check(rd == 16'd6, "ROWS read-back");
    xfer(1, REG_OP, 16'(OP_MULC), rd);
    @(negedge clk);
    check(pulses == 1, "one cmd_valid pulse");
    check(seen.op == OP_MULC && seen.dst == 17 && seen.src_a == 300 && seen.src_b == 513 &&
          seen.rows == 6 && seen.cols == 7 && seen.k == 2 && seen.p == 4, "command word");

    // opcode write while busy stalls until busy falls
    busy = 1'b1;
    fork
      begin repeat (5) @(negedge clk); busy = 1'b0; end
      xfer(1, REG_OP, 16'(OP_ADDC), rd);
    join
    check(waits == 4, $sformatf("busy stall length %0d", waits));
    @(negedge clk);
    check(pulses == 2 && seen.op == OP_ADDC, "second command after stall");

    // DATA writes: mailbox holds one word; the second write waits until taken
    xfer(1, REG_DATA, 16'h1234, rd);
    check(waits == 0 && in_valid && in_data == 16'h1234, "first DATA word in mailbox");
    fork
      begin repeat (3) @(negedge clk); in_ready = 1'b1; @(negedge clk); in_ready = 1'b0; end
      xfer(1, REG_DATA, 16'hBEEF, rd);
    join
    check(waits >= 2, $sformatf("full-mailbox stall %0d", waits));
    check(in_valid && in_data == 16'hBEEF, "second DATA word in mailbox");
    in_ready = 1'b1; @(negedge clk); in_ready = 1'b0;
    check(!in_valid, "mailbox emptied");

    // DATA read waits for an output word
    fork
      begin repeat (6) @(negedge clk); out_data = 16'h0C0D; out_valid = 1'b1; end
      xfer(0, REG_DATA, 0, rd);
    join
    check(rd == 16'h0C0D && waits == 5, $sformatf("OUTC read %h after %0d waits", rd, waits));
    out_valid = 1'b0;

    // completion: done -> irq and STATUS, cleared by the STATUS read
    result = 8'd3; busy = 1'b0;
    @(negedge clk); done = 1'b1; @(negedge clk); done = 1'b0;
    check(irq, "irq after done");
    xfer(0, REG_STATUS, 0, rd);
    check(rd == {1'b0, 1'b1, 6'b0, 8'd3}, $sformatf("STATUS %h", rd));
    check(!irq, "irq cleared by STATUS read");
    busy = 1'b1;
    xfer(0, REG_STATUS, 0, rd);
    check(rd[15] && !rd[14], "STATUS busy");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
