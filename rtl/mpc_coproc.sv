// mpc_coproc: LNS matrix coprocessor for Model Predictive Control.
//
// MPC solves an optimisation problem every sampling period; a Newton step
// u(t+1) = u(t) - H^-1 grad needs the Hessian H, its inverse and the
// gradient, i.e. matrix products, matrix-vector products, reciprocal powers
// and a matrix inversion. This coprocessor takes those matrix operations
// off a small 16-bit host microprocessor, which stays the master: it
// loads matrices, issues commands, may run other work while a command
// executes, and reads results back.
//
// Structure: host_if (bus slave, command registers, data mailbox) ->
// coproc_ctrl (one-hot FSM sequencing each command over the elements) ->
// matrix_mem (two asynchronous read ports, one write port) and lns_alu
// (16-bit logarithmic-number-system ALU, one multiply-accumulate per
// cycle). All arithmetic is in the 16-bit LNS format of mpc_pkg.
//
// Interface: the host bus of host_if (bus_sel, bus_we, bus_addr,
// bus_wdata, bus_rdata, bus_ready wait-state handshake) and irq, which is
// high from the end of a command until STATUS is read or a new command
// starts. Single clock, asynchronous active-low reset.
module mpc_coproc
  import mpc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [3:0]  bus_addr,
  input  logic [15:0] bus_wdata,
  output logic [15:0] bus_rdata,
  output logic        bus_ready,
  output logic        irq
);

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

  host_if u_host_if (
    .clk, .rst_n,
    .bus_sel, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .bus_ready, .irq,
    .cmd_valid, .cmd, .busy, .done, .result,
    .in_valid, .in_data, .in_ready,
    .out_valid, .out_data, .out_ready
  );

  coproc_ctrl u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd, .busy, .done, .result,
    .in_valid, .in_data, .in_ready,
    .out_valid, .out_data, .out_ready,
    .ra_addr, .ra_data, .rb_addr, .rb_data, .we, .wa, .wd,
    .alu_op, .alu_a, .alu_b, .alu_c, .alu_y, .alu_mag_gt
  );

  matrix_mem #(.DEPTH(1 << ADDR_W)) u_mem (
    .clk, .ra_addr, .ra_data, .rb_addr, .rb_data, .we, .wa, .wd
  );

  lns_alu u_alu (
    .op(alu_op), .a(alu_a), .b(alu_b), .c(alu_c), .y(alu_y), .mag_gt(alu_mag_gt)
  );

endmodule
