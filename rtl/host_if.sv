// host_if: bus slave connecting the 16-bit host microprocessor to the
// matrix coprocessor.
//
// The host is the master: it writes the operand registers of a command
// (destination and source base addresses, rows, cols, k, p) and then the
// opcode, which starts the command. While the coprocessor works the host
// is free to run other tasks; it learns of completion from the irq output
// or by polling STATUS. Matrix data move through the DATA register: writes
// feed LOADC through a one-word mailbox, reads take OUTC results.
//
// Bus protocol (this design's choice; the design fixes only that a
// protocol between the two parts exists): a transfer is bus_sel with
// bus_we, bus_addr and bus_wdata; it completes in the cycle bus_ready is
// high, and read data are valid in that cycle. bus_ready is held low (a
// wait state that stalls the host) when
//   - the opcode is written while a command is still running,
//   - DATA is written while the mailbox holds a word the controller is not
//     taking in this cycle,
//   - DATA is read before the coprocessor has a word to output.
// Register map: see mpc_pkg (REG_*). STATUS reads {busy, done, 6'b0,
// result}, where result is the row index found by the last PIVOT. Reading
// STATUS or starting a command clears done; irq equals done.
//
// Timing: cmd_valid is a one-cycle pulse in the cycle after the opcode
// write completes; busy from the controller follows one cycle later. The
// busy bit of STATUS and the opcode stall cover both cycles, so a host
// that polls right after starting a command never sees a stale idle.
module host_if
  import mpc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host bus
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [3:0]  bus_addr,
  input  logic [15:0] bus_wdata,
  output logic [15:0] bus_rdata,
  output logic        bus_ready,
  output logic        irq,
  // command to the controller
  output logic        cmd_valid,
  output cmd_t        cmd,
  input  logic        busy,
  input  logic        done,
  input  logic [DIM_W-1:0] result,
  // LOADC data stream to the controller
  output logic        in_valid,
  output lns_t        in_data,
  input  logic        in_ready,
  // OUTC data stream from the controller
  input  logic        out_valid,
  input  lns_t        out_data,
  output logic        out_ready
);

  cmd_t regs;
  logic done_q;
  logic wr, rd;
  logic pending;   // a command is accepted or running

  assign pending = busy | cmd_valid;

  assign wr = bus_sel &  bus_we & bus_ready;
  assign rd = bus_sel & ~bus_we & bus_ready;

  always_comb begin
    bus_ready = 1'b1;
    if (bus_sel) begin
      if (bus_we && bus_addr == REG_OP   && pending)  bus_ready = 1'b0;
      if (bus_we && bus_addr == REG_DATA && in_valid && !in_ready) bus_ready = 1'b0;
      if (!bus_we && bus_addr == REG_DATA && !out_valid) bus_ready = 1'b0;
    end
    unique case (bus_addr)
      REG_DST:    bus_rdata = 16'(regs.dst);
      REG_SRCA:   bus_rdata = 16'(regs.src_a);
      REG_SRCB:   bus_rdata = 16'(regs.src_b);
      REG_ROWS:   bus_rdata = 16'(regs.rows);
      REG_COLS:   bus_rdata = 16'(regs.cols);
      REG_K:      bus_rdata = 16'(regs.k);
      REG_P:      bus_rdata = 16'(regs.p);
      REG_DATA:   bus_rdata = out_data;
      REG_STATUS: bus_rdata = {pending, done_q, 6'b0, result};
      default:    bus_rdata = 16'(regs.op);
    endcase
  end

  assign out_ready = rd && bus_addr == REG_DATA;
  assign cmd       = regs;
  assign irq       = done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs      <= '{op: OP_NOP, default: '0};
      cmd_valid <= 1'b0;
      in_valid  <= 1'b0;
      in_data   <= LNS_ZERO;
      done_q    <= 1'b0;
    end else begin
      cmd_valid <= 1'b0;
      if (in_valid && in_ready) in_valid <= 1'b0;
      if (done) done_q <= 1'b1;
      if (rd && bus_addr == REG_STATUS) done_q <= 1'b0;
      if (wr) begin
        unique case (bus_addr)
          REG_OP: begin
            regs.op   <= opcode_e'(bus_wdata[3:0]);
            cmd_valid <= 1'b1;
            done_q    <= 1'b0;
          end
          REG_DST:  regs.dst   <= bus_wdata[ADDR_W-1:0];
          REG_SRCA: regs.src_a <= bus_wdata[ADDR_W-1:0];
          REG_SRCB: regs.src_b <= bus_wdata[ADDR_W-1:0];
          REG_ROWS: regs.rows  <= bus_wdata[DIM_W-1:0];
          REG_COLS: regs.cols  <= bus_wdata[DIM_W-1:0];
          REG_K:    regs.k     <= bus_wdata[DIM_W-1:0];
          REG_P:    regs.p     <= bus_wdata[DIM_W-1:0];
          REG_DATA: begin
            in_valid <= 1'b1;
            in_data  <= bus_wdata;
          end
          default: ;
        endcase
      end
    end
  end

  // Bus rule: a stalled transfer is held unchanged until it completes.
  a_bus_hold: assert property (@(posedge clk) disable iff (!rst_n)
    bus_sel && !bus_ready |=> bus_sel && $stable(bus_we) && $stable(bus_addr) && $stable(bus_wdata));
  // Stream rule: the controller holds an offered output word until taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
