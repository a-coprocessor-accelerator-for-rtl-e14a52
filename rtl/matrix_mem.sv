// matrix_mem: the coprocessor's local matrix data memory.
//
// Holds the matrices the commands operate on (the Hessian, the gradient,
// the control moves and intermediate results), as 16-bit LNS words stored
// row-major. Two read ports feed the two operands of the ALU so that one
// multiply-accumulate can be issued every clock cycle; one write port
// takes the result.
//
// Interface: ra_addr/ra_data and rb_addr/rb_data are asynchronous
// (combinational) read ports; we/wa/wd write on the rising clock edge.
// A read of the address being written returns the old word.
// The design names matrix loads and stores but not the memory itself: the
// size (DEPTH = 1024 words) and the port arrangement, which suits LUT RAM
// on an FPGA, are this design's choices. The memory is not reset.
module matrix_mem
  import mpc_pkg::*;
#(
  parameter int unsigned DEPTH = 1 << ADDR_W
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] ra_addr,
  output lns_t                     ra_data,
  input  logic [$clog2(DEPTH)-1:0] rb_addr,
  output lns_t                     rb_data,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] wa,
  input  lns_t                     wd
);

  lns_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
  end

  assign ra_data = mem[ra_addr];
  assign rb_data = mem[rb_addr];

endmodule
