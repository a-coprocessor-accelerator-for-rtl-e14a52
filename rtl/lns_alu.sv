// lns_alu: the coprocessor's 16-bit LNS arithmetic unit.
//
// One operation per clock cycle, and in particular one multiply-accumulate
// per cycle (y = c + a*b), as the design calls for. In LNS, multiplication
// and division are additions of logs (lns_mul) and the only costly part is
// the final addition (lns_add); the unit chains one multiplier into one
// adder. The reciprocal powers needed by the POW2A / POW3A commands are
// cheap in LNS: log2(1/a^2) = -2*log2|a| and log2(1/a^3) = -3*log2|a|,
// i.e. a shift and an add on the log field (saturating; a zero operand
// gives the largest magnitude).
//
// The unit also compares magnitudes: mag_gt = |a| > |b|, which in LNS is a
// signed comparison of the log fields (zero has the smallest log code).
// This serves the PIVOT search.
//
// Interface: op (alu_op_e), operands a, b, c (lns_t); y and mag_gt.
// Timing: purely combinational; the controller registers the result.
// The operation set is this design's reading of the commands it serves.
module lns_alu
  import mpc_pkg::*;
(
  input  alu_op_e op,
  input  lns_t    a,
  input  lns_t    b,
  input  lns_t    c,
  output lns_t    y,
  output logic    mag_gt
);

  lns_t                    prod, add_x, add_y, add_r;
  logic                    is_div, add_sub;
  logic signed [LOG_W+2:0] pw;
  lns_t                    pow_r;

  lns_mul u_mul (.a(a), .b(b), .div(is_div), .y(prod));
  lns_add u_add (.x(add_x), .y_in(add_y), .sub(add_sub), .y(add_r));

  always_comb begin
    is_div  = (op == ALU_DIV);
    add_x   = a;
    add_y   = b;
    add_sub = 1'b0;
    unique case (op)
      ALU_SUB: add_sub = 1'b1;
      ALU_MAC: begin add_x = c; add_y = prod; end
      ALU_MSB: begin add_x = c; add_y = prod; add_sub = 1'b1; end
      default: ;
    endcase

    // reciprocal powers on the log field
    if (op == ALU_IP3) pw = -($signed({{3{a[LOG_W-1]}}, a[LOG_W-1:0]}) * 3);
    else               pw = -($signed({{3{a[LOG_W-1]}}, a[LOG_W-1:0]}) * 2);
    if (lns_is_zero(a) || pw > $signed((LOG_W+3)'(LOG_MAX)))
      pow_r = {(op == ALU_IP3) & a[LNS_W-1], LOG_MAX};
    else if (pw <= $signed({{3{1'b1}}, LOG_MIN}))
      pow_r = LNS_ZERO;
    else
      pow_r = {(op == ALU_IP3) & a[LNS_W-1], pw[LOG_W-1:0]};

    unique case (op)
      ALU_PASS:                  y = a;
      ALU_ADD, ALU_SUB,
      ALU_MAC, ALU_MSB:          y = add_r;
      ALU_DIV:                   y = prod;
      ALU_IP2, ALU_IP3:          y = pow_r;
      default:                   y = a;
    endcase

    mag_gt = $signed(a[LOG_W-1:0]) > $signed(b[LOG_W-1:0]);
  end

endmodule
