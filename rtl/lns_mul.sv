// lns_mul: LNS multiplier / divider.
//
// In the logarithmic number system a product is the sum of the operands'
// logs and a quotient their difference, so this unit is one adder on the
// 15-bit log fields plus an XOR of the sign bits. The sum is formed one bit
// wider and clamped: a result above the largest log saturates to the
// largest magnitude, a result at or below the zero code underflows to zero.
// A zero operand gives zero; division by zero saturates to the largest
// magnitude with the sign of the dividend (this design's choice; the
// design description gives no rule for it).
//
// Interface: a, b (lns_t), div = 0 for a*b, 1 for a/b; y = result.
// Timing: purely combinational.
module lns_mul
  import mpc_pkg::*;
(
  input  lns_t a,
  input  lns_t b,
  input  logic div,
  output lns_t y
);

  logic signed [LOG_W:0] sum;
  logic                  sgn;

  always_comb begin
    sgn = a[LNS_W-1] ^ b[LNS_W-1];
    if (div) sum = {a[LOG_W-1], a[LOG_W-1:0]} - {b[LOG_W-1], b[LOG_W-1:0]};
    else     sum = {a[LOG_W-1], a[LOG_W-1:0]} + {b[LOG_W-1], b[LOG_W-1:0]};

    if (lns_is_zero(a)) begin
      y = LNS_ZERO;
    end else if (lns_is_zero(b)) begin
      y = div ? {a[LNS_W-1], LOG_MAX} : LNS_ZERO;
    end else if (sum > $signed({LOG_MAX[LOG_W-1], LOG_MAX})) begin
      y = {sgn, LOG_MAX};
    end else if (sum <= $signed({LOG_MIN[LOG_W-1], LOG_MIN})) begin
      y = LNS_ZERO;
    end else begin
      y = {sgn, sum[LOG_W-1:0]};
    end
  end

endmodule
