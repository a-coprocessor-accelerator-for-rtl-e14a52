// coproc_ctrl: one-hot finite-state machine that executes the matrix
// coprocessor's commands.
//
// The coprocessor works iteratively on matrix elements: every clock cycle
// the controller computes the memory addresses of the current element(s)
// from its loop counters, the memory returns the operands combinationally,
// the ALU computes, and on the clock edge the result is written back (or
// accumulated). A matrix product therefore runs at one multiply-
// accumulate per cycle. Commands and their cycle counts (N = rows*cols,
// plus one cycle to accept the command):
//   LOADC  dst <- N words from the host          one per accepted word
//   OUTC   N words of A to the host               one per word taken
//   STOREC dst = A       ADDC dst = A + B         N
//   SUBC   dst = A - B   POW2A / POW3A 1/a^2, 1/a^3 elementwise   N
//   MULC   dst[rows x cols] = A[rows x k] B[k x cols]   rows*cols*k
//   MULV   dst[rows] = A[rows x cols] b[cols]           rows*cols
//   PIVOT  result = first i >= k maximising |A[i][k]|   rows - k
//   GJSTEP on A[rows x cols] in place: swap rows k and p (2 cycles per
//          column, skipped when p = k), divide row k by its pivot, subtract
//          A[i][k] times row k from every other row (1 + cols cycles per
//          row). With PIVOT issued before each step, cols = 2*rows and
//          A = [H | I], rows steps leave H^-1 in the right half
//          (Gauss-Jordan inversion).
// The one-hot state register, the element-iterative operation and the
// named commands follow the design description; the command fields, the
// GJSTEP step, the ADDC/SUBC/MULC encodings and the cycle schedule are
// this design's choices. Source and destination regions must not overlap
// except where a command works in place (GJSTEP); all dimensions are >= 1.
//
// Interface: cmd_valid/cmd start a command in IDLE; busy is high from the
// next cycle until the command ends; done pulses for one cycle at the end;
// result holds the last PIVOT row. in_* and out_* are valid/ready streams
// to the host interface; ra/rb/w* drive matrix_mem; alu_* drive lns_alu.
module coproc_ctrl
  import mpc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  cmd_t              cmd,
  output logic              busy,
  output logic              done,
  output logic [DIM_W-1:0]  result,
  input  logic              in_valid,
  input  lns_t              in_data,
  output logic              in_ready,
  output logic              out_valid,
  output lns_t              out_data,
  input  logic              out_ready,
  output logic [ADDR_W-1:0] ra_addr,
  input  lns_t              ra_data,
  output logic [ADDR_W-1:0] rb_addr,
  input  lns_t              rb_data,
  output logic              we,
  output logic [ADDR_W-1:0] wa,
  output lns_t              wd,
  output alu_op_e           alu_op,
  output lns_t              alu_a,
  output lns_t              alu_b,
  output lns_t              alu_c,
  input  lns_t              alu_y,
  input  logic              alu_mag_gt
);

  // one-hot state encoding
  typedef enum logic [11:0] {
    S_IDLE  = 12'b0000_0000_0001,
    S_LOAD  = 12'b0000_0000_0010,
    S_OUT   = 12'b0000_0000_0100,
    S_EW    = 12'b0000_0000_1000,
    S_MAC   = 12'b0000_0001_0000,
    S_PIV   = 12'b0000_0010_0000,
    S_SWAP1 = 12'b0000_0100_0000,
    S_SWAP2 = 12'b0000_1000_0000,
    S_NPIV  = 12'b0001_0000_0000,
    S_NORM  = 12'b0010_0000_0000,
    S_EFAC  = 12'b0100_0000_0000,
    S_ELIM  = 12'b1000_0000_0000
  } state_e;

  localparam int unsigned CW = 2 * DIM_W;   // counter width

  state_e           state, state_n;
  cmd_t             c;
  logic [CW-1:0]    e, i, j, kk;            // linear, row, column, inner counters
  lns_t             acc, tmp, best;
  logic [DIM_W-1:0] best_idx;
  logic [CW-1:0]    n_elem, k_dim, o_cols;
  logic             last_e, last_j, last_kk;

  function automatic logic [ADDR_W-1:0] ea(logic [ADDR_W-1:0] base, logic [CW-1:0] row,
                                           logic [CW-1:0] ncols, logic [CW-1:0] col);
    return ADDR_W'(32'(base) + 32'(row) * 32'(ncols) + 32'(col));
  endfunction

  assign n_elem  = CW'(c.rows) * CW'(c.cols);
  assign k_dim   = (c.op == OP_MULV) ? CW'(c.cols) : CW'(c.k);   // inner dimension
  assign o_cols  = (c.op == OP_MULV) ? CW'(1)      : CW'(c.cols);
  assign last_e  = (e  == n_elem - 1'b1);
  assign last_j  = (j  == o_cols - 1'b1);
  assign last_kk = (kk == k_dim - 1'b1);

  assign busy = (state != S_IDLE);

  // datapath control
  always_comb begin
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_data  = ra_data;
    ra_addr   = ea(c.src_a, '0, '0, e);
    rb_addr   = ea(c.src_b, '0, '0, e);
    we        = 1'b0;
    wa        = ea(c.dst, '0, '0, e);
    wd        = alu_y;
    alu_op    = ALU_PASS;
    alu_a     = ra_data;
    alu_b     = rb_data;
    alu_c     = acc;
    unique case (state)
      S_LOAD: begin
        in_ready = 1'b1;
        we       = in_valid;
        wd       = in_data;
      end
      S_OUT: out_valid = 1'b1;
      S_EW: begin
        we = 1'b1;
        unique case (c.op)
          OP_ADDC:  alu_op = ALU_ADD;
          OP_SUBC:  alu_op = ALU_SUB;
          OP_POW2A: alu_op = ALU_IP2;
          OP_POW3A: alu_op = ALU_IP3;
          default:  alu_op = ALU_PASS;     // STOREC
        endcase
      end
      S_MAC: begin
        ra_addr = ea(c.src_a, i, k_dim, kk);
        rb_addr = ea(c.src_b, kk, o_cols, j);
        alu_op  = ALU_MAC;
        alu_c   = (kk == '0) ? LNS_ZERO : acc;
        we      = last_kk;
        wa      = ea(c.dst, i, o_cols, j);
      end
      S_PIV: begin
        ra_addr = ea(c.src_a, i, CW'(c.cols), CW'(c.k));
        alu_b   = best;
      end
      S_SWAP1: begin
        ra_addr = ea(c.src_a, CW'(c.k), CW'(c.cols), j);
        rb_addr = ea(c.src_a, CW'(c.p), CW'(c.cols), j);
        we      = 1'b1;
        wa      = ra_addr;
        wd      = rb_data;
      end
      S_SWAP2: begin
        we = 1'b1;
        wa = ea(c.src_a, CW'(c.p), CW'(c.cols), j);
        wd = tmp;
      end
      S_NPIV: ra_addr = ea(c.src_a, CW'(c.k), CW'(c.cols), CW'(c.k));
      S_NORM: begin
        ra_addr = ea(c.src_a, CW'(c.k), CW'(c.cols), j);
        alu_op  = ALU_DIV;
        alu_b   = tmp;
        we      = 1'b1;
        wa      = ra_addr;
      end
      S_EFAC: ra_addr = ea(c.src_a, i, CW'(c.cols), CW'(c.k));
      S_ELIM: begin
        ra_addr = ea(c.src_a, i, CW'(c.cols), j);
        rb_addr = ea(c.src_a, CW'(c.k), CW'(c.cols), j);
        alu_op  = ALU_MSB;
        alu_c   = ra_data;
        alu_a   = tmp;
        alu_b   = rb_data;
        we      = 1'b1;
        wa      = ra_addr;
      end
      default: ;
    endcase
  end

  // next state
  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:
        if (cmd_valid) begin
          unique case (cmd.op)
            OP_LOADC:                   state_n = S_LOAD;
            OP_OUTC:                    state_n = S_OUT;
            OP_STOREC, OP_ADDC, OP_SUBC,
            OP_POW2A, OP_POW3A:         state_n = S_EW;
            OP_MULC, OP_MULV:           state_n = S_MAC;
            OP_PIVOT:                   state_n = S_PIV;
            OP_GJSTEP:                  state_n = (cmd.p == cmd.k) ? S_NPIV : S_SWAP1;
            default:                    state_n = S_IDLE;
          endcase
        end
      S_LOAD:  if (in_valid && last_e)  state_n = S_IDLE;
      S_OUT:   if (out_ready && last_e) state_n = S_IDLE;
      S_EW:    if (last_e)              state_n = S_IDLE;
      S_MAC:   if (last_kk && last_j && i == CW'(c.rows) - 1'b1) state_n = S_IDLE;
      S_PIV:   if (i == CW'(c.rows) - 1'b1) state_n = S_IDLE;
      S_SWAP1: state_n = S_SWAP2;
      S_SWAP2: state_n = (j == CW'(c.cols) - 1'b1) ? S_NPIV : S_SWAP1;
      S_NPIV:  state_n = S_NORM;
      S_NORM:  if (j == CW'(c.cols) - 1'b1) state_n = S_EFAC;
      S_EFAC:  if (i >= CW'(c.rows)) state_n = S_IDLE;
               else if (i != CW'(c.k)) state_n = S_ELIM;
      S_ELIM:  if (j == CW'(c.cols) - 1'b1) state_n = S_EFAC;
      default: state_n = S_IDLE;
    endcase
  end

  // counters and working registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      c        <= '{op: OP_NOP, default: '0};
      e        <= '0;
      i        <= '0;
      j        <= '0;
      kk       <= '0;
      acc      <= LNS_ZERO;
      tmp      <= LNS_ZERO;
      best     <= LNS_ZERO;
      best_idx <= '0;
      result   <= '0;
      done     <= 1'b0;
    end else begin
      state <= state_n;
      done  <= busy && (state_n == S_IDLE);
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          c        <= cmd;
          e        <= '0;
          i        <= (cmd.op == OP_PIVOT) ? CW'(cmd.k) : '0;
          j        <= '0;
          kk       <= '0;
          best     <= LNS_ZERO;
          best_idx <= cmd.k;
        end
        S_LOAD:  if (in_valid)  e <= e + 1'b1;
        S_OUT:   if (out_ready) e <= e + 1'b1;
        S_EW:    e <= e + 1'b1;
        S_MAC: begin
          acc <= alu_y;
          if (!last_kk) begin
            kk <= kk + 1'b1;
          end else begin
            kk <= '0;
            if (!last_j) j <= j + 1'b1;
            else begin
              j <= '0;
              i <= i + 1'b1;
            end
          end
        end
        S_PIV: begin
          if (alu_mag_gt) begin
            best     <= ra_data;
            best_idx <= DIM_W'(i);
          end
          if (i == CW'(c.rows) - 1'b1) result <= alu_mag_gt ? DIM_W'(i) : best_idx;
          i <= i + 1'b1;
        end
        S_SWAP1: tmp <= ra_data;
        S_SWAP2: j <= (j == CW'(c.cols) - 1'b1) ? '0 : j + 1'b1;
        S_NPIV: begin
          tmp <= ra_data;
          j   <= '0;
        end
        S_NORM: begin
          j <= j + 1'b1;
          if (j == CW'(c.cols) - 1'b1) i <= '0;
        end
        S_EFAC: begin
          tmp <= ra_data;
          j   <= '0;
          if (i == CW'(c.k)) i <= i + 1'b1;
        end
        S_ELIM: begin
          j <= j + 1'b1;
          if (j == CW'(c.cols) - 1'b1) i <= i + 1'b1;
        end
        default: ;
      endcase
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(state));
  a_no_cmd_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !cmd_valid);

endmodule
