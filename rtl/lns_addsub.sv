// lns_addsub -- 32-bit logarithmic number system (LNS) adder/subtractor.
//
// An LNS number stores a sign and log2|x|, so multiplication is an addition of logs,
// but addition and subtraction need the non-linear functions
//   x + y : log2 x + Fa(r),  Fa(r) = log2(1 + 2^-r)
//   x - y : log2 x + Fs(r),  Fs(r) = log2(1 - 2^-r)      with r = log2 x - log2 y >= 0.
// This unit evaluates them as follows:
//   * effective addition, 0 <= r < 32 : second-degree Newton interpolation of Fa
//     (lns_ndd_interp, six power-of-two segments);
//   * effective subtraction, 2 <= r < 32 : the same interpolation of Fs (four segments);
//   * effective subtraction, 0 < r < 2 : second-order co-transformation (lns_cotrans),
//     result = log2 y + log2(2^r - 1), which uses the Fa interpolator for its inner
//     additions;
//   * r >= 32 : the result is the larger operand (|F| < 2^-31);
//   * r = 0 in a subtraction gives exact zero.
// All internal logs carry 4 guard bits; the sum is rounded to nearest once at the end.
// The region split, the interpolator, the table sizes and the 4 guard bits follow the
// reference architecture. The handshake, the zero code, saturation on overflow, flush to
// zero on underflow and the multi-cycle sequencing are this design's choices.
//
// Number format: see lns_pkg (sign, 8.23 two's-complement log, 31'h4000_0000 = zero).
//
// Interface: in_valid/in_ready take a = in_a, b = in_b and in_op (0: a + b, 1: a - b).
// out_valid/out_ready return out_y with out_ovf (magnitude saturated to the largest
// value) and out_unf (result too small, returned as zero). One operation is in flight
// at a time. Counting from the cycle in which in_valid and in_ready are both high,
// out_valid rises 1 cycle later for zero operands, cancellation and r >= 32, 3 cycles
// later for an interpolated addition or subtraction, and 4, 6 or 8 cycles later for
// the co-transformation (no, one or two inner additions).
module lns_addsub
  import lns_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  lns_t in_a,
  input  lns_t in_b,
  input  logic in_op,
  output logic out_valid,
  input  logic out_ready,
  output lns_t out_y,
  output logic out_ovf,
  output logic out_unf
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT_I, S_WAIT_C, S_OUT} state_e;
  state_e st;

  // ------------------------------------------------------------ operand decode
  logic signed [LOGW-1:0] la, lb;
  logic        za, zb, sb_eff, a_ge, eff_sub;
  logic [LOGW-1:0] li, lj;
  logic [LOGW:0]   r;                      // log difference, 2^-23 units
  logic        r_zero, r_far, r_crit;
  logic        sgn;

  always_comb begin
    la      = in_a[LOGW-1:0];
    lb      = in_b[LOGW-1:0];
    za      = (in_a[LOGW-1:0] == ZERO_LOG);
    zb      = (in_b[LOGW-1:0] == ZERO_LOG);
    sb_eff  = in_b[31] ^ in_op;            // sign of the second term
    a_ge    = (la >= lb);
    li      = a_ge ? la : lb;
    lj      = a_ge ? lb : la;
    r       = (LOGW + 1)'($signed(li)) - (LOGW + 1)'($signed(lj));
    r_zero  = (r == '0);
    r_far   = (r >= ((LOGW + 1)'(32) << FRAC));
    r_crit  = (r <  ((LOGW + 1)'(2)  << FRAC));
    eff_sub = in_a[31] ^ sb_eff;
    sgn     = a_ge ? in_a[31] : sb_eff;
  end

  // ------------------------------------------------------------ path selection
  typedef enum logic [2:0] {P_ZERO, P_PASS, P_ADD, P_SUB, P_COT} path_e;
  path_e path;
  lns_t  pass_y;

  always_comb begin
    pass_y = '0;
    if (za && zb) begin
      path = P_ZERO;
    end else if (za) begin
      path   = P_PASS;
      pass_y = {sb_eff, in_b[LOGW-1:0]};
    end else if (zb) begin
      path   = P_PASS;
      pass_y = in_a;
    end else if (eff_sub && r_zero) begin
      path = P_ZERO;
    end else if (r_far) begin
      path   = P_PASS;
      pass_y = {sgn, li};
    end else if (!eff_sub) begin
      path = P_ADD;
    end else if (r_crit) begin
      path = P_COT;
    end else begin
      path = P_SUB;
    end
  end

  logic take;
  assign take     = in_valid && in_ready;
  assign in_ready = (st == S_IDLE);

  // ------------------------------------------------------------ function units
  logic  fa_v, fs_v, fa_ov, fs_ov;
  rarg_t fa_r, main_r;
  fval_t fa_f, fs_f;
  logic  cot_busy, cot_done, cot_req;
  rarg_t cot_r;
  xlog_t cot_t;

  assign main_r = rarg_t'(r) << GUARD;
  assign fa_v   = (take && path == P_ADD) || cot_req;
  assign fa_r   = cot_busy ? cot_r : main_r;
  assign fs_v   = take && path == P_SUB;

  lns_ndd_interp #(.FN(FUNC_ADD)) u_fa (
    .clk (clk), .rst_n (rst_n), .in_valid (fa_v), .r (fa_r),
    .out_valid (fa_ov), .f (fa_f)
  );

  lns_ndd_interp #(.FN(FUNC_SUB)) u_fs (
    .clk (clk), .rst_n (rst_n), .in_valid (fs_v), .r (main_r),
    .out_valid (fs_ov), .f (fs_f)
  );

  lns_cotrans u_cot (
    .clk (clk), .rst_n (rst_n),
    .start (take && path == P_COT), .r (r[23:0]),
    .busy (cot_busy), .done (cot_done), .t (cot_t),
    .fa_req (cot_req), .fa_r (cot_r), .fa_valid (fa_ov), .fa_f (fa_f)
  );

  // ------------------------------------------------------------ result and rounding
  xlog_t base_q;                           // log of the operand F or T is added to
  logic  sgn_q, sub_q;

  xlog_t sum, rnd;
  logic  ovf, unf;
  lns_t  y_rnd;

  localparam xlog_t XMAX = xlog_t'($signed(MAX_LOG));
  localparam xlog_t XMIN = xlog_t'($signed(MIN_LOG));

  always_comb begin
    if (st == S_WAIT_C) sum = base_q + cot_t;
    else                sum = base_q + (sub_q ? xlog_t'(fs_f) : xlog_t'(fa_f));
    rnd = (sum + (xlog_t'(1) <<< (GUARD - 1))) >>> GUARD;   // round to nearest
    ovf = rnd > XMAX;
    unf = rnd < XMIN;
    if (ovf)      y_rnd = {sgn_q, MAX_LOG};
    else if (unf) y_rnd = {1'b0, ZERO_LOG};
    else          y_rnd = {sgn_q, rnd[LOGW-1:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      out_valid <= 1'b0;
      out_y     <= '0;
      out_ovf   <= 1'b0;
      out_unf   <= 1'b0;
      base_q    <= '0;
      sgn_q     <= 1'b0;
      sub_q     <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: if (take) begin
          sgn_q <= sgn;
          sub_q <= (path == P_SUB);
          // co-transformation adds T to the smaller log, interpolation F to the larger
          base_q <= (path == P_COT) ? (xlog_t'($signed(lj)) <<< GUARD)
                                    : (xlog_t'($signed(li)) <<< GUARD);
          unique case (path)
            P_ZERO: begin
              st <= S_OUT; out_valid <= 1'b1;
              out_y <= {1'b0, ZERO_LOG}; out_ovf <= 1'b0; out_unf <= 1'b0;
            end
            P_PASS: begin
              st <= S_OUT; out_valid <= 1'b1;
              out_y <= pass_y; out_ovf <= 1'b0; out_unf <= 1'b0;
            end
            P_COT:   st <= S_WAIT_C;
            default: st <= S_WAIT_I;
          endcase
        end
        S_WAIT_I: if (sub_q ? fs_ov : fa_ov) begin
          st <= S_OUT; out_valid <= 1'b1;
          out_y <= y_rnd; out_ovf <= ovf; out_unf <= unf;
        end
        S_WAIT_C: if (cot_done) begin
          st <= S_OUT; out_valid <= 1'b1;
          out_y <= y_rnd; out_ovf <= ovf; out_unf <= unf;
        end
        S_OUT: if (out_ready) begin
          st <= S_IDLE; out_valid <= 1'b0;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ protocol checks
  // a result stays on the output until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_y));
  // the shared addition interpolator is never asked twice in one cycle
  a_fa_shared: assert property (@(posedge clk) disable iff (!rst_n)
    !(take && path == P_ADD && cot_req));

endmodule
