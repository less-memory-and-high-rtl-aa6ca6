// lns_cotrans -- second-order co-transformation for LNS subtraction, 0 < r < 2.
//
// Near r = 0 the subtraction function log2(1 - 2^-r) is too steep to interpolate, so
// for x - y with log2 x = i, log2 y = j = i - r the unit uses
//   log2(x - y) = j + T,   T = log2(2^r - 1).
// T is built from the three table fields of r = a*2^-7 + b*2^-15 + c*2^-23 with the
// identity 2^(p+q) - 1 = (2^p - 1) + 2^p (2^q - 1), applied twice (hence second order):
//   L = log2(2^(b*2^-15 + c*2^-23) - 1) = F2[b] (+) (b*2^-15 + F3[c])
//   T = log2(2^r - 1)                   = F1[a] (+) (a*2^-7  + L)
// where u (+) v = max(u,v) + log2(1 + 2^-|u-v|) is an LNS addition evaluated by the
// shared addition interpolator. A term whose field is zero drops out, so a
// transformation needs zero, one or two interpolator passes. Both passes are sums of
// positive terms, so no cancellation happens inside the critical region.
// The region (0 < r < 2) and the three 256-word tables follow the reference architecture;
// the decomposition above is this design's realisation of the co-transformation.
//
// Interface: start with r (r > 0, r < 2, 1.23 fixed point) for one cycle while idle
// (busy low). The tables are read in the next cycle; each needed addition is sent on
// fa_req/fa_r and its result taken from fa_valid/fa_f (the interpolator answers two
// cycles later). done pulses for one cycle with t (27 fraction bits) valid.
// done rises 2 clock edges after the edge that takes start when no addition is
// needed, 4 with one and 6 with two.
module lns_cotrans
  import lns_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [23:0]  r,
  output logic         busy,
  output logic         done,
  output xlog_t        t,
  // request port to the shared Fa interpolator
  output logic         fa_req,
  output rarg_t        fa_r,
  input  logic         fa_valid,
  input  fval_t        fa_f
);

  typedef enum logic [2:0] {
    C_IDLE, C_READ, C_WAIT_IN, C_OUTER, C_WAIT_OUT, C_DONE
  } cstate_e;

  cstate_e st;
  logic [7:0] fa_q, fb_q, fc_q;       // fields of r
  cval_t f1, f2, f3;
  xlog_t l_q;                         // L (inner result)
  xlog_t m_q;                         // larger operand of the pending addition

  lns_cotrans_rom u_rom (
    .clk (clk),
    .en  (start && st == C_IDLE),
    .a   (r[23:16]),
    .b   (r[15:8]),
    .c   (r[7:0]),
    .f1  (f1),
    .f2  (f2),
    .f3  (f3)
  );

  // operands of the addition this state would issue
  xlog_t u, v, mx, diff;
  logic  need;                        // addition needed (both terms present)

  // |u - v| always lies inside the interpolator's range: the table words are between
  // -23.6 and +1.6, so the difference of two terms stays below 26.

  always_comb begin
    if (st == C_READ) begin
      u    = xlog_t'(f2);
      v    = (xlog_t'(fb_q) <<< (W - 15)) + xlog_t'(f3);
      need = (fb_q != 8'd0) && (fc_q != 8'd0);
    end else begin
      u    = xlog_t'(f1);
      v    = (xlog_t'(fa_q) <<< (W - 7)) + l_q;
      need = (fa_q != 8'd0) && ({fb_q, fc_q} != 16'd0);
    end
    mx   = (u >= v) ? u : v;
    diff = (u >= v) ? u - v : v - u;
    fa_r = rarg_t'(diff);
    fa_req = need && (st == C_READ || st == C_OUTER);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= C_IDLE;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE: if (start) st <= C_READ;
        C_READ: begin
          if (need)           st <= C_WAIT_IN;
          else                st <= C_OUTER;
        end
        C_WAIT_IN: if (fa_valid) st <= C_OUTER;
        C_OUTER: begin
          if (need)           st <= C_WAIT_OUT;
          else begin
            st   <= C_DONE;
            done <= 1'b1;
          end
        end
        C_WAIT_OUT: if (fa_valid) begin
          st   <= C_DONE;
          done <= 1'b1;
        end
        C_DONE: st <= C_IDLE;
        default: st <= C_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    unique case (st)
      C_IDLE: if (start) begin
        fa_q <= r[23:16];
        fb_q <= r[15:8];
        fc_q <= r[7:0];
      end
      C_READ: begin
        m_q <= mx;
        // a single term; replaced by the sum when an addition follows
        l_q <= (fb_q != 8'd0) ? xlog_t'(f2) : xlog_t'(f3);
      end
      C_WAIT_IN: if (fa_valid) l_q <= m_q + xlog_t'(fa_f);
      C_OUTER: begin
        m_q <= mx;
        t   <= (fa_q != 8'd0) ? xlog_t'(f1) : l_q;
      end
      C_WAIT_OUT: if (fa_valid) t <= m_q + xlog_t'(fa_f);
      default: ;
    endcase
  end

  assign busy = (st != C_IDLE);

  // every addition sent to the interpolator lies inside its range r < 32
  a_fa_range: assert property (@(posedge clk) disable iff (!rst_n)
    fa_req |-> diff < (xlog_t'(32) <<< W));

endmodule
