// lns_ndd_interp -- second-degree Newton divided-difference interpolator for F(r).
//
// Computes Fa(r) = log2(1 + 2^-r) (FN = FUNC_ADD, 0 <= r < 32) or
// Fs(r) = log2(1 - 2^-r) (FN = FUNC_SUB, 2 <= r < 32) with the quadratic Newton form
//   f2(r) = f(r0) + Df0 (r - r0) + D2f0 (r - r0)(r - r1)
// on a uniform grid r0, r1 = r0 + h, r2 = r0 + 2h. Writing r = r0 + t h, 0 <= t < 1,
// this is f2 = F + D t + S t (t - 1) with the scaled table words of lns_fds_rom.
//
// The segment is the position of the leading one of the integer part of r
// (segment 0 when r < 1); the next 8 bits below it address the 256-word tables and the
// remaining bits, left-aligned to 23 bits, are t. The two products D*t and
// S*t*(1-t) are rounded to 2^-27 and summed with F. The method (Newton quadratic,
// F/D/S tables, power-of-two segments, 4 guard bits) follows the reference architecture;
// the fixed-point layout is this design's.
//
// Interface: r is unsigned 5.27 fixed point. in_valid/r are taken every cycle
// (fully pipelined, one result per cycle); out_valid/f follow two cycles later,
// f signed with 27 fraction bits.
module lns_ndd_interp
  import lns_pkg::*;
#(
  parameter func_e FN = FUNC_ADD
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  rarg_t r,
  output logic  out_valid,
  output fval_t f
);

  // ------------------------------------------------------------ stage 0: decode
  logic [2:0]      seg;
  logic [2:0]      sh;           // segment exponent s, h = 2^(s-8)
  logic [IDXW-1:0] idx;
  logic [TW-1:0]   t;

  always_comb begin
    if      (r[W+4]) seg = 3'd5;
    else if (r[W+3]) seg = 3'd4;
    else if (r[W+2]) seg = 3'd3;
    else if (r[W+1]) seg = 3'd2;
    else if (r[W])   seg = 3'd1;
    else             seg = 3'd0;
    sh  = (seg == 3'd0) ? 3'd0 : seg - 3'd1;
    idx = IDXW'(r >> (W - IDXW + 32'(sh)));
    t   = TW'(r << (3'd4 - sh));
  end

  // ------------------------------------------------------------ stage 1: table read
  logic signed [FW-1:0] tf;
  logic signed [DW-1:0] td;
  logic signed [SW-1:0] ts;
  logic [TW-1:0]        t_q;
  logic                 v1;

  lns_fds_rom #(.FN(FN)) u_rom (
    .clk (clk),
    .en  (in_valid),
    .seg (seg),
    .idx (idx),
    .f   (tf),
    .d   (td),
    .s   (ts)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) t_q <= t;
  end

  // ------------------------------------------------------------ stage 2: evaluate
  localparam int PW = 2 * TW + 1;                      // t (1 - t) product, 2^-46 units
  logic signed [DW+TW:0]   dt;                         // D * t, 2^-50 units
  logic [PW-1:0]           p;                          // t * (1 - t) >= 0
  logic signed [SW+PW:0]   sp;                         // S * t * (1 - t)
  logic signed [FW-1:0]    term1, term2;
  fval_t                   sum;

  localparam logic signed [DW+TW:0] HALF1 = 1 <<< (TW - 1);      // rounding constants
  localparam logic signed [SW+PW:0] HALF2 = 1 <<< (2 * TW - 1);

  always_comb begin
    dt    = td * $signed({1'b0, t_q});
    p     = PW'(t_q) * PW'((1 << TW) - int'(t_q));
    sp    = ts * $signed({1'b0, p});
    term1 = FW'((dt + HALF1) >>> TW);
    term2 = FW'((sp + HALF2) >>> (2 * TW));
    sum   = tf + term1 - term2;                        // t (t - 1) = -t (1 - t)
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v1;
  end

  always_ff @(posedge clk) begin
    if (v1) f <= sum;
  end

endmodule
