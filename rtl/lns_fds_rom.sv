// lns_fds_rom -- F, D and S lookup tables of the second-degree Newton interpolator.
//
// One instance holds the tables of one function: Fa(r) = log2(1 + 2^-r) for LNS
// addition (FN = FUNC_ADD, segments 0..5 of r in [0,32)) or Fs(r) = log2(1 - 2^-r) for
// LNS subtraction (FN = FUNC_SUB, segments 2..5, r in [2,32)). Each segment has 256
// words in each table:
//   F[k] = f(r0)                         function value at the interval start
//   D[k] = f(r1) - f(r0)                 first divided difference times h
//   S[k] = (f(r2) - 2 f(r1) + f(r0)) / 2 second divided difference times h^2
// with r1 = r0 + h, r2 = r0 + 2h and h the segment's interval width. Storing the
// differences scaled by h and h^2 lets one datapath serve every segment.
// The top segment [16,32) has no S table: F there is almost flat and the
// second-degree term stays below a few 2^-27 units, so S reads as 0.
// The table organisation (256 words per segment, F/D/S per segment, no S for 16..32)
// follows the reference architecture; the scaling and the word widths are this design's.
//
// Interface: seg is the global segment number (must be one the instance holds), idx
// the word within it. Reads are synchronous: f/d/s are valid the cycle after en.
module lns_fds_rom
  import lns_pkg::*;
#(
  parameter func_e FN = FUNC_ADD
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic [2:0]           seg,
  input  logic [IDXW-1:0]      idx,
  output logic signed [FW-1:0] f,
  output logic signed [DW-1:0] d,
  output logic signed [SW-1:0] s
);

  localparam int FIRST = (FN == FUNC_ADD) ? 0 : 2;      // first segment held
  localparam int NS    = NSEG - FIRST;                  // segments with F and D
  localparam int NSS   = NS - 1;                        // segments with S (not 16..32)
  localparam int DEPTH = NS << IDXW;
  localparam int SDEPTH = NSS << IDXW;

  typedef logic signed [FW-1:0] fword_t;
  typedef logic signed [DW-1:0] dword_t;
  typedef logic signed [SW-1:0] sword_t;
  typedef fword_t ftab_t [DEPTH];
  typedef dword_t dtab_t [DEPTH];
  typedef sword_t stab_t [SDEPTH];

  function automatic ftab_t gen_f();
    ftab_t t;
    for (int a = 0; a < DEPTH; a++)
      t[a] = fword_t'(ndd_coef(FN, FIRST + (a >> IDXW), a % (1 << IDXW), 0));
    return t;
  endfunction

  function automatic dtab_t gen_d();
    dtab_t t;
    for (int a = 0; a < DEPTH; a++)
      t[a] = dword_t'(ndd_coef(FN, FIRST + (a >> IDXW), a % (1 << IDXW), 1));
    return t;
  endfunction

  function automatic stab_t gen_s();
    stab_t t;
    for (int a = 0; a < SDEPTH; a++)
      t[a] = sword_t'(ndd_coef(FN, FIRST + (a >> IDXW), a % (1 << IDXW), 2));
    return t;
  endfunction

  localparam ftab_t FTAB = gen_f();
  localparam dtab_t DTAB = gen_d();
  localparam stab_t STAB = gen_s();

  localparam int AW  = $clog2(DEPTH);
  localparam int SAW = $clog2(SDEPTH);

  logic [2:0]    lseg;
  logic [AW-1:0] addr;
  logic          no_s;
  logic [SAW-1:0] saddr;
  logic signed [SW-1:0] s_raw;

  always_comb begin
    lseg  = seg - 3'(FIRST);
    addr  = AW'({lseg, idx});
    no_s  = (seg == 3'(NSEG - 1));   // no S table for the top segment
    saddr = no_s ? '0 : SAW'({lseg, idx});
  end

  logic no_s_q;

  always_ff @(posedge clk) begin
    if (en) begin
      f      <= FTAB[addr];
      d      <= DTAB[addr];
      s_raw  <= STAB[saddr];
      no_s_q <= no_s;
    end
  end

  assign s = no_s_q ? '0 : s_raw;

endmodule
