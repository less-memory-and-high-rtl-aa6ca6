// lns_cotrans_rom -- the three co-transformation tables F1, F2 and F3.
//
// For a subtraction whose log difference r lies in the critical region 0 < r < 2,
// r (1 integer and 23 fraction bits) is cut into three 8-bit fields a | b | c with
// weights 2^-7, 2^-15 and 2^-23. Each table holds log2(2^x - 1) for one field:
//   F1[a] = log2(2^(a*2^-7)  - 1)      a in 1..255, x in [2^-7, 2)
//   F2[b] = log2(2^(b*2^-15) - 1)      b in 1..255
//   F3[c] = log2(2^(c*2^-23) - 1)      c in 1..255
// Word 0 of each table is never used. Three tables of 256 words over the extended
// range 0 < r < 2 follow the reference architecture; what the words hold is this
// design's reading of the co-transformation (see lns_cotrans).
//
// Interface: a synchronous read of all three tables; f1/f2/f3 are valid the cycle
// after en, signed with 27 fraction bits.
module lns_cotrans_rom
  import lns_pkg::*;
(
  input  logic  clk,
  input  logic  en,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic [7:0] c,
  output cval_t f1,
  output cval_t f2,
  output cval_t f3
);

  typedef cval_t tab_t [256];

  function automatic tab_t gen(input int tab);
    tab_t w;
    for (int k = 0; k < 256; k++) w[k] = cval_t'(cot_coef(tab, k));
    return w;
  endfunction

  localparam tab_t F1TAB = gen(0);
  localparam tab_t F2TAB = gen(1);
  localparam tab_t F3TAB = gen(2);

  always_ff @(posedge clk) begin
    if (en) begin
      f1 <= F1TAB[a];
      f2 <= F2TAB[b];
      f3 <= F3TAB[c];
    end
  end

endmodule
