// shift_add: multiplies one real sample x by both parts (Wr, Wi) of a
// non-trivial 16-point twiddle factor using only shifts and additions.
//
// Every non-trivial coefficient of the 16-point table is built from three
// constants: 5a82, 7641 and 30fb, or the negative of the constant plus one
// (a57d = -5a83, 89be = -7642, cf04 = -30fc). With the shared
// subexpressions 5X = X + X<<2 and 65X = X + X<<6:
//   5a82 X = 5X<<12 + 5X<<9 + 65X<<1          (two's complement digits)
//   7641 X = X<<15 + 65X - 5X<<9              (canonic signed digits)
//   30fb X = 65X<<8 - X<<12 - 5X              (canonic signed digits)
// Each constant block adds X once more to form constant+1, and its
// negation stage outputs -(constant+1)X when its control bit is set.
// s1 steers X either to the 5a82 channel (coefficients W2, W6) or to the
// 7641/30fb channel (W1, W3, W9) and selects the matching output pair; the
// idle channel sees zero. s2 chooses Wr = 5a82 (W2) or -5a83 (W6) with
// Wi = -5a83 in both cases; s3 and s4 negate the 7641 and 30fb blocks; s5
// swaps which of them is Wr. Eleven adders in all.
//
// Products are exact (no rounding) and 32 bits wide. Combinational.
module shift_add
  import fft_pkg::*;
(
  input  word_t              x,
  input  logic               s1,       // 1: 5a82 channel, 0: 7641/30fb channel
  input  logic               s2,       // Wr = -5a83 instead of 5a82
  input  logic               s3,       // 7641 block gives -7642
  input  logic               s4,       // 30fb block gives -30fc
  input  logic               s5,       // Wr from the 30fb block
  output logic signed [31:0] by_wr,    // x * Wr
  output logic signed [31:0] by_wi     // x * Wi
);

  typedef logic signed [31:0] prod_t;

  prod_t x1, x5, x65;
  prod_t a1, a5, a65;          // 5a82 channel inputs
  prod_t b1, b5, b65;          // 7641 / 30fb channel inputs
  prod_t p5a82, p5a83, n5a83;
  prod_t p7641, p7642, o7641;
  prod_t p30fb, p30fc, o30fb;
  prod_t wr_a, wi_a, wr_b, wi_b;

  // common subexpression block
  assign x1  = prod_t'(x);
  assign x5  = x1 + (x1 <<< 2);
  assign x65 = x1 + (x1 <<< 6);

  // demultiplexer: feed only the selected channel
  assign a1  = s1 ? x1  : '0;
  assign a5  = s1 ? x5  : '0;
  assign a65 = s1 ? x65 : '0;
  assign b1  = s1 ? '0  : x1;
  assign b5  = s1 ? '0  : x5;
  assign b65 = s1 ? '0  : x65;

  // constant 5a82 block, inverter and multiplexer
  assign p5a82 = (a5 <<< 12) + (a5 <<< 9) + (a65 <<< 1);
  assign p5a83 = p5a82 + a1;
  assign n5a83 = -p5a83;
  assign wr_a  = s2 ? n5a83 : p5a82;
  assign wi_a  = n5a83;

  // constant 7641 block and inverter
  assign p7641 = (b1 <<< 15) + b65 - (b5 <<< 9);
  assign p7642 = p7641 + b1;
  assign o7641 = s3 ? -p7642 : p7641;

  // constant 30fb block and inverter
  assign p30fb = (b65 <<< 8) - (b1 <<< 12) - b5;
  assign p30fc = p30fb + b1;
  assign o30fb = s4 ? -p30fc : p30fb;

  // swap unit
  assign wr_b = s5 ? o30fb : o7641;
  assign wi_b = s5 ? o7641 : o30fb;

  // output multiplexer
  assign by_wr = s1 ? wr_a : wr_b;
  assign by_wi = s1 ? wi_a : wi_b;

endmodule
