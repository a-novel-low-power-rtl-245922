// fft_pkg: types and helpers shared by the radix-4 single-path delay
// commutator (R4SDC) FFT.
//
// A sample is one 32-bit word holding a complex number: 16-bit two's
// complement real and imaginary parts. Twiddle coefficients use the same
// 16-bit format with 15 fraction bits (7fff ~ +1, 8000 = -1).
//
// The butterfly control word gives, for each of the four butterfly ports,
// the power k of -j by which that port's operand is rotated before the four
// operands are summed: X(m) = sum_p x_p * (-j)^(p*m mod 4).
package fft_pkg;

  parameter int unsigned DW = 16;   // bits per real / imaginary part

  typedef logic signed [DW-1:0] word_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  // rotation applied to each butterfly port: (-j)^rot
  typedef logic [1:0] rot_t;
  typedef rot_t [3:0] bf_ctrl_t;

  // control lines of the multiplier-less unit (s1..s7 of the design)
  typedef struct packed {
    logic s1;  // 1: constant 5a82 channel, 0: constants 7641/30fb channel
    logic s2;  // 5a82 channel: product by Wr is -5a83 instead of 5a82
    logic s3;  // 7641 block gives -7642 instead of +7641
    logic s4;  // 30fb block gives -30fc instead of +30fb
    logic s5;  // swap: Wr taken from the 30fb block, Wi from the 7641 block
    logic s6;  // coefficient is non-trivial: use the shift-and-add path
    logic s7;  // coefficient is (0,-1): swap re/im and negate the new im
  } mless_ctrl_t;

  // twiddle multiplier used after a stage's butterfly
  typedef enum logic [1:0] {
    MULT_NONE  = 2'd0,   // last stage: no multiplier
    MULT_NBW   = 2'd1,   // conventional complex multiplier with coefficient ROM
    MULT_MLESS = 2'd2    // multiplier-less shift-and-add unit (16-word stage)
  } mult_kind_e;

  // rotation of x_p in output m of a radix-4 butterfly
  function automatic rot_t bf_rot(input logic [1:0] p, input logic [1:0] m);
    logic [1:0] prod;
    prod = p * m;      // product modulo 4
    return prod;
  endfunction

endpackage
