// lp_butterfly: radix-4 butterfly built from two 5-input summation blocks
// instead of a tree of six adder/subtracters.
//
// Each cycle it produces one output of a radix-4 DFT,
//   y = (1/4) * sum_p x_p * (-j)^k_p ,
// where the rotation k_p of every port is given by ctrl (the commutator
// decides which operand sits on which port and which output m is due).
// Multiplying by -j swaps the real and imaginary parts and negates one of
// them, so every operand of the real sum (SUM0) and of the imaginary sum
// (SUM1) is either the real or the imaginary part of a port (operand
// multiplexers), passed straight or one's complemented (inverters). One's
// complementing alone leaves every negated term short by one; a decoder
// counts the inverted terms of each sum and feeds that count in as the fifth
// summand (COMR, COMI), so the result is the exact two's complement sum.
//
// The two summations are DW+2 bits wide. They wrap only for a true sum of
// +4*32768 (four negated -32768 operands), whose quarter has no 16-bit
// representation anyway. The result is scaled by 1/4 (arithmetic shift, rounding towards minus infinity) to keep
// 16-bit words from stage to stage. The 1/4 scaling is this design's choice.
// Purely combinational.
module lp_butterfly
  import fft_pkg::*;
(
  input  cplx_t [3:0] x,       // operands on ports 0..3
  input  bf_ctrl_t    ctrl,    // rotation (-j)^k of each port
  output cplx_t       y
);

  localparam int unsigned SW = DW + 2;
  typedef logic signed [SW-1:0] sum_t;

  sum_t    term_r [4];
  sum_t    term_i [4];
  logic    inv_r  [4];
  logic    inv_i  [4];
  sum_t    comr, comi;
  sum_t    sum0, sum1;

  always_comb begin
    comr = '0;
    comi = '0;
    for (int p = 0; p < 4; p++) begin
      logic  swap_ri;
      sum_t  xr, xi;
      xr    = sum_t'(x[p].re);
      xi    = sum_t'(x[p].im);
      swap_ri = ctrl[p][0];                          // odd power of -j
      inv_r[p] = ctrl[p][1];                       // k = 2 or 3
      inv_i[p] = ctrl[p][1] ^ ctrl[p][0];          // k = 1 or 2
      // operand multiplexers and one's complement inverters
      term_r[p] = swap_ri ? xi : xr;
      term_i[p] = swap_ri ? xr : xi;
      if (inv_r[p]) term_r[p] = ~term_r[p];
      if (inv_i[p]) term_i[p] = ~term_i[p];
      // compensation decoder
      comr = comr + sum_t'(inv_r[p]);
      comi = comi + sum_t'(inv_i[p]);
    end
    sum0 = term_r[0] + term_r[1] + term_r[2] + term_r[3] + comr;
    sum1 = term_i[0] + term_i[1] + term_i[2] + term_i[3] + comi;
  end

  assign y.re = word_t'(sum0 >>> 2);
  assign y.im = word_t'(sum1 >>> 2);

endmodule
