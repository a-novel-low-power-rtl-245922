// mless_mult: multiplier-less complex multiplier for a stage whose
// coefficients are the sixteen twiddles of a 16-point radix-4 stage.
//
// s6 routes the input word either to the swap path (trivial coefficients)
// or to two shift-and-add modules (non-trivial ones); the idle path is fed
// zero. For (1,0) the word passes unchanged (s7 = 0); for (0,-1) the real and
// imaginary parts are swapped and the new imaginary part negated (s7 = 1).
// Otherwise the real part Xr and the imaginary part Xi each go through a
// shift_add module that returns the products by Wr and by Wi, and
//   Yr = Xr*Wr - Xi*Wi ,   Yi = Xr*Wi + Xi*Wr .
// The 15 fraction bits of the coefficient are then dropped (arithmetic shift,
// rounding towards minus infinity) and the result truncated to 16 bits.
// With two shift_add modules the unit uses 22 adders plus the final adder
// and subtracter. The rounding and word width are this design's choice.
// Purely combinational.
module mless_mult
  import fft_pkg::*;
(
  input  cplx_t       x,
  input  mless_ctrl_t ctrl,
  output cplx_t       y
);

  cplx_t              x_sa, x_sw, y_sw;
  logic signed [31:0] xr_wr, xr_wi, xi_wr, xi_wi;
  logic signed [32:0] yr, yi;

  // input demultiplexer
  assign x_sa = ctrl.s6 ? x  : '0;
  assign x_sw = ctrl.s6 ? '0 : x;

  // swap unit: multiply by (0,-1) when s7 is set
  always_comb begin
    if (ctrl.s7) begin
      y_sw.re = x_sw.im;
      y_sw.im = -x_sw.re;
    end else begin
      y_sw = x_sw;
    end
  end

  shift_add u_sa_re (.x(x_sa.re), .s1(ctrl.s1), .s2(ctrl.s2), .s3(ctrl.s3),
                      .s4(ctrl.s4), .s5(ctrl.s5), .by_wr(xr_wr), .by_wi(xr_wi));
  shift_add u_sa_im (.x(x_sa.im), .s1(ctrl.s1), .s2(ctrl.s2), .s3(ctrl.s3),
                      .s4(ctrl.s4), .s5(ctrl.s5), .by_wr(xi_wr), .by_wi(xi_wi));

  assign yr = 33'(xr_wr) - 33'(xi_wi);
  assign yi = 33'(xr_wi) + 33'(xi_wr);

  // output multiplexer
  always_comb begin
    if (ctrl.s6) begin
      y.re = word_t'(yr >>> 15);
      y.im = word_t'(yi >>> 15);
    end else begin
      y = y_sw;
    end
  end

endmodule
