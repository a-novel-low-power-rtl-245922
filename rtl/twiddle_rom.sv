// twiddle_rom: read-only table of the quantized twiddle factors
// W_NB^k = cos(2*pi*k/NB) - j*sin(2*pi*k/NB), k = 0 .. NB-1.
//
// Each part is quantized to 16-bit two's complement with 15 fraction bits as
// floor(value * 32768), saturated to 7fff. This rule reproduces every entry
// of the 16-point coefficient table (7fff,0000 / 7641,cf04 / 5a82,a57d /
// 30fb,89be / 0000,8000 / a57d,a57d / 89be,30fb). The table is built at
// elaboration time from $cos/$sin, so any power-of-two NB works.
//
// Interface: k (address) -> w (coefficient), combinational read.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int unsigned NB = 64                 // transform size of the stage
) (
  input  logic [$clog2(NB)-1:0] k,
  output cplx_t                 w
);

  localparam real PI = 3.14159265358979323846;

  function automatic word_t quant(input real v);
    real s;
    longint f;
    s = $floor(v * 32768.0);
    f = longint'(s);
    if (f > 32767) f = 32767;
    if (f < -32768) f = -32768;
    return word_t'(f);
  endfunction

  function automatic cplx_t coef(input int unsigned idx);
    cplx_t c;
    c.re = quant($cos(2.0 * PI * real'(idx) / real'(NB)));
    c.im = quant(-$sin(2.0 * PI * real'(idx) / real'(NB)));
    return c;
  endfunction

  typedef logic [NB-1:0][2*DW-1:0] table_t;

  function automatic table_t build();
    table_t t;
    for (int unsigned i = 0; i < NB; i++) t[i] = coef(i);
    return t;
  endfunction

  localparam table_t TABLE = build();

  assign w = TABLE[k];

endmodule
