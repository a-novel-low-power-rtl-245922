// cmult: conventional complex multiplier of a pipeline stage, with its
// coefficient ROM and the counter that addresses it.
//
// The stage processes blocks of NB words; word c of a block has butterfly
// output index m = c / (NB/4) and sample index q = c mod (NB/4), and is
// multiplied by W_NB^(q*m). Four real multipliers, one subtracter and one
// adder form
//   Yr = Xr*Wr - Xi*Wi ,   Yi = Xr*Wi + Xi*Wr ,
// after which the 15 fraction bits are dropped (arithmetic shift) and the
// result truncated to 16 bits. The multiplier structure (a Wallace tree in
// the reference implementation) is left to synthesis. The counter advances
// on each cycle with valid high; the first valid word after reset is word 0.
// The datapath is combinational.
module cmult
  import fft_pkg::*;
#(
  parameter int unsigned NB = 64                  // block size of the stage
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid,
  input  cplx_t x,
  output cplx_t y
);

  localparam int unsigned AW = $clog2(NB);
  localparam int unsigned QW = AW - 2;

  logic [AW-1:0] cnt;
  logic [AW-1:0] k;
  cplx_t         w;
  logic signed [31:0] xr, xi, wr, wi;
  logic signed [32:0] yr, yi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cnt <= '0;
    else if (valid) cnt <= cnt + 1'b1;
  end

  // q * m with q < NB/4 and m < 4 never reaches NB
  assign k = AW'(cnt[QW-1:0]) * AW'(cnt[AW-1:QW]);

  twiddle_rom #(.NB(NB)) u_rom (.k(k), .w(w));

  assign xr = 32'(x.re);
  assign xi = 32'(x.im);
  assign wr = 32'(w.re);
  assign wi = 32'(w.im);

  assign yr = 33'(xr * wr) - 33'(xi * wi);
  assign yi = 33'(xr * wi) + 33'(xi * wr);

  assign y.re = word_t'(yr >>> 15);
  assign y.im = word_t'(yi >>> 15);

endmodule
