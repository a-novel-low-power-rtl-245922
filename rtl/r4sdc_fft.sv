// r4sdc_fft: N-point radix-4 single-path delay commutator (R4SDC) pipelined
// FFT with a multiplier-less twiddle stage, for short OFDM transforms such as
// the 64-point FFT of IEEE 802.11a/g.
//
// One complex word (16-bit real, 16-bit imaginary) enters per cycle with
// in_valid high. The transform runs through log4(N) stages; stage t works on
// blocks of N/4^(t-1) words and holds N_t = N/4^t words per quarter:
//   - every stage uses the two-summation butterfly (lp_butterfly);
//   - stages with N_t > 1 use the six-RAM commutator, the last stage the
//     shift-register one;
//   - the stage whose block is 16 words long (N_t = 4) uses the
//     multiplier-less unit; earlier stages use the conventional complex
//     multiplier with a coefficient ROM; the last stage has no multiplier.
// For N = 64 this is: IDR + butterfly + ROM multiplier, IDR + butterfly +
// multiplier-less unit, shift register + butterfly. For N = 16: IDR +
// butterfly + multiplier-less unit, shift register + butterfly.
//
// Output: X(k)/N, one word per valid cycle, in base-4 digit-reversed order
// (for N = 16: X0 X4 X8 X12 X1 X5 ...); out_index gives k for each word.
// Every butterfly divides by 4, which is what keeps 16-bit words; the scaling
// and the rounding towards minus infinity are this design's choices.
// Timing: the stream moves only on cycles with in_valid high; with a gap-free
// stream the first output of a frame appears 3*N_t + 2 cycles per stage
// (3*N_t + 1 for the last) after the frame's first input: 68 cycles for
// N = 64, 18 for N = 16. One word leaves per cycle after that. The
// last words of a frame need the next frame's input to come out.
module r4sdc_fft
  import fft_pkg::*;
#(
  parameter int unsigned N = 64                   // transform size, 4^v, v >= 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output cplx_t                out_data,
  output logic [$clog2(N)-1:0] out_index
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned V    = LOGN / 2;        // number of stages

  if (N < 16 || (1 << LOGN) != N || (LOGN % 2) != 0) begin : g_bad_n
    $error("r4sdc_fft: N must be a power of 4, at least 16");
  end

  logic  s_valid [V+1];
  cplx_t s_data  [V+1];

  assign s_valid[0] = in_valid;
  assign s_data[0]  = in_data;

  for (genvar t = 1; t <= V; t++) begin : g_stage
    localparam int unsigned      NT   = N >> (2 * t);
    localparam mult_kind_e       MK   = (t == V)  ? MULT_NONE :
                                        (NT == 4) ? MULT_MLESS : MULT_NBW;
    r4sdc_stage #(.NT(NT), .USE_IDR(NT > 1), .MULT(MK)) u_stage (
      .clk, .rst_n,
      .in_valid (s_valid[t-1]),
      .in_data  (s_data[t-1]),
      .out_valid(s_valid[t]),
      .out_data (s_data[t])
    );
  end

  assign out_valid = s_valid[V];
  assign out_data  = s_data[V];

  // output counter and its base-4 digit reversal
  logic [LOGN-1:0] ocnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ocnt <= '0;
    else if (out_valid) ocnt <= ocnt + 1'b1;
  end

  always_comb begin
    for (int d = 0; d < V; d++) begin
      out_index[2*d +: 2] = ocnt[2*(V-1-d) +: 2];
    end
  end

endmodule
