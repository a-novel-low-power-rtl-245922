// sr_commutator: delay commutator of one radix-4 stage built as a tapped
// shift register; used for the last stage, where a quarter block is one word.
//
// Input blocks of 4*NT words arrive as x_p(q) = x(p*NT + q). Output m for
// sample q leaves 3*NT cycles after x_0(q) arrived, plus m*NT (the same
// schedule as the RAM-based commutator). Operand x_p(q) has then waited
// (3 + m - p)*NT cycles, so a 6*NT-word shift register with a tap every NT
// words, plus the live input for a wait of zero, holds all operands; port p
// carries x_p. The register shifts, and the counter advances, on each cycle
// with in_valid high. out_valid and the outputs behave as in idr_commutator.
// The tapped shift register is this design's choice of structure.
module sr_commutator
  import fft_pkg::*;
#(
  parameter int unsigned NT = 1                   // N_t: words per quarter
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        out_valid,
  output cplx_t [3:0] port,                       // port p carries x_p
  output bf_ctrl_t    bf_ctrl
);

  localparam int unsigned CWID = $clog2(4 * NT);
  localparam int unsigned LEN  = 6 * NT;

  logic [CWID-1:0] cnt;
  logic [1:0]      quarter, m;
  logic            primed;
  cplx_t           sr [LEN];
  cplx_t           taps [7];

  assign quarter = 2'(cnt / CWID'(NT));
  assign m       = quarter + 2'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      primed <= 1'b0;
    end else if (in_valid) begin
      cnt <= cnt + 1'b1;
      if (quarter == 2'd3) primed <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      sr[0] <= in_data;
      for (int i = 1; i < LEN; i++) sr[i] <= sr[i-1];
    end
  end

  // taps[d] = input delayed by d*NT words
  always_comb begin
    taps[0] = in_data;
    for (int d = 1; d < 7; d++) taps[d] = sr[d*NT-1];
  end

  assign out_valid = in_valid && (primed || quarter == 2'd3);

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      port[p]    = taps[3 + int'(m) - p];
      bf_ctrl[p] = bf_rot(2'(p), m);
    end
  end

endmodule
