// r4sdc_stage: one stage of the radix-4 single-path delay commutator FFT:
// commutator, butterfly, pipeline register, twiddle multiplier, register.
//
// The stage takes blocks of 4*NT words in natural order and emits, for each
// block, the 4*NT butterfly outputs in the order m = 0..3 (outer), q = 0..NT-1
// (inner), each multiplied by W_(4NT)^(q*m) unless the stage is the last.
// Its output stream is therefore the input stream of the next stage, whose
// blocks are NT words long.
//
// Parameters choose the parts: USE_IDR selects the six-RAM commutator (NT of
// two or more) or the shift-register one; MULT selects no multiplier (last
// stage), the conventional multiplier with ROM, or the multiplier-less unit
// and its control state machine (which needs NT = 4).
//
// Timing: an output word leaves the butterfly register one cycle after the
// commutator presented it and, when there is a multiplier, the multiplier
// register one cycle later. The first output of a block follows the block's
// first input by 3*NT + 2 valid cycles (3*NT + 1 in the last stage) when the
// input stream has no gaps. Data only moves on cycles with in_valid high, so
// the stream may pause, but a block's last outputs need the next block's
// input to come out.
module r4sdc_stage
  import fft_pkg::*;
#(
  parameter int unsigned NT       = 4,            // N_t: a block is 4*NT words
  parameter bit          USE_IDR  = 1'b1,
  parameter mult_kind_e  MULT     = MULT_MLESS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);

  logic        c_valid;
  cplx_t [3:0] c_port;
  bf_ctrl_t    c_ctrl;
  cplx_t       bf_y;
  logic        b_valid;
  cplx_t       b_data;

  if (USE_IDR) begin : g_idr
    idr_commutator #(.NT(NT)) u_comm (
      .clk, .rst_n, .in_valid, .in_data,
      .out_valid(c_valid), .port(c_port), .bf_ctrl(c_ctrl)
    );
  end else begin : g_sr
    sr_commutator #(.NT(NT)) u_comm (
      .clk, .rst_n, .in_valid, .in_data,
      .out_valid(c_valid), .port(c_port), .bf_ctrl(c_ctrl)
    );
  end

  lp_butterfly u_bf (.x(c_port), .ctrl(c_ctrl), .y(bf_y));

  // butterfly output register: loads with every valid commutator output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      b_data  <= '0;
    end else begin
      b_valid <= c_valid;
      if (c_valid) b_data <= bf_y;
    end
  end

  if (MULT == MULT_NONE) begin : g_nomult
    assign out_valid = b_valid;
    assign out_data  = b_data;
  end else begin : g_mult
    cplx_t m_y;

    if (MULT == MULT_MLESS) begin : g_mless
      mless_ctrl_t ctrl;
      logic [3:0]  k_unused;
      if (NT != 4) begin : g_bad_nt
        $error("r4sdc_stage: the multiplier-less unit needs NT = 4");
      end
      mless_ctrl u_ctrl (.clk, .rst_n, .valid(b_valid), .ctrl(ctrl), .k(k_unused));
      mless_mult u_mult (.x(b_data), .ctrl(ctrl), .y(m_y));
    end else begin : g_nbw
      cmult #(.NB(4 * NT)) u_mult (
        .clk, .rst_n, .valid(b_valid), .x(b_data), .y(m_y)
      );
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        out_data  <= '0;
      end else begin
        out_valid <= b_valid;
        if (b_valid) out_data <= m_y;
      end
    end
  end

endmodule
