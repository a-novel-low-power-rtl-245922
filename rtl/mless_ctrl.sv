// mless_ctrl: state machine that replaces the coefficient ROM of a
// multiplier-less stage. It steps through the 16-word coefficient sequence of
// a 16-point radix-4 stage and drives the control lines s1..s7 of mless_mult.
//
// The state is the position c (0..15) of the word now at the multiplier
// input; the butterfly output index is m = c[3:2] and the sample index
// q = c[1:0], and the coefficient is W16^(q*m). The sequence is therefore
//   W0 W0 W0 W0 | W0 W1 W2 W3 | W0 W2 W4 W6 | W0 W3 W6 W9 .
// The state advances on every cycle with valid high; the first valid word
// after reset is position 0. Outputs are a decode of the state (Moore).
module mless_ctrl
  import fft_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,     // a word is at the multiplier input
  output mless_ctrl_t ctrl,
  output logic [3:0]  k          // exponent of the current coefficient
);

  logic [3:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cnt <= '0;
    else if (valid) cnt <= cnt + 4'd1;
  end

  assign k = 4'(cnt[3:2]) * 4'(cnt[1:0]);

  always_comb begin
    ctrl = '0;
    unique case (k)
      4'd0: ;                                                       // (7fff,0000)
      4'd4: ctrl.s7 = 1'b1;                                         // (0000,8000)
      4'd1: begin ctrl.s6 = 1'b1; ctrl.s4 = 1'b1; end               // (7641,cf04)
      4'd2: begin ctrl.s6 = 1'b1; ctrl.s1 = 1'b1; end               // (5a82,a57d)
      4'd3: begin ctrl.s6 = 1'b1; ctrl.s3 = 1'b1; ctrl.s5 = 1'b1; end // (30fb,89be)
      4'd6: begin ctrl.s6 = 1'b1; ctrl.s1 = 1'b1; ctrl.s2 = 1'b1; end // (a57d,a57d)
      4'd9: begin ctrl.s6 = 1'b1; ctrl.s3 = 1'b1; end               // (89be,30fb)
      default: ;                                                    // not reached
    endcase
  end

endmodule
