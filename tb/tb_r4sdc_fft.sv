// tb_r4sdc_fft: end-to-end test of the 64-point pipelined FFT (r4sdc_fft at its default size).
//
// Streams 6 frames of 64 complex samples (an impulse, a single tone, a
// full-scale-ish square wave and random data) plus one trailing frame that
// pushes the last frame out, with gaps in in_valid during the later frames.
// Each output frame is compared word for word with a fixed point model of
// the same algorithm (fft_ref_pkg::fft) and, within a small tolerance, with a
// floating point DFT. Also checked: the output index sequence (base-4 digit
// reversal), the latency from first input to first output on a gap-free
// stream (3*N_t + 2 per stage, 3*N_t + 1 for the last), one output word per clock
// while the input has no gaps, and that every mechanism of the design was
// exercised: each write period of every RAM-based commutator, every kind of
// coefficient handling in the multiplier-less stage, the ROM-based multiplier, the
// shift-register commutator, and a stalled input stream.
module tb_r4sdc_fft;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int N       = 64;
  localparam int NF      = 6;       // frames checked
  localparam int LATENCY = 68;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  cplx_t in_data = '0;
  logic out_valid;
  cplx_t out_data;
  logic [$clog2(N)-1:0] out_index;

  int checks = 0;
  int failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  r4sdc_fft dut (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data, .out_index
  );

  ci_t    frames [NF+1][];
  ci_t    got    [NF][];
  longint first_in = -1, first_out = -1, out63 = -1;
  int     ocount = 0;
  int     mon_f, mon_k;
  ci_t    mon_c;
  int     n_stall = 0;
  int     n_pass = 0, n_swap = 0, n_ch5a82 = 0, n_ch7641 = 0, n_s5 = 0;
  int     n_sr = 0, n_nbw = 0;
  int     n_per [2][4];

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // stimulus
  initial begin
    for (int f = 0; f <= NF; f++) begin
      frames[f] = new[N];
      for (int i = 0; i < N; i++) begin
        ci_t c;
        case (f)
          0: begin c.re = (i == 0) ? 12000 : 0; c.im = 0; end
          1: begin
               c.re = int'($floor(9000.0 * $cos(2.0*3.14159265358979*5.0*real'(i)/real'(N))));
               c.im = int'($floor(9000.0 * $sin(2.0*3.14159265358979*5.0*real'(i)/real'(N))));
             end
          2: begin c.re = (i % 8 < 4) ? 8000 : -8000; c.im = (i % 2 == 0) ? -3000 : 3000; end
          default: begin
               c.re = int'($urandom_range(16000)) - 8000;
               c.im = int'($urandom_range(16000)) - 8000;
             end
        endcase
        frames[f][i] = c;
      end
    end
    for (int f = 0; f < NF; f++) got[f] = new[N];

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f <= NF; f++) begin
      for (int i = 0; i < N; i++) begin
        // gaps in the input stream from frame 4 on
        while (f >= 4 && $urandom_range(3) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_data.re <= word_t'(frames[f][i].re);
        in_data.im <= word_t'(frames[f][i].im);
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    finish_test();
  end

  // monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && first_in < 0) first_in = cyc;
      if (!in_valid && first_in >= 0) n_stall++;
      if (out_valid) begin
        if (first_out < 0) first_out = cyc;
        if (ocount == N - 1) out63 = cyc;
        check(int'(out_index) == digit_rev4(ocount % N, N),
              $sformatf("out_index %0d at output %0d", out_index, ocount));
        if (ocount / N < NF) begin
          mon_f = ocount / N;
          mon_k = int'(out_index);
          mon_c.re = int'(out_data.re);
          mon_c.im = int'(out_data.im);
          got[mon_f][mon_k] = mon_c;
        end
        ocount++;
      end
      // mechanisms
      if (dut.g_stage[1].u_stage.c_valid && dut.g_stage[1].u_stage.g_idr.u_comm.in_valid)
        n_per[0][dut.g_stage[1].u_stage.g_idr.u_comm.m]++;
      if (dut.g_stage[2].u_stage.c_valid && dut.g_stage[2].u_stage.g_idr.u_comm.in_valid)
        n_per[1][dut.g_stage[2].u_stage.g_idr.u_comm.m]++;
      if (dut.g_stage[2].u_stage.b_valid) begin
        if (!dut.g_stage[2].u_stage.g_mult.g_mless.ctrl.s6 && !dut.g_stage[2].u_stage.g_mult.g_mless.ctrl.s7) n_pass++;
        if (!dut.g_stage[2].u_stage.g_mult.g_mless.ctrl.s6 &&  dut.g_stage[2].u_stage.g_mult.g_mless.ctrl.s7) n_swap++;
        if (dut.g_stage[2].u_stage.g_mult.g_mless.ctrl.s6 &&  dut.g_stage[2].u_stage.g_mult.g_mless.ctrl.s1) n_ch5a82++;
        if (dut.g_stage[2].u_stage.g_mult.g_mless.ctrl.s6 && !dut.g_stage[2].u_stage.g_mult.g_mless.ctrl.s1) n_ch7641++;
        if (dut.g_stage[2].u_stage.g_mult.g_mless.ctrl.s6 && !dut.g_stage[2].u_stage.g_mult.g_mless.ctrl.s1 && dut.g_stage[2].u_stage.g_mult.g_mless.ctrl.s5) n_s5++;
      end
      if (dut.g_stage[3].u_stage.c_valid) n_sr++;
      if (dut.g_stage[1].u_stage.b_valid) n_nbw++;
    end
  end

  task automatic finish_test();
    ci_t X [];
    real dr [], di [];
    real err, maxerr;
    for (int f = 0; f < NF; f++) begin
      fft(frames[f], X);
      dft(frames[f], dr, di);
      maxerr = 0.0;
      for (int k = 0; k < N; k++) begin
        check(got[f][k].re == X[k].re && got[f][k].im == X[k].im,
              $sformatf("frame %0d bin %0d: got (%0d,%0d) expected (%0d,%0d)",
                        f, k, got[f][k].re, got[f][k].im, X[k].re, X[k].im));
        err = rabs(real'(got[f][k].re) - dr[k]) + rabs(real'(got[f][k].im) - di[k]);
        if (err > maxerr) maxerr = err;
      end
      check(maxerr < 6.0, $sformatf("frame %0d: error against float DFT %f", f, maxerr));
    end
    check(ocount >= NF * N, $sformatf("only %0d output words", ocount));
    check(first_out - first_in == LATENCY,
          $sformatf("latency %0d, expected %0d", first_out - first_in, LATENCY));
    check(out63 - first_out == N - 1,
          $sformatf("first frame took %0d cycles, expected %0d", out63 - first_out + 1, N));
    // every mechanism happened
    for (int s = 0; s < 2; s++)
      for (int m = 0; m < 4; m++)
        check(n_per[s][m] > 0, $sformatf("IDR commutator %0d never ran period %0d", s, m));
    check(n_pass > 0,   "multiplier-less: (1,0) pass-through never used");
    check(n_swap > 0,   "multiplier-less: (0,-1) swap never used");
    check(n_ch5a82 > 0, "multiplier-less: 5a82 channel never used");
    check(n_ch7641 > 0, "multiplier-less: 7641/30fb channel never used");
    check(n_s5 > 0,     "multiplier-less: 7641/30fb swap never used");
    check(n_sr > 0,     "shift-register commutator never produced");
    check(n_nbw > 0,    "ROM-based multiplier never used");
    check(n_stall > 0,  "input stream never stalled");
    $display("mechanisms: idr periods %p, pass %0d swap %0d ch5a82 %0d ch7641 %0d s5 %0d sr %0d nbw %0d stall %0d",
             n_per, n_pass, n_swap, n_ch5a82, n_ch7641, n_s5, n_sr, n_nbw, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
