// tb_lp_butterfly: drives random operands (including the extreme values)
// and random per-port rotations into the butterfly and compares both output
// parts with (1/4) * sum_p x_p * (-j)^k_p computed in integer arithmetic.
module tb_lp_butterfly;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  cplx_t [3:0] x;
  bf_ctrl_t    ctrl;
  cplx_t       y;
  int checks = 0, failures = 0;

  lp_butterfly dut (.x, .ctrl, .y);

  function automatic int pick();
    case ($urandom_range(9))
      0: return -32768;
      1: return 32767;
      default: return int'($urandom_range(65535)) - 32768;
    endcase
  endfunction

  initial begin
    ci_t a, t;
    longint sr, si;
    for (int n = 0; n < 3000; n++) begin
      sr = 0; si = 0;
      for (int p = 0; p < 4; p++) begin
        a.re = pick(); a.im = pick();
        x[p].re = word_t'(a.re);
        x[p].im = word_t'(a.im);
        ctrl[p] = rot_t'($urandom_range(3));
        t = rot(a, int'(ctrl[p]));
        sr += t.re;
        si += t.im;
      end
      #1;
      checks++;
      if (int'(y.re) != int'(sr >>> 2) || int'(y.im) != int'(si >>> 2)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: ctrl %h got (%0d,%0d) expected (%0d,%0d)", ctrl, y.re, y.im,
                   sr >>> 2, si >>> 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
