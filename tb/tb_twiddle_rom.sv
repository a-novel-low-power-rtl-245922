// tb_twiddle_rom: checks every entry of the 64-entry coefficient table
// against floor(32768*cos), floor(-32768*sin) saturated to 7fff, and the
// 16-entry table against the published 16-bit hex coefficients.
module tb_twiddle_rom;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  logic [5:0] k64;
  logic [3:0] k16;
  cplx_t w64, w16;
  int checks = 0, failures = 0;

  twiddle_rom              dut64 (.k(k64), .w(w64));
  twiddle_rom #(.NB(16))   dut16 (.k(k16), .w(w16));

  // W16^k for k = 0, 1, 2, 3, 4, 6, 9
  int          kk [7]  = '{0, 1, 2, 3, 4, 6, 9};
  logic [31:0] hx [7]  = '{32'h7fff0000, 32'h7641cf04, 32'h5a82a57d, 32'h30fb89be,
                           32'h00008000, 32'ha57da57d, 32'h89be30fb};

  initial begin
    ci_t e;
    for (int i = 0; i < 64; i++) begin
      k64 = 6'(i);
      #1;
      e = twiddle(i, 64);
      checks++;
      if (int'(w64.re) != e.re || int'(w64.im) != e.im) begin
        failures++;
        $display("FAIL: W64^%0d = (%0d,%0d), expected (%0d,%0d)", i, w64.re, w64.im, e.re, e.im);
      end
    end
    for (int i = 0; i < 7; i++) begin
      k16 = 4'(kk[i]);
      #1;
      checks++;
      if (w16 != hx[i]) begin
        failures++;
        $display("FAIL: W16^%0d = %h, expected %h", kk[i], w16, hx[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
