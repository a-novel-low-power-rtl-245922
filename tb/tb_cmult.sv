// tb_cmult: feeds three 64-word blocks, with idle cycles, through the
// ROM-based complex multiplier and checks each word against the product by
// W64^(q*m) (m = c / 16, q = c mod 16 for word c of a block), with the
// coefficients recomputed here and 15 fraction bits dropped.
module tb_cmult;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  cplx_t x, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cmult dut (.clk, .rst_n, .valid, .x, .y);

  initial begin
    ci_t a, e;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 192; n++) begin
      int c;
      @(negedge clk);
      valid = 1'b0;
      if (n % 7 == 2) @(negedge clk);
      valid = 1'b1;
      a.re = int'($urandom_range(60000)) - 30000;
      a.im = int'($urandom_range(60000)) - 30000;
      x.re = word_t'(a.re);
      x.im = word_t'(a.im);
      c = n % 64;
      e = cmul(a, twiddle((c % 16) * (c / 16), 64));
      #1;
      checks++;
      if (int'(y.re) != e.re || int'(y.im) != e.im) begin
        failures++;
        if (failures < 10)
          $display("FAIL: word %0d got (%0d,%0d) expected (%0d,%0d)", n, y.re, y.im, e.re, e.im);
      end
    end
    @(negedge clk);
    valid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
