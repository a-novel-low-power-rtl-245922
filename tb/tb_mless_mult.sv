// tb_mless_mult: for each coefficient class of the 16-point stage (pass,
// (0,-1) swap, and the five non-trivial ones) drives random complex words
// and compares with the complex product by the 16-bit coefficient, rounded
// by dropping 15 fraction bits; (1,0) must pass the word unchanged and
// (0,-1) must give (im, -re).
module tb_mless_mult;
  import fft_pkg::*;

  cplx_t       x, y;
  mless_ctrl_t ctrl;
  int checks = 0, failures = 0;

  mless_mult dut (.x, .ctrl, .y);

  typedef struct {
    logic [6:0]  s;       // s1..s7
    logic [15:0] wr, wi;
  } case_t;

  case_t tbl [7] = '{
    '{7'b0000000, 16'h7fff, 16'h0000},
    '{7'b0000001, 16'h0000, 16'h8000},
    '{7'b0001010, 16'h7641, 16'hcf04},
    '{7'b1000010, 16'h5a82, 16'ha57d},
    '{7'b0010110, 16'h30fb, 16'h89be},
    '{7'b1100010, 16'ha57d, 16'ha57d},
    '{7'b0010010, 16'h89be, 16'h30fb}
  };

  initial begin
    longint xr, xi, wr, wi, er, ei;
    for (int n = 0; n < 3000; n++) begin
      int c;
      c = n % 7;
      {ctrl.s1, ctrl.s2, ctrl.s3, ctrl.s4, ctrl.s5, ctrl.s6, ctrl.s7} = tbl[c].s;
      x.re = word_t'(int'($urandom_range(40000)) - 20000);
      x.im = word_t'(int'($urandom_range(40000)) - 20000);
      xr = longint'(x.re);
      xi = longint'(x.im);
      wr = longint'($signed(tbl[c].wr));
      wi = longint'($signed(tbl[c].wi));
      if (c == 0) begin
        er = xr; ei = xi;
      end else if (c == 1) begin
        er = xi; ei = -xr;
      end else begin
        er = (xr * wr - xi * wi) >>> 15;
        ei = (xr * wi + xi * wr) >>> 15;
      end
      #1;
      checks++;
      if (longint'(y.re) != er || longint'(y.im) != ei) begin
        failures++;
        if (failures < 10)
          $display("FAIL: W=(%h,%h) x=(%0d,%0d) got (%0d,%0d) expected (%0d,%0d)",
                   tbl[c].wr, tbl[c].wi, x.re, x.im, y.re, y.im, er, ei);
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
