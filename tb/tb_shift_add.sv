// tb_shift_add: for each non-trivial coefficient of the 16-point table,
// (7641,cf04) (5a82,a57d) (30fb,89be) (a57d,a57d) (89be,30fb), sets the
// control lines and compares both outputs with the exact products x*Wr and
// x*Wi, the coefficients written as 16-bit hex constants.
module tb_shift_add;
  import fft_pkg::*;

  word_t x;
  logic s1, s2, s3, s4, s5;
  logic signed [31:0] by_wr, by_wi;
  int checks = 0, failures = 0;

  shift_add dut (.x, .s1, .s2, .s3, .s4, .s5, .by_wr, .by_wi);

  typedef struct {
    logic [4:0]  s;       // s1..s5
    logic [15:0] wr, wi;
  } case_t;

  case_t tbl [5] = '{
    '{5'b00010, 16'h7641, 16'hcf04},
    '{5'b10000, 16'h5a82, 16'ha57d},
    '{5'b00101, 16'h30fb, 16'h89be},
    '{5'b11000, 16'ha57d, 16'ha57d},
    '{5'b00100, 16'h89be, 16'h30fb}
  };

  initial begin
    longint ewr, ewi, xv;
    for (int n = 0; n < 2000; n++) begin
      int c;
      c = n % 5;
      {s1, s2, s3, s4, s5} = tbl[c].s;
      case (n % 37)
        0: x = -16'sd32768;
        1: x = 16'sd32767;
        default: x = word_t'($urandom);
      endcase
      xv  = longint'(x);
      ewr = xv * longint'($signed(tbl[c].wr));
      ewi = xv * longint'($signed(tbl[c].wi));
      #1;
      checks++;
      if (longint'(by_wr) != ewr || longint'(by_wi) != ewi) begin
        failures++;
        if (failures < 10)
          $display("FAIL: W=(%h,%h) x=%0d got (%0d,%0d) expected (%0d,%0d)",
                   tbl[c].wr, tbl[c].wi, x, by_wr, by_wi, ewr, ewi);
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
