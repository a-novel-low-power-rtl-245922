// tb_mless_ctrl: runs the control state machine through three 16-word
// coefficient sequences, with idle cycles in between, and checks at each
// valid word that the exponent follows W0 W0 W0 W0 W0 W1 W2 W3 W0 W2 W4 W6
// W0 W3 W6 W9 and that s1..s7 select the right coefficient handling.
module tb_mless_ctrl;
  import fft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  mless_ctrl_t ctrl;
  logic [3:0] k;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mless_ctrl dut (.clk, .rst_n, .valid, .ctrl, .k);

  int seq [16] = '{0, 0, 0, 0, 0, 1, 2, 3, 0, 2, 4, 6, 0, 3, 6, 9};

  // expected {s1..s7} for an exponent
  function automatic logic [6:0] expect_s(input int e);
    case (e)
      0: return 7'b0000000;
      4: return 7'b0000001;
      1: return 7'b0001010;
      2: return 7'b1000010;
      3: return 7'b0010110;
      6: return 7'b1100010;
      9: return 7'b0010010;
      default: return 7'bx;
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 48; n++) begin
      @(negedge clk);
      valid = 1'b0;
      if (n % 5 == 3) @(negedge clk);      // idle cycle: state must hold
      valid = 1'b1;
      #1;
      checks++;
      if (int'(k) != seq[n % 16] ||
          {ctrl.s1, ctrl.s2, ctrl.s3, ctrl.s4, ctrl.s5, ctrl.s6, ctrl.s7} != expect_s(seq[n % 16])) begin
        failures++;
        $display("FAIL: word %0d k=%0d ctrl=%b", n, k, ctrl);
      end
    end
    @(negedge clk);
    valid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
