// tb_r4sdc_stage: runs one full stage (six-RAM commutator, butterfly,
// multiplier-less unit) on eight 16-word blocks of random data with idle
// cycles, then one block to flush, and checks every output word against a
// one-stage fixed point model (fft_ref_pkg::stage). Also checks that the
// first output follows the first input by 3*NT + 2 = 14 cycles on a
// gap-free start.
module tb_r4sdc_stage;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int NT = 4;
  localparam int NB = 8;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  cplx_t in_data = '0, out_data;
  logic out_valid;
  int checks = 0, failures = 0;
  int n_out = 0;
  longint cyc = 0, first_in = -1, first_out = -1;
  ci_t xin [], xref [];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  r4sdc_stage #(.NT(NT), .USE_IDR(1'b1), .MULT(MULT_MLESS)) dut (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data
  );

  initial begin
    xin = new[(NB + 1) * 4 * NT];
    foreach (xin[i]) begin
      xin[i].re = int'($urandom_range(40000)) - 20000;
      xin[i].im = int'($urandom_range(40000)) - 20000;
    end
    xref = xin;
    stage(xref, 4 * NT, 2);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (xin[i]) begin
      @(negedge clk);
      in_valid = 1'b0;
      while (i > 40 && $urandom_range(3) == 0) @(negedge clk);
      in_valid = 1'b1;
      in_data.re = word_t'(xin[i].re);
      in_data.im = word_t'(xin[i].im);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (n_out < NB * 4 * NT) begin
      failures++;
      $display("FAIL: only %0d outputs", n_out);
    end
    checks++;
    if (first_out - first_in != 3 * NT + 2) begin
      failures++;
      $display("FAIL: latency %0d", first_out - first_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && first_in < 0) first_in = cyc;
      if (out_valid) begin
        if (first_out < 0) first_out = cyc;
        if (n_out < NB * 4 * NT) begin
          checks++;
          if (int'(out_data.re) != xref[n_out].re || int'(out_data.im) != xref[n_out].im) begin
            failures++;
            if (failures < 10)
              $display("FAIL: word %0d got (%0d,%0d) expected (%0d,%0d)", n_out,
                       out_data.re, out_data.im, xref[n_out].re, xref[n_out].im);
          end
        end
        n_out++;
      end
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
