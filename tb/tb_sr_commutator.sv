// tb_sr_commutator: checks the shift-register commutator with NT = 1 (last stage).
//
// Streams 12 blocks of 4*NT random words, with random idle cycles, and at
// every valid output works out which block b, output m and sample q are due
// (outputs run m-major, q-minor, starting when the first block's last
// quarter arrives). It then checks that the four ports carry exactly the
// operands x_p(q) = x(b, p*NT + q), each once, each with rotation
// (p*m) mod 4, and that the rotated sum equals the radix-4 output m. It also
// checks that the first output comes with input word 3*NT and that, once
// primed, there is one output for every input word.
module tb_sr_commutator;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int NT = 1;
  localparam int NB = 12;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  cplx_t in_data = '0;
  logic out_valid;
  cplx_t [3:0] port;
  bf_ctrl_t bf_ctrl;
  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, first_out_at = -1;
  ci_t x [NB][4*NT];

  always #5 clk = ~clk;

  sr_commutator #(.NT(NT)) dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .port, .bf_ctrl);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 4*NT; i++) begin
        x[b][i].re = int'($urandom_range(60000)) - 30000;
        x[b][i].im = int'($urandom_range(60000)) - 30000;
      end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 4*NT; i++) begin
        @(negedge clk);
        in_valid = 1'b0;
        while ($urandom_range(4) == 0) @(negedge clk);
        in_valid = 1'b1;
        in_data.re = word_t'(x[b][i].re);
        in_data.im = word_t'(x[b][i].im);
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    // outputs of every block but the last come out while the next arrives
    check(n_out == (NB - 1) * 4 * NT + NT, $sformatf("%0d outputs", n_out));
    check(first_out_at == 3 * NT, $sformatf("first output with input word %0d", first_out_at));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      if (out_valid) begin
        int b, m, q;
        bit used [4];
        ci_t a [4];
        ci_t e, s, t;
        b = n_out / (4*NT);
        m = (n_out % (4*NT)) / NT;
        q = n_out % NT;
        if (first_out_at < 0) first_out_at = n_in;
        for (int p = 0; p < 4; p++) used[p] = 0;
        s.re = 0; s.im = 0;
        for (int i = 0; i < 4; i++) begin
          bit found;
          found = 0;
          for (int p = 0; p < 4; p++)
            if (!used[p] && !found && int'(port[i].re) == x[b][p*NT+q].re &&
                int'(port[i].im) == x[b][p*NT+q].im) begin
              found = 1;
              used[p] = 1;
              check(int'(bf_ctrl[i]) == (p * m) % 4,
                    $sformatf("block %0d m %0d q %0d: port %0d holds x%0d with rotation %0d",
                              b, m, q, i, p, bf_ctrl[i]));
            end
          check(found, $sformatf("block %0d m %0d q %0d: port %0d holds no expected operand",
                                 b, m, q, i));
          t.re = int'(port[i].re);
          t.im = int'(port[i].im);
          t = rot(t, int'(bf_ctrl[i]));
          s.re += t.re;
          s.im += t.im;
        end
        for (int p = 0; p < 4; p++) a[p] = x[b][p*NT+q];
        e.re = 0; e.im = 0;
        for (int p = 0; p < 4; p++) begin
          t = rot(a[p], p * m);
          e.re += t.re;
          e.im += t.im;
        end
        check(s.re == e.re && s.im == e.im,
              $sformatf("block %0d m %0d q %0d: butterfly sum wrong", b, m, q));
        n_out++;
      end
      n_in++;
    end
  end

  initial begin
    repeat (788) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
