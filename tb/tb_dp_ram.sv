// tb_dp_ram: checks the commutator RAM: written words read back at their
// addresses, a read of the address being written returns the old word in
// that cycle and the new one after the edge, no write without cs, and the
// read data stays put while the read address is held.
module tb_dp_ram;
  localparam int DEPTH = 16;
  localparam int WIDTH = 32;

  logic clk = 1'b0;
  logic cs = 1'b0;
  logic [3:0] wad = '0, rad = '0;
  logic [WIDTH-1:0] din = '0, dout;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .cs, .wad, .din, .rad, .dout);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      cs = 1'b1; wad = 4'(i); din = $urandom; model[i] = din;
    end
    @(negedge clk);
    cs = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      rad = 4'(i);
      #1 check(dout == model[i], $sformatf("read %0d", i));
    end
    // read-during-write returns the old word, then the new one
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      wad = 4'($urandom_range(DEPTH - 1));
      rad = wad;
      din = $urandom;
      cs  = 1'($urandom_range(1));
      #1 check(dout == model[wad], "old word during write");
      @(posedge clk);
      if (cs) model[wad] = din;
      #1 check(dout == model[rad], "word after write");
    end
    // held read address: output does not move while other words change
    @(negedge clk);
    rad = 4'd3;
    for (int n = 0; n < 10; n++) begin
      @(negedge clk);
      cs = 1'b1; wad = 4'(4 + n % 8); din = $urandom; model[wad] = din;
      #1 check(dout == model[3], "held output");
    end
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
