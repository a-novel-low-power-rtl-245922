// dp_ram: dual-port RAM used as one of the six delay memories DM0..DM5 of
// the IDR commutator.
//
// One write port (address wad, data din, enable cs) written on the rising
// clock edge, and one asynchronous read port (address rad, data dout). A read
// of the address being written in the same cycle returns the old contents,
// which is what lets a commutator move a word out of a RAM and store a new
// one in its place in a single cycle. Because the read port is combinational,
// dout holds still for as long as rad is held: the commutator relies on this
// to keep the outputs of idle RAMs at their previous values. The contents are
// not reset; the commutator never reads a location before writing it.
module dp_ram #(
  parameter int unsigned DEPTH = 16,            // words (N_t of the stage)
  parameter int unsigned WIDTH = 32,            // bits per word
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             cs,                  // write enable
  input  logic [AW-1:0]    wad,
  input  logic [WIDTH-1:0] din,
  input  logic [AW-1:0]    rad,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cs) mem[wad] <= din;
  end

  assign dout = mem[rad];

endmodule
