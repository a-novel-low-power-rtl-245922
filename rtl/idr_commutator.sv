// idr_commutator: delay commutator of one radix-4 stage built from six
// dual-port RAMs (DM0..DM5) with an interconnection that keeps writes and
// output toggling low.
//
// The stage input is a stream of blocks of 4*NT words; within a block the
// words x_p(q) = x(p*NT + q) arrive in order p = 0..3, q = 0..NT-1. The
// butterfly needs the four words x_0(q)..x_3(q) together, four times (once
// per output m = 0..3). Output m of a block is produced while quarter
// (m+3) mod 4 of the input arrives: m = 0 with the last quarter of the same
// block, m = 1..3 with the first three quarters of the next one. So output m
// for sample q leaves in the same cycle as the input word of quarter
// (m+3) mod 4, position q, arrives, i.e. 3*NT cycles after x_0(q).
//
// Period m decides which RAMs are written (all at address q, the low counter
// bits) and with what:
//   m = 0 : DM1 <- In , DM3 <- DM1
//   m = 1 : DM0 <- In , DM2 <- DM0 , DM4 <- DM2
//   m = 2 : DM1 <- In , DM3 <- DM1 , DM5 <- DM3
//   m = 3 : DM0 <- In , DM2 <- DM0
// A RAM read in the cycle it is written returns the old word, so a word moves
// down a chain (DM0->DM2->DM4, DM1->DM3->DM5) as its slot is refilled. With
// A..F the read data of DM0..DM5, the butterfly ports O1..O4 get
//   m = 0 : C=x0  In=x3  A=x2  B=x1
//   m = 1 : C=x0  D=x1   B=x3  A=x2
//   m = 2 : D=x1  C=x2   B=x3  E=x0
//   m = 3 : D=x3  C=x2   F=x1  E=x0
// and bf_ctrl tells the butterfly the rotation (-j)^(p*m) of each port.
// DM2 is read in every period and uses the counter as read address; each
// other RAM has its own read address, which follows the counter while its
// data is used and is frozen otherwise. An idle RAM's output then changes at
// most once, at the start of the idle period (its held address was just
// rewritten), instead of on every word.
//
// The counter advances on each cycle with in_valid high. out_valid is high
// with in_valid once the first block's last quarter has started; the outputs
// are combinational from in_data and the RAMs. NT must be a power of two,
// at least 2. The port assignment and the read-address freezing rule are
// this design's reading of the architecture; the write schedule is the
// published one.
module idr_commutator
  import fft_pkg::*;
#(
  parameter int unsigned NT = 16                  // N_t: words per quarter
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        out_valid,
  output cplx_t [3:0] port,                       // O1..O4
  output bf_ctrl_t    bf_ctrl
);

  localparam int unsigned AW = $clog2(NT);

  if (NT < 2 || (1 << AW) != NT) begin : g_bad_nt
    $error("idr_commutator: NT must be a power of two, at least 2");
  end

  typedef enum logic [2:0] { S_IN, S_A, S_B, S_C, S_D, S_E, S_F } src_e;

  logic [AW+1:0]  cnt;
  logic [1:0]     quarter, m;
  logic [AW-1:0]  q;
  logic           primed;

  logic [5:0]     we, used;
  logic [AW-1:0]  rad [6];
  logic [AW-1:0]  rad_hold [6];
  cplx_t          rd [6];
  cplx_t          wd [6];
  src_e           sel [4];
  logic [1:0]     xidx [4];

  assign quarter = cnt[AW+1:AW];
  assign q       = cnt[AW-1:0];
  assign m       = quarter + 2'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      primed <= 1'b0;
    end else if (in_valid) begin
      cnt <= cnt + 1'b1;
      if (quarter == 2'd3) primed <= 1'b1;
    end
  end

  assign out_valid = in_valid && (primed || quarter == 2'd3);

  // control table: write enables, RAMs whose output is needed, port sources
  always_comb begin
    unique case (m)
      2'd0: begin
        we   = 6'b001010;               // DM1, DM3
        used = 6'b000111;               // A, B, C
        sel  = '{S_C, S_IN, S_A, S_B};
        xidx = '{2'd0, 2'd3, 2'd2, 2'd1};
      end
      2'd1: begin
        we   = 6'b010101;               // DM0, DM2, DM4
        used = 6'b001111;               // A, B, C, D
        sel  = '{S_C, S_D, S_B, S_A};
        xidx = '{2'd0, 2'd1, 2'd3, 2'd2};
      end
      2'd2: begin
        we   = 6'b101010;               // DM1, DM3, DM5
        used = 6'b011110;               // B, C, D, E
        sel  = '{S_D, S_C, S_B, S_E};
        xidx = '{2'd1, 2'd2, 2'd3, 2'd0};
      end
      default: begin
        we   = 6'b000101;               // DM0, DM2
        used = 6'b111101;               // A, C, D, E, F
        sel  = '{S_D, S_C, S_F, S_E};
        xidx = '{2'd3, 2'd2, 2'd1, 2'd0};
      end
    endcase
  end

  // write data: inputs to the two RAM chains
  assign wd[0] = in_data;
  assign wd[1] = in_data;
  assign wd[2] = rd[0];
  assign wd[3] = rd[1];
  assign wd[4] = rd[2];
  assign wd[5] = rd[3];

  // read addresses: follow the counter when used, otherwise hold
  always_comb begin
    for (int i = 0; i < 6; i++) rad[i] = used[i] ? q : rad_hold[i];
    rad[2] = q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // last address of a quarter, the value held in steady state
      for (int i = 0; i < 6; i++) rad_hold[i] <= '1;
    end else if (in_valid) begin
      for (int i = 0; i < 6; i++) rad_hold[i] <= rad[i];
    end
  end

  for (genvar i = 0; i < 6; i++) begin : g_dm
    dp_ram #(.DEPTH(NT), .WIDTH($bits(cplx_t))) u_dm (
      .clk  (clk),
      .cs   (in_valid && we[i]),
      .wad  (q),
      .din  (wd[i]),
      .rad  (rad[i]),
      .dout (rd[i])
    );
  end

  // output multiplexers O1..O4 and butterfly control
  always_comb begin
    for (int o = 0; o < 4; o++) begin
      unique case (sel[o])
        S_IN:    port[o] = in_data;
        S_A:     port[o] = rd[0];
        S_B:     port[o] = rd[1];
        S_C:     port[o] = rd[2];
        S_D:     port[o] = rd[3];
        S_E:     port[o] = rd[4];
        default: port[o] = rd[5];
      endcase
      bf_ctrl[o] = bf_rot(xidx[o], m);
    end
  end

endmodule
