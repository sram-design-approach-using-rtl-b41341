// sram_pl_top: static RAM whose write data is collected by a pulsed-latch
// shift register.
//
// Serial data on `in` is shifted, one bit per clock, into a WIDTH-bit
// (256-bit) shift register made of pulsed latches (pl_shift_register).
// Its parallel contents form the write word of a small SRAM: DEPTH rows of
// WIDTH cells, one row per value of addr. In each cycle:
//   en=0          idle: no word line is raised, dout holds;
//   en=1, load=1  write: the word lines of row addr rise and the write
//                 drivers put the shift register word on BL/~BL;
//   en=1, load=0  read: row addr discharges its bit lines and the sense
//                 amplifiers register the word into dout.
// The shift register shifts every cycle regardless of en and load.
//
// The ports are those of the published SRAM (clk, rst, in, en, load,
// addr[2:0], dout[255:0]); the meaning given to en and load, the row count
// of 8 read from the 3-bit address, and the one-cycle read latency are this
// design's own. Bit order: dout[i] and word bit i correspond to latch
// Q(i+1); bit 0 is the most recently shifted-in bit.
//
// Timing: a write at clock edge n stores the word holding `in` sampled at
// edges n-1 (bit 0) down to n-WIDTH (bit WIDTH-1). A read at edge n shows
// the row in dout right after that edge. The clock high phase must exceed
// the settling time of the pulsed clocks (about 1.6 ns with the default
// delays), and `in` must stay stable until the pulses are over.
`timescale 1ps / 1ps
module sram_pl_top #(
  parameter int unsigned WIDTH    = sram_pl_pkg::WIDTH,
  parameter int unsigned SUB_BITS = sram_pl_pkg::SUB_BITS,
  parameter int unsigned ADDR_W   = sram_pl_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in,
  input  logic              en,
  input  logic              load,
  input  logic [ADDR_W-1:0] addr,
  output logic [WIDTH-1:0]  dout
);
  localparam int unsigned DEPTH = 2 ** ADDR_W;

  // Serial-in, parallel-out pulsed-latch shift register. Its temporary
  // latches (sr_t) are internal to the shifting and not part of the word;
  // they stay unconnected, which lint reports as an unused signal.
  logic [WIDTH-1:0]          sr_q;
  logic [WIDTH/SUB_BITS-1:0] sr_t;

  pl_shift_register #(.WIDTH(WIDTH), .SUB_BITS(SUB_BITS)) u_sr (
    .clk (clk),
    .rst (rst),
    .din (in),
    .q   (sr_q),
    .t   (sr_t)
  );

  // Operation of this cycle
  sram_pl_pkg::mem_op_e op;
  always_comb begin
    if (!en)       op = sram_pl_pkg::OP_IDLE;
    else if (load) op = sram_pl_pkg::OP_WRITE;
    else           op = sram_pl_pkg::OP_READ;
  end

  // Row selection
  logic [DEPTH-1:0] wl;
  wordline_decoder #(.ADDR_W(ADDR_W)) u_dec (
    .en  (op != sram_pl_pkg::OP_IDLE),
    .addr(addr),
    .wl  (wl)
  );

  // Write drivers: differential data on the bit lines, or both lines left
  // precharged when not writing
  logic             we;
  logic [WIDTH-1:0] bl, blb;
  assign we  = (op == sram_pl_pkg::OP_WRITE);
  assign bl  = we ? sr_q  : '1;
  assign blb = we ? ~sr_q : '1;

  logic [WIDTH-1:0] rbl, rblb;
  sram_array #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_array (
    .clk (clk),
    .wl  (wl),
    .we  (we),
    .bl  (bl),
    .blb (blb),
    .rbl (rbl),
    .rblb(rblb)
  );

  sense_amp #(.WIDTH(WIDTH)) u_sa (
    .clk (clk),
    .rst (rst),
    .sae (op == sram_pl_pkg::OP_READ),
    .rbl (rbl),
    .rblb(rblb),
    .dout(dout)
  );
endmodule
