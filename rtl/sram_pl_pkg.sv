// sram_pl_pkg: sizes and types shared by the pulsed-latch SRAM.
//
// The memory word is 256 bits wide and is built from 4-bit sub shift
// registers, so a full word uses 64 of them. The 3-bit row address gives an
// array of 8 rows; the row count is this design's reading of the 3-bit
// address, the other two numbers are the design's published sizes.
// Delay constants are in picoseconds and are this design's own choice: they
// only have to keep the five pulses of one clock cycle apart and inside the
// high phase of the clock.
`timescale 1ps / 1ps
package sram_pl_pkg;
  localparam int unsigned WIDTH    = 256;  // word and shift register length
  localparam int unsigned SUB_BITS = 4;    // data latches per sub shift register
  localparam int unsigned ADDR_W   = 3;    // row address width
  localparam int unsigned DEPTH    = 1 << ADDR_W;

  // Clock-pulse circuit timing (ps)
  localparam int unsigned T_DELAY_PS = 200;  // delay element
  localparam int unsigned T_INV_PS   = 50;   // one inverter
  localparam int unsigned T_BUF_PS   = 100;  // clock buffer

  // What the memory does in a cycle, decoded from en and load
  typedef enum logic [1:0] {
    OP_IDLE  = 2'd0,
    OP_READ  = 2'd1,
    OP_WRITE = 2'd2
  } mem_op_e;
endpackage
