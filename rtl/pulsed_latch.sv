// pulsed_latch: the storage element of the shift register.
//
// A level-sensitive D latch: q follows d while clk_pulse is high and holds
// when it is low. Driven by a short pulse instead of a clock phase, it stands
// in for a master-slave flip-flop at about half its size, which is the idea
// the whole shift register rests on. The asynchronous active-high reset is
// this design's addition; the latch itself follows the published schematic.
//
// Timing: transparent for the width of the pulse; the input must be stable
// while the pulse is high.
//
// This module is meant to infer a latch. Verilator reports "no latches
// detected" for an always_latch whose reset branch assigns a constant; the
// block is nonetheless a reset-able latch, and synthesis maps it to one.
`timescale 1ps / 1ps
module pulsed_latch (
  input  logic rst,
  input  logic clk_pulse,
  input  logic d,
  output logic q
);
  always_latch begin
    if (rst)            q = 1'b0;
    else if (clk_pulse) q = d;
  end
endmodule
