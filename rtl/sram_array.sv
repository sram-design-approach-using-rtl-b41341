// sram_array: DEPTH rows of WIDTH static memory cells, seen at the level of
// word lines and bit-line pairs.
//
// Each cell is a 6-transistor cell: two cross-coupled inverters holding the
// bit, and two pass transistors that join its two nodes to BL and ~BL while
// the row's word line is high. This model keeps that behaviour and drops
// the transistors:
//  * Write: with we high, the write drivers hold BL = data and ~BL = ~data;
//    on the rising clk edge every row whose word line is high takes that
//    data. A column whose pair is not complementary (both high: precharged,
//    not driven) is left unchanged.
//  * Read: bit lines are precharged high. A selected cell holding 0
//    discharges BL, one holding 1 discharges ~BL. rbl and rblb are the
//    levels of the two lines, combinational in wl and the stored data;
//    with no word line high both stay at 1.
// The clocked write is this design's choice, standing in for the
// word-line pulse of a real macro. Cells are not reset, as in a real SRAM.
`timescale 1ps / 1ps
module sram_array #(
  parameter int unsigned WIDTH = sram_pl_pkg::WIDTH,
  parameter int unsigned DEPTH = sram_pl_pkg::DEPTH
) (
  input  logic             clk,
  input  logic [DEPTH-1:0] wl,
  input  logic             we,
  input  logic [WIDTH-1:0] bl,
  input  logic [WIDTH-1:0] blb,
  output logic [WIDTH-1:0] rbl,
  output logic [WIDTH-1:0] rblb
);
  logic [WIDTH-1:0] mem [DEPTH];

  // Columns actually driven: BL and ~BL complementary
  logic [WIDTH-1:0] driven;
  assign driven = bl ^ blb;

  always_ff @(posedge clk) begin
    if (we) begin
      for (int r = 0; r < DEPTH; r++) begin
        if (wl[r]) mem[r] <= (mem[r] & ~driven) | (bl & driven);
      end
    end
  end

  // Wired discharge of the precharged bit lines by the selected cells
  always_comb begin
    rbl  = '1;
    rblb = '1;
    for (int r = 0; r < DEPTH; r++) begin
      if (wl[r]) begin
        rbl  &= mem[r];
        rblb &= ~mem[r];
      end
    end
  end
endmodule
