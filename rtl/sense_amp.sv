// sense_amp: digital model of the column sense amplifiers and output
// register.
//
// For each column it compares BL with ~BL: the line still high is the one
// joined to the cell node holding 1, so a pair (1,0) reads as 1 and (0,1)
// as 0. With sae high the sensed word is captured into dout on the rising
// clk edge. A column whose pair is not differential (both precharged, or
// both pulled low by two cells that disagree) keeps its previous output
// bit. Reading through the bit-line difference follows the published read
// operation; the output register, its reset and the hold on a
// non-differential pair are this design's choices.
//
// Timing: dout is valid one clock edge after the read.
`timescale 1ps / 1ps
module sense_amp #(
  parameter int unsigned WIDTH = sram_pl_pkg::WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sae,
  input  logic [WIDTH-1:0] rbl,
  input  logic [WIDTH-1:0] rblb,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] valid;
  assign valid = rbl ^ rblb;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)      dout <= '0;
    else if (sae) dout <= (dout & ~valid) | (rbl & valid);
  end
endmodule
