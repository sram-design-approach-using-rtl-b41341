// wordline_decoder: row address to word lines.
//
// Raises exactly one of the 2**ADDR_W word lines, the one numbered addr,
// while en is high, and none while it is low. A word line selects every cell
// of one row for a read or a write. The published design names the word line
// and the 3-bit address; the decoder itself is the simplest circuit that
// connects the two. Purely combinational.
`timescale 1ps / 1ps
module wordline_decoder #(
  parameter int unsigned ADDR_W = sram_pl_pkg::ADDR_W
) (
  input  logic                 en,
  input  logic [ADDR_W-1:0]    addr,
  output logic [2**ADDR_W-1:0] wl
);
  always_comb begin
    wl = '0;
    if (en) wl[addr] = 1'b1;
  end

  always_comb assert (!en || $onehot(wl))
    else $error("word line decode is not one-hot");
endmodule
