// clock_pulse_circuit: behavioural model of one stage of the delayed pulsed
// clock generator. Not synthesizable: its function is made of delays.
//
// The incoming clock goes through a delay element and an inverter; the AND of
// the clock and this delayed, inverted copy is high for T_DELAY_PS+T_INV_PS
// after each rising edge of clk_in, which is the pulse. A second inverter
// restores the delayed clock and passes it on as clk_out (CLK<n>), so the
// next stage starts its pulse T_INV_PS after this pulse has ended: pulses of
// consecutive stages never overlap. The structure follows the published
// schematic; the delay values are this design's own.
//
// Timing: pulse rises with clk_in and lasts T_DELAY_PS+T_INV_PS; clk_out
// is clk_in delayed by T_DELAY_PS+2*T_INV_PS. Falling edges make no pulse.
`timescale 1ps / 1ps
module clock_pulse_circuit #(
  parameter int unsigned T_DELAY_PS = sram_pl_pkg::T_DELAY_PS,
  parameter int unsigned T_INV_PS   = sram_pl_pkg::T_INV_PS
) (
  input  logic clk_in,
  output logic pulse,
  output logic clk_out
);
  logic delayed_n;  // clock after the delay element and the first inverter

  assign #(T_DELAY_PS + T_INV_PS) delayed_n = ~clk_in;
  assign #(T_INV_PS)              clk_out   = ~delayed_n;
  assign                          pulse     = clk_in & delayed_n;
endmodule
