// delayed_pulse_clock_gen: behavioural model of the delayed pulsed clock
// generator. Not synthesizable: it is a chain of delay-based pulse circuits.
//
// SUB_BITS+1 clock_pulse_circuit stages are chained, each taking the delayed
// clock of the one before. The first stage drives CLK_pulse<T>, the following
// ones CLK_pulse<SUB_BITS> down to CLK_pulse<1>, each through a clock buffer.
// After every rising edge of clk the pulses therefore come in the order
// T, 4, 3, 2, 1 (the reverse of the latch order in a sub shift register),
// one at a time and without overlap. That order and structure follow the
// published design; the buffer delay and the delay values are this design's.
//
// Timing with the default delays: pulse T starts T_BUF_PS after the rising
// clock edge, each pulse lasts 250 ps and the next starts 50 ps after it ends,
// so all five are over 1.55 ns after the edge. The clock high phase must be
// longer than that.
`timescale 1ps / 1ps
module delayed_pulse_clock_gen #(
  parameter int unsigned SUB_BITS   = sram_pl_pkg::SUB_BITS,
  parameter int unsigned T_DELAY_PS = sram_pl_pkg::T_DELAY_PS,
  parameter int unsigned T_INV_PS   = sram_pl_pkg::T_INV_PS,
  parameter int unsigned T_BUF_PS   = sram_pl_pkg::T_BUF_PS
) (
  input  logic                clk,
  output logic [SUB_BITS:1]   clk_pulse,    // CLK_pulse<1..SUB_BITS>
  output logic                clk_pulse_t   // CLK_pulse<T>
);
  // Stage 0 drives <T>, stage k (1..SUB_BITS) drives <SUB_BITS+1-k>.
  // clk_chain[0] = CLK, [k] = CLK<k>; the delayed clock out of the last
  // stage has no further stage to drive and is left unused.
  logic [SUB_BITS+1:0] clk_chain;
  logic [SUB_BITS:0]   raw_pulse;

  assign clk_chain[0] = clk;

  for (genvar k = 0; k <= SUB_BITS; k++) begin : g_stage
    clock_pulse_circuit #(
      .T_DELAY_PS(T_DELAY_PS),
      .T_INV_PS  (T_INV_PS)
    ) u_cpc (
      .clk_in (clk_chain[k]),
      .pulse  (raw_pulse[k]),
      .clk_out(clk_chain[k+1])
    );
  end

  // Clock buffers
  assign #(T_BUF_PS) clk_pulse_t = raw_pulse[0];
  for (genvar k = 1; k <= SUB_BITS; k++) begin : g_buf
    logic buffered;
    assign #(T_BUF_PS) buffered = raw_pulse[k];
    assign clk_pulse[SUB_BITS+1-k] = buffered;
  end
endmodule
