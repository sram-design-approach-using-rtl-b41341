// sub_shift_register: one SUB_BITS-bit group of the pulsed-latch shift
// register (4 bits by default).
//
// SUB_BITS data latches in series plus one temporary storage latch. Data
// latch i (1..SUB_BITS) is clocked by CLK_pulse<i>, the temporary latch by
// CLK_pulse<T>. The pulses arrive in the order T, SUB_BITS, ..., 1, so every
// latch is written only after the latch it feeds has already captured the
// old value: t takes q[SUB_BITS-1], then q[SUB_BITS-1] takes q[SUB_BITS-2],
// and so on until q[0] takes din. Each latch's input is therefore constant
// while its pulse is high, which is what a chain of pulsed latches sharing
// one pulse cannot guarantee. The temporary latch keeps the outgoing bit for
// the first latch of the next group, which is written by CLK_pulse<1> at the
// very end. This is the published structure; the reset is this design's.
//
// Interface: din is the serial input (IN, or the previous group's t);
// q[0] is the first latch. One shift per set of five pulses. SUB_BITS must
// be at least 2. An assertion checks the rule the scheme depends on: no two
// of the pulses are ever high at the same time outside reset (in reset
// the latches are held anyway, and the delay chain may still be settling).
`timescale 1ps / 1ps
module sub_shift_register #(
  parameter int unsigned SUB_BITS = sram_pl_pkg::SUB_BITS
) (
  input  logic                rst,
  input  logic [SUB_BITS:1]   clk_pulse,    // CLK_pulse<1..SUB_BITS>
  input  logic                clk_pulse_t,  // CLK_pulse<T>
  input  logic                din,
  output logic [SUB_BITS-1:0] q,
  output logic                t
);
  logic [SUB_BITS-1:0] chain_in;  // input of each data latch
  assign chain_in = {q[SUB_BITS-2:0], din};

  for (genvar i = 0; i < SUB_BITS; i++) begin : g_latch
    pulsed_latch u_lat (
      .rst      (rst),
      .clk_pulse(clk_pulse[i+1]),
      .d        (chain_in[i]),
      .q        (q[i])
    );
  end

  pulsed_latch u_tmp (
    .rst      (rst),
    .clk_pulse(clk_pulse_t),
    .d        (q[SUB_BITS-1]),
    .q        (t)
  );

  always_comb assert (rst || $onehot0({clk_pulse, clk_pulse_t}))
    else $error("overlapping pulsed clocks %b", {clk_pulse, clk_pulse_t});
endmodule
