// pl_shift_register: WIDTH-bit serial-in, parallel-out shift register built
// from pulsed latches (256 bits by default).
//
// The register is split into M = WIDTH/SUB_BITS sub shift registers (64 of
// 4 bits by default). All of them share the five pulsed clocks of one
// delayed_pulse_clock_gen. The first group takes din; each following group
// takes the temporary latch t of the group before it. Because every group
// updates its temporary latch first and its first data latch last, the bit
// leaving one group is safe in t when the next group's first latch opens.
// Only five pulsed clocks are needed whatever WIDTH is, at the cost of one
// extra latch per group. Structure and sizes follow the published design;
// the reset is this design's.
//
// Interface and timing: on every rising clk edge the register shifts by one.
// After edge n, q[i] (Q(i+1)) holds din as sampled at edge n-i, and t[g]
// holds q[SUB_BITS*(g+1)-1] of the previous cycle, i.e. the same bit as
// q[SUB_BITS*(g+1)] now. The outputs settle within about 1.6 ns of the edge
// (see delayed_pulse_clock_gen); din must stay stable until then.
`timescale 1ps / 1ps
module pl_shift_register #(
  parameter int unsigned WIDTH    = sram_pl_pkg::WIDTH,
  parameter int unsigned SUB_BITS = sram_pl_pkg::SUB_BITS
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         din,
  output logic [WIDTH-1:0]             q,   // q[0] = Q1, newest bit
  output logic [WIDTH/SUB_BITS-1:0]    t    // temporary latches T1..TM
);
  localparam int unsigned M = WIDTH / SUB_BITS;

  logic [SUB_BITS:1] clk_pulse;
  logic              clk_pulse_t;

  delayed_pulse_clock_gen #(.SUB_BITS(SUB_BITS)) u_pclk (
    .clk        (clk),
    .clk_pulse  (clk_pulse),
    .clk_pulse_t(clk_pulse_t)
  );

  logic [M-1:0] link;  // link[0] = din, link[g+1] = T of group g
  assign link = {t[M-2:0], din};

  for (genvar g = 0; g < M; g++) begin : g_sub
    sub_shift_register #(.SUB_BITS(SUB_BITS)) u_sub (
      .rst        (rst),
      .clk_pulse  (clk_pulse),
      .clk_pulse_t(clk_pulse_t),
      .din        (link[g]),
      .q          (q[g*SUB_BITS +: SUB_BITS]),
      .t          (t[g])
    );
  end

  initial assert (WIDTH % SUB_BITS == 0 && M >= 2)
    else $error("WIDTH must be a multiple of SUB_BITS, with at least two groups");
endmodule
