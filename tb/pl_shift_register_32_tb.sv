// pl_shift_register_32_tb: the 32-bit configuration of the pulsed-latch
// shift register (8 sub shift registers), run as a fill test.
//
// After reset the serial input is held at 1. A 1 reaches temporary latch
// T(g+1) at rising edge 4(g+1)+1 after the first edge that samples it, so
// T1..T8 must go high one after another, four clock cycles apart, and Q1..Q32
// must fill from Q1 upward, one latch per cycle. The bench checks the whole
// register after every edge and records the edge at which each T rose.
`timescale 1ps / 1ps
module pl_shift_register_32_tb;
  localparam int W = 32;
  localparam int SB = 4;
  localparam int M = W / SB;
  localparam int PERIOD = 10_000;
  logic clk = 0, rst, din;
  logic [W-1:0] q;
  logic [M-1:0] t, t_prev;
  int rise_edge [M];
  int checks = 0, failures = 0;

  pl_shift_register #(.WIDTH(W), .SUB_BITS(SB)) dut (
    .clk(clk), .rst(rst), .din(din), .q(q), .t(t)
  );

  always #(PERIOD/2) clk = ~clk;

  initial begin
    #(PERIOD * 500);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_q;
    rst = 1; din = 0; t_prev = '0;
    foreach (rise_edge[g]) rise_edge[g] = -1;
    @(negedge clk); @(negedge clk);
    rst = 0; din = 1;
    for (int e = 1; e <= W + 8; e++) begin
      @(posedge clk);
      #3000;
      // After e edges the first e latches hold 1
      exp_q = (e >= W) ? '1 : W'((64'd1 << e) - 1);
      checks++;
      if (q !== exp_q) begin
        failures++;
        if (failures < 10) $display("edge %0d: q=%h expected %h", e, q, exp_q);
      end
      for (int g = 0; g < M; g++) begin
        if (t[g] && !t_prev[g]) rise_edge[g] = e;
        checks++;
        if (t[g] !== (e >= SB * (g + 1) + 1)) begin
          failures++;
          if (failures < 10) $display("edge %0d: T%0d=%b", e, g + 1, t[g]);
        end
      end
      t_prev = t;
    end
    for (int g = 0; g < M; g++) begin
      checks++;
      if (rise_edge[g] != SB * (g + 1) + 1) begin
        failures++;
        $display("T%0d rose at edge %0d, expected %0d", g + 1, rise_edge[g], SB * (g + 1) + 1);
      end
    end
    $display("T1..T%0d rose at edges %0d..%0d, %0d cycles apart", M, rise_edge[0], rise_edge[M-1],
             rise_edge[1] - rise_edge[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
