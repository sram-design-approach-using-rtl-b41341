// pl_shift_register_tb: runs the full 256-bit pulsed-latch shift register,
// with its own pulsed clock generator, on a 10 ns clock.
//
// Random serial data is applied at each falling edge. 3 ns after every
// rising edge (the pulses end 1.55 ns after the edge) all 256 latch outputs
// and all 64 temporary latches are compared with a reference 256-bit shift
// model: q[i] = din of i edges ago, t[g] = q[4g+4]'s value, i.e. the bit
// that entered 4g+4 edges ago. A reset in mid-run must clear everything.
// The run covers more than two full passes of the register.
`timescale 1ps / 1ps
module pl_shift_register_tb;
  localparam int W = 256;
  localparam int SB = 4;
  localparam int M = W / SB;
  localparam int PERIOD = 10_000;
  logic clk = 0, rst, din;
  logic [W-1:0] q;
  logic [M-1:0] t;
  logic [W:0]   hist;   // hist[0] = newest bit, hist[W] = the one before Q256
  int checks = 0, failures = 0;

  pl_shift_register dut (.clk(clk), .rst(rst), .din(din), .q(q), .t(t));

  always #(PERIOD/2) clk = ~clk;

  initial begin
    #(PERIOD * 2000);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (q !== hist[W-1:0]) begin
      failures++;
      if (failures < 10) $display("%0t: q mismatch, first differing bit %0d", $time,
                                  $clog2((q ^ hist[W-1:0]) & -(q ^ hist[W-1:0])));
    end
    for (int g = 0; g < M; g++) begin
      checks++;
      if (t[g] !== hist[SB*(g+1)]) begin
        failures++;
        if (failures < 10) $display("%0t: t[%0d]=%b expected %b", $time, g, t[g], hist[SB*(g+1)]);
      end
    end
  endtask

  initial begin
    rst = 1; din = 0; hist = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3 * W; n++) begin
      din = 1'($urandom);
      @(posedge clk);
      hist = {hist[W-1:0], din};
      #3000;
      compare();
      if (n == W + 20) begin
        @(negedge clk);
        rst = 1; #100;
        hist = '0;
        compare();
        rst = 0;
      end else begin
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
