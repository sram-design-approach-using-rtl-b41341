// clock_pulse_circuit_tb: measures the pulse and the delayed clock of one
// clock-pulse circuit with its default delays (200 ps delay, 50 ps
// inverters). Expected: a pulse from each rising clk_in edge lasting 250 ps,
// no pulse on falling edges, clk_out equal to clk_in delayed by 300 ps.
`timescale 1ps / 1ps
module clock_pulse_circuit_tb;
  localparam int PERIOD = 10_000;
  localparam int WIDTH_PS = 250;  // delay + one inverter
  localparam int SHIFT_PS = 300;  // delay + two inverters
  logic clk_in, pulse, clk_out;
  int checks = 0, failures = 0;
  int n_rise = 0, n_pulse = 0;
  time t_rise;

  clock_pulse_circuit dut (.clk_in(clk_in), .pulse(pulse), .clk_out(clk_out));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%0t: %s = %b, expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    #2_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pulse count and width measurement
  always @(posedge pulse) begin n_pulse++; t_rise = $time; end
  always @(negedge pulse) if (n_pulse > 0) begin
    checks++;
    if ($time - t_rise != WIDTH_PS) begin
      failures++;
      $display("pulse width %0t, expected %0d", $time - t_rise, WIDTH_PS);
    end
  end

  initial begin
    clk_in = 0;
    #1000;
    for (int c = 0; c < 50; c++) begin
      clk_in = 1; n_rise++;
      #1;                 check(pulse, 1'b1, "pulse after rise");
      #(WIDTH_PS - 2);    check(pulse, 1'b1, "pulse before end");
      #2;                 check(pulse, 1'b0, "pulse after end");
      #(SHIFT_PS - WIDTH_PS - 2); check(clk_out, 1'b0, "clk_out before delay");
      #2;                 check(clk_out, 1'b1, "clk_out after delay");
      #(PERIOD/2 - SHIFT_PS - 1);
      clk_in = 0;
      for (int k = 0; k < 8; k++) begin
        #50; check(pulse, 1'b0, "pulse after falling edge");
      end
      check(clk_out, 1'b0, "clk_out low after delayed fall");
      #(PERIOD/2 - 400);
    end
    #1000;
    checks++;
    if (n_pulse != n_rise) begin
      failures++;
      $display("%0d pulses for %0d rising edges", n_pulse, n_rise);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
