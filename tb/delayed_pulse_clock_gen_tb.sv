// delayed_pulse_clock_gen_tb: checks the five pulsed clocks of the generator
// with its default delays.
//
// For each rising clock edge at time t0 the expected pulses are, from the
// structure of the chain (buffer 100 ps, stage step 300 ps, width 250 ps):
//   CLK_pulse<T> [t0+100, t0+350), <4> [t0+400, t0+650), <3> [t0+700, ...),
//   <2> [t0+1000, ...), <1> [t0+1300, t0+1550).
// The bench samples all five every 10 ps against that table, checks that
// never two are high together, and counts one pulse per output per cycle.
`timescale 1ps / 1ps
module delayed_pulse_clock_gen_tb;
  localparam int PERIOD = 10_000;
  localparam int NCYC   = 40;
  logic       clk;
  logic [4:1] clk_pulse;
  logic       clk_pulse_t;
  int checks = 0, failures = 0;
  int n_pulses [5];
  time t0;

  delayed_pulse_clock_gen dut (.clk(clk), .clk_pulse(clk_pulse), .clk_pulse_t(clk_pulse_t));

  initial begin
    #5_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // idx 0 = T, idx k = CLK_pulse<5-k>
  function automatic logic expected(input int idx, input time rel);
    time start = 100 + 300 * idx;
    return (rel >= start) && (rel < start + 250);
  endfunction

  always @(posedge clk_pulse_t)  n_pulses[0]++;
  always @(posedge clk_pulse[4]) n_pulses[1]++;
  always @(posedge clk_pulse[3]) n_pulses[2]++;
  always @(posedge clk_pulse[2]) n_pulses[3]++;
  always @(posedge clk_pulse[1]) n_pulses[4]++;

  initial begin
    logic [4:0] seen;
    clk = 0;
    foreach (n_pulses[i]) n_pulses[i] = 0;
    #2000;
    for (int c = 0; c < NCYC; c++) begin
      clk = 1; t0 = $time;
      for (int s = 0; s < PERIOD / 10; s++) begin
        if (s == PERIOD / 20) clk = 0;
        #5;
        seen = {clk_pulse_t, clk_pulse[4], clk_pulse[3], clk_pulse[2], clk_pulse[1]};
        for (int idx = 0; idx < 5; idx++) begin
          checks++;
          if (seen[4-idx] !== expected(idx, $time - t0)) begin
            failures++;
            if (failures < 10) $display("%0t (t0+%0t): pulse %0d = %b", $time, $time - t0, idx, seen[4-idx]);
          end
        end
        checks++;
        if (!$onehot0(seen)) begin
          failures++;
          if (failures < 10) $display("%0t: overlapping pulses %b", $time, seen);
        end
        #5;
      end
    end
    foreach (n_pulses[i]) begin
      checks++;
      if (n_pulses[i] != NCYC) begin
        failures++;
        $display("output %0d pulsed %0d times in %0d cycles", i, n_pulses[i], NCYC);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
