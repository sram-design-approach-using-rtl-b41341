// pulsed_latch_tb: checks the pulsed latch against a reference latch model.
//
// Random reset, pulse and data levels are applied every 100 ps; after each
// change the output must equal the model: 0 in reset, d while the pulse is
// high, the last captured value otherwise. A watchdog ends the run.
`timescale 1ps / 1ps
module pulsed_latch_tb;
  logic rst, clk_pulse, d, q;
  int checks = 0, failures = 0;
  logic exp_q;
  int n_open = 0, n_hold = 0;

  pulsed_latch dut (.rst(rst), .clk_pulse(clk_pulse), .d(d), .q(q));

  initial begin
    #1_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clk_pulse = 0; d = 0; exp_q = 0;
    #100;
    for (int i = 0; i < 2000; i++) begin
      rst       = ($urandom_range(0, 19) == 0);
      clk_pulse = ($urandom_range(0, 3) == 0);
      d         = 1'($urandom);
      if (rst) exp_q = 0;
      else if (clk_pulse) begin exp_q = d; n_open++; end
      else n_hold++;
      #50;
      checks++;
      if (q !== exp_q) begin
        failures++;
        if (failures < 10) $display("step %0d: rst=%b pulse=%b d=%b q=%b expected %b",
                                    i, rst, clk_pulse, d, q, exp_q);
      end
      // Data changing while the pulse is low must not reach q
      if (!rst && !clk_pulse) begin
        d = ~d;
        #10;
        checks++;
        if (q !== exp_q) failures++;
      end
      #40;
    end
    if (n_open == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
