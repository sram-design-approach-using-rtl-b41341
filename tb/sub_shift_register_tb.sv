// sub_shift_register_tb: drives one 4-bit sub shift register with its five
// pulsed clocks generated by the bench in the order T, 4, 3, 2, 1 (200 ps
// pulses, 100 ps apart) and compares the four data latches and the
// temporary latch with a reference model after every shift:
//   t <= q[3]; q[3] <= q[2]; q[2] <= q[1]; q[1] <= q[0]; q[0] <= din.
// Reset in the middle of the run must clear all five latches.
`timescale 1ps / 1ps
module sub_shift_register_tb;
  localparam int SB = 4;
  logic          rst;
  logic [SB:1]   clk_pulse;
  logic          clk_pulse_t;
  logic          din;
  logic [SB-1:0] q;
  logic          t;
  logic [SB-1:0] exp_q;
  logic          exp_t;
  int checks = 0, failures = 0;

  sub_shift_register #(.SUB_BITS(SB)) dut (
    .rst(rst), .clk_pulse(clk_pulse), .clk_pulse_t(clk_pulse_t),
    .din(din), .q(q), .t(t)
  );

  initial begin
    #10_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_t();
    clk_pulse_t = 1; #200; clk_pulse_t = 0; #100;
  endtask
  task automatic pulse_n(input int i);
    clk_pulse[i] = 1; #200; clk_pulse[i] = 0; #100;
  endtask

  task automatic shift(input logic bit_in);
    din = bit_in;
    #100;
    pulse_t();
    for (int i = SB; i >= 1; i--) pulse_n(i);
    exp_t = exp_q[SB-1];
    exp_q = {exp_q[SB-2:0], bit_in};
    checks++;
    if (q !== exp_q || t !== exp_t) begin
      failures++;
      if (failures < 10) $display("%0t: q=%b t=%b expected q=%b t=%b", $time, q, t, exp_q, exp_t);
    end
  endtask

  initial begin
    rst = 1; clk_pulse = '0; clk_pulse_t = 0; din = 0;
    exp_q = '0; exp_t = 0;
    #500;
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      shift(1'($urandom));
      if (n == 250) begin
        rst = 1; #100; rst = 0;
        exp_q = '0; exp_t = 0;
        checks++;
        if (q !== '0 || t !== 1'b0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
