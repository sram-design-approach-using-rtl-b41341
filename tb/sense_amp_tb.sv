// sense_amp_tb: applies random bit-line pairs to the 256 column sense
// amplifiers and checks the registered output: columns with BL != ~BL take
// BL when sae is high at the clock edge, all other columns and all columns
// while sae is low hold, and reset clears the word.
`timescale 1ps / 1ps
module sense_amp_tb;
  localparam int W = 256;
  localparam int PERIOD = 10_000;
  logic clk = 0, rst, sae;
  logic [W-1:0] rbl, rblb, dout, exp_dout;
  int checks = 0, failures = 0;

  sense_amp #(.WIDTH(W)) dut (.clk(clk), .rst(rst), .sae(sae), .rbl(rbl), .rblb(rblb), .dout(dout));

  always #(PERIOD/2) clk = ~clk;

  initial begin
    #(PERIOD * 3000);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] w;
    for (int i = 0; i < W / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    logic [W-1:0] v, diff;
    rst = 1; sae = 0; rbl = '1; rblb = '1; exp_dout = '0;
    @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      v = rand_word();
      // Mostly proper differential pairs, sometimes a few equal pairs
      diff = ($urandom_range(0, 3) == 0) ? rand_word() | rand_word() : '1;
      rbl  = v;
      rblb = (~v & diff) | (v & ~diff);
      sae  = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (sae) exp_dout = (exp_dout & ~diff) | (v & diff);
      #100;
      checks++;
      if (dout !== exp_dout) begin
        failures++;
        if (failures < 10) $display("%0t: dout mismatch", $time);
      end
      if (n == 500) begin
        rst = 1; #100; rst = 0;
        exp_dout = '0;
        checks++;
        if (dout !== '0) failures++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
