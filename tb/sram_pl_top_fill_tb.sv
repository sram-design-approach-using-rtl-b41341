// sram_pl_top_fill_tb: the 256-bit SRAM configuration run as a directed
// sequence: reset, enable held high, serial input at 1 after reset,
// address 2, load low and then high.
//
// Right after reset the shift register is all zero, so a first write puts
// zeros in row 2; the 256 reads of row 2 that follow, while ones are being
// shifted in, must return zero. After those 256 shifts a write stores all
// ones into row 2 and a read returns all ones. A second pass writes a word
// with a single 1 at bit 31*r+5 into each row r (the 1 is shifted in
// 31*r+5 edges before the write edge) and reads all 8 rows back.
`timescale 1ps / 1ps
module sram_pl_top_fill_tb;
  localparam int W = 256;
  localparam int PERIOD = 10_000;
  logic clk = 0, rst, in, en, load;
  logic [2:0] addr;
  logic [W-1:0] dout;
  int checks = 0, failures = 0;

  sram_pl_top dut (
    .clk(clk), .rst(rst), .in(in), .en(en), .load(load), .addr(addr), .dout(dout)
  );

  always #(PERIOD/2) clk = ~clk;

  initial begin
    #(PERIOD * 20000);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic s_in, input logic s_en, input logic s_load, input int s_addr);
    @(negedge clk);
    in = s_in; en = s_en; load = s_load; addr = 3'(s_addr);
    @(posedge clk);
    #3000;
  endtask

  task automatic expect_dout(input logic [W-1:0] v, input string what);
    checks++;
    if (dout !== v) begin
      failures++;
      if (failures < 10) $display("%0t: %s: dout=%h", $time, what, dout);
    end
  endtask

  initial begin
    rst = 1; in = 0; en = 1; load = 0; addr = 3'd2;
    repeat (5) @(posedge clk);
    #3000;
    expect_dout('0, "in reset");
    @(negedge clk);
    rst = 0;
    // Write the all-zero reset word into row 2, then shift 256 ones while
    // reading row 2
    step(1'b1, 1'b1, 1'b1, 2);
    for (int n = 0; n < W; n++) begin
      step(1'b1, 1'b1, 1'b0, 2);
      expect_dout('0, "row 2 before writing ones");
    end
    step(1'b1, 1'b1, 1'b1, 2);          // write: row 2 <= all ones
    step(1'b1, 1'b1, 1'b0, 2);          // read row 2
    expect_dout('1, "row 2 after writing ones");

    // Walking single bit: row r gets a word whose only 1 is bit 31*r+5
    for (int r = 0; r < 8; r++) begin
      automatic int k = 31 * r + 5;
      for (int n = W - 1; n >= 0; n--) step(1'(n == k), 1'b0, 1'b0, 0);
      step(1'b0, 1'b1, 1'b1, r);
    end
    for (int r = 0; r < 8; r++) begin
      logic [W-1:0] v;
      v = '0; v[31 * r + 5] = 1'b1;
      step(1'b0, 1'b1, 1'b0, r);
      expect_dout(v, "walking bit row");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
