// sram_array_tb: writes and reads the 8 x 256 cell array through its word
// lines and bit-line pairs and checks against a reference memory.
//
// Writes put complementary data on BL/~BL and raise one word line; some
// writes leave a random set of columns undriven (both lines high), which
// must keep their old contents. Reads raise one word line with the write
// drivers off and expect BL = row, ~BL = ~row; with no word line both lines
// must stay high. A write with we low must change nothing.
`timescale 1ps / 1ps
module sram_array_tb;
  localparam int W = 256;
  localparam int D = 8;
  localparam int PERIOD = 10_000;
  logic clk = 0;
  logic [D-1:0] wl;
  logic we;
  logic [W-1:0] bl, blb, rbl, rblb;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;
  int n_partial = 0, n_blocked = 0;

  sram_array #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .wl(wl), .we(we), .bl(bl), .blb(blb), .rbl(rbl), .rblb(rblb)
  );

  always #(PERIOD/2) clk = ~clk;

  initial begin
    #(PERIOD * 5000);
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

  task automatic write_row(input int r, input logic [W-1:0] data, input logic [W-1:0] drive,
                           input logic enable);
    @(negedge clk);
    wl = '0; wl[r] = 1'b1; we = enable;
    bl  = data | ~drive;
    blb = ~data | ~drive;
    @(posedge clk);
    if (enable) ref_mem[r] = (ref_mem[r] & ~drive) | (data & drive);
  endtask

  task automatic read_row(input int r);
    @(negedge clk);
    wl = '0; wl[r] = 1'b1; we = 1'b0; bl = '1; blb = '1;
    #100;
    checks++;
    if (rbl !== ref_mem[r] || rblb !== ~ref_mem[r]) begin
      failures++;
      if (failures < 10) $display("%0t: read row %0d mismatch", $time, r);
    end
  endtask

  initial begin
    wl = '0; we = 0; bl = '1; blb = '1;
    for (int r = 0; r < D; r++) write_row(r, rand_word(), '1, 1'b1);
    for (int r = 0; r < D; r++) read_row(r);
    for (int n = 0; n < 400; n++) begin
      automatic int r = $urandom_range(0, D - 1);
      case ($urandom_range(0, 3))
        0: write_row(r, rand_word(), '1, 1'b1);
        1: begin write_row(r, rand_word(), rand_word(), 1'b1); n_partial++; end
        2: begin write_row(r, rand_word(), '1, 1'b0); n_blocked++; end
        default: read_row(r);
      endcase
    end
    for (int r = 0; r < D; r++) read_row(r);
    // No word line: both lines stay precharged
    @(negedge clk);
    wl = '0; we = 0; bl = '1; blb = '1;
    #100;
    checks++;
    if (rbl !== '1 || rblb !== '1) failures++;
    checks++;
    if (n_partial == 0 || n_blocked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
