// sram_pl_top_tb: end-to-end test of the pulsed-latch SRAM at its full
// size (256-bit word, 8 rows, default delays), on a 10 ns clock.
//
// Inputs change at falling clock edges. The bench keeps its own history of
// the serial input (the expected shift register word) and its own copy of
// the memory, and after each rising edge predicts dout:
//   write (en=1, load=1): row addr := history word before this edge
//   read  (en=1, load=0): dout := row addr, visible 3 ns after the edge
//   idle  (en=0):         nothing written, dout holds
// It also checks that dout does not change before the read edge (one-cycle
// read latency), that an idle cycle with load high writes nothing, and that
// reset clears dout and the shift register but not the rows. Every
// mechanism is counted and must occur at least once.
`timescale 1ps / 1ps
module sram_pl_top_tb;
  localparam int W = 256;
  localparam int AW = 3;
  localparam int D = 1 << AW;
  localparam int PERIOD = 10_000;
  localparam int NOPS = 3000;

  logic clk = 0, rst, in, en, load;
  logic [AW-1:0] addr;
  logic [W-1:0]  dout;

  logic [W-1:0] hist, exp_dout;
  logic [W-1:0] ref_mem [D];
  logic [D-1:0] written;
  int checks = 0, failures = 0;
  int n_write = 0, n_read = 0, n_idle = 0, n_idle_load = 0, n_reset = 0;
  int n_rd_after_wr = 0, n_full_pass = 0, shifts_since_reset = 0;

  sram_pl_top dut (
    .clk(clk), .rst(rst), .in(in), .en(en), .load(load), .addr(addr), .dout(dout)
  );

  always #(PERIOD/2) clk = ~clk;

  initial begin
    #(PERIOD * (NOPS + 1000));
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_dout(input string what);
    checks++;
    if (dout !== exp_dout) begin
      failures++;
      if (failures < 10) $display("%0t: %s: dout mismatch (addr %0d)", $time, what, addr);
    end
  endtask

  // One clock cycle with the given controls, then the predicted result
  task automatic cycle(input logic c_en, input logic c_load, input int c_addr);
    logic prev_wr;
    @(negedge clk);
    en = c_en; load = c_load; addr = AW'(c_addr); in = 1'($urandom);
    #(PERIOD/2 - 100);
    check_dout("before edge");            // nothing moves before the edge
    @(posedge clk);
    if (en && load) begin
      ref_mem[addr] = hist;
      written[addr] = 1'b1;
      n_write++;
    end else if (en) begin
      exp_dout = ref_mem[addr];
      n_read++;
    end else begin
      n_idle++;
      if (load) n_idle_load++;
    end
    hist = {hist[W-2:0], in};
    shifts_since_reset++;
    if (shifts_since_reset == W) n_full_pass++;
    #3000;
    check_dout("after edge");
  endtask

  initial begin
    int last_wr_row = -1;
    rst = 1; in = 0; en = 0; load = 0; addr = '0;
    hist = '0; exp_dout = '0; written = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    #100;
    check_dout("after reset");

    // Fill the register once, then write every row with fresh data
    for (int n = 0; n < W; n++) cycle(1'b0, 1'($urandom), 0);
    for (int r = 0; r < D; r++) begin
      for (int n = 0; n < 20; n++) cycle(1'b0, 1'b0, 0);
      cycle(1'b1, 1'b1, r);
    end
    for (int r = 0; r < D; r++) cycle(1'b1, 1'b0, r);

    for (int n = 0; n < NOPS; n++) begin
      automatic int kind = $urandom_range(0, 9);
      automatic int r = $urandom_range(0, D - 1);
      if (n == NOPS / 2) begin
        // Reset: dout and shift register clear, rows keep their data
        @(negedge clk);
        rst = 1; en = 0; load = 0;
        #100;
        rst = 0;
        hist = '0; exp_dout = '0; shifts_since_reset = 0;
        n_reset++;
        check_dout("reset");
      end
      if (kind < 2) begin
        cycle(1'b1, 1'b1, r);
        last_wr_row = r;
      end else if (kind < 6) begin
        if (r == last_wr_row) n_rd_after_wr++;
        cycle(1'b1, 1'b0, r);
        last_wr_row = -1;
      end else begin
        cycle(1'b0, 1'($urandom), r);
      end
    end
    for (int r = 0; r < D; r++) cycle(1'b1, 1'b0, r);

    checks++; if (written != '1)     begin failures++; $display("not every row written"); end
    checks++; if (n_write == 0)       begin failures++; $display("no write"); end
    checks++; if (n_read == 0)        begin failures++; $display("no read"); end
    checks++; if (n_idle == 0)        begin failures++; $display("no idle cycle"); end
    checks++; if (n_idle_load == 0)   begin failures++; $display("no idle cycle with load"); end
    checks++; if (n_reset == 0)       begin failures++; $display("no reset"); end
    checks++; if (n_rd_after_wr == 0) begin failures++; $display("no read right after write"); end
    checks++; if (n_full_pass == 0)   begin failures++; $display("no full register pass"); end
    $display("writes=%0d reads=%0d idle=%0d idle_with_load=%0d resets=%0d read_after_write=%0d full_passes=%0d",
             n_write, n_read, n_idle, n_idle_load, n_reset, n_rd_after_wr, n_full_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
