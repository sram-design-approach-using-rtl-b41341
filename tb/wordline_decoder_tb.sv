// wordline_decoder_tb: exhaustive check of the word-line decoder: with en
// high exactly word line addr is high, with en low none is.
`timescale 1ps / 1ps
module wordline_decoder_tb;
  localparam int AW = 3;
  logic          en;
  logic [AW-1:0] addr;
  logic [7:0]    wl;
  int checks = 0, failures = 0;

  wordline_decoder #(.ADDR_W(AW)) dut (.en(en), .addr(addr), .wl(wl));

  initial begin
    #1_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < 8; a++) begin
        logic [7:0] exp_wl;
        en = 1'(e); addr = AW'(a);
        exp_wl = 8'b0;
        if (e == 1) exp_wl[a] = 1'b1;
        #10;
        checks++;
        if (wl !== exp_wl) begin
          failures++;
          $display("en=%0d addr=%0d: wl=%b expected %b", e, a, wl, exp_wl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
