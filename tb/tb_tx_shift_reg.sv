// tb_tx_shift_reg: self-checking test of the transmit shift register.
//
// Loads random bytes whenever the register asks for one, samples dout just
// before every bit strobe (as the PHY would), and checks that the serial
// stream reproduces the bytes LSB first with 'need' raised after eight strobes.
module tb_tx_shift_reg;
  logic clk = 0, rst_n = 0, clr = 0, load = 0, bit_en = 0;
  logic [7:0] din = 0;
  logic dout, busy, need;
  int checks = 0, failures = 0;

  tx_shift_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned b;
    logic [7:0] got;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    checks++; if (!need || busy) begin failures++; $display("FAIL: not empty after reset"); end
    for (int t = 0; t < 200; t++) begin
      b = 8'($urandom);
      din <= b; load <= 1; @(posedge clk); load <= 0; din <= 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        repeat (1 + $urandom % 3) @(posedge clk);
        checks++;
        if (need) begin failures++; $display("FAIL: need early at bit %0d", i); end
        got[i] = dout;
        bit_en <= 1; @(posedge clk); bit_en <= 0;
      end
      @(negedge clk);
      checks++;
      if (got != b || !need) begin failures++; $display("FAIL: got %h exp %h need %b", got, b, need); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
