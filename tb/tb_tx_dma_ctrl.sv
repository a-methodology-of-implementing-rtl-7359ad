// tb_tx_dma_ctrl: self-checking test of the transmit DMA control machine.
//
// Issues go commands with random address/length, checks that the engine gets
// one start pulse with the latched values, that a second command while busy
// is ignored, and that done follows the engine's done.
module tb_tx_dma_ctrl;
  logic clk = 0, rst_n = 0, go = 0, eng_done = 0;
  logic [31:0] addr = 0, eng_addr;
  logic [15:0] len = 0, eng_len;
  logic eng_start, busy, done;
  int checks = 0, failures = 0, nstart = 0, ndone = 0;

  tx_dma_ctrl #(.AW(32)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin nstart += int'(eng_start); ndone += int'(done); end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    logic [31:0] a; logic [15:0] l;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 10; t++) begin
      a = $urandom; l = 16'($urandom);
      addr = a; len = l; go = 1; @(negedge clk); go = 0;
      addr = $urandom; len = 16'($urandom);
      while (!eng_start) @(negedge clk);
      check(eng_addr == a && eng_len == l, "latched parameters");
      @(negedge clk);
      go = 1; @(negedge clk); go = 0;        // ignored while busy
      check(busy, "busy during transfer");
      repeat ($urandom % 10) @(negedge clk);
      eng_done = 1; @(negedge clk); eng_done = 0;
      @(negedge clk);
      check(!busy, "idle after done");
      check(nstart == t + 1 && ndone == t + 1, $sformatf("starts %0d dones %0d", nstart, ndone));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
