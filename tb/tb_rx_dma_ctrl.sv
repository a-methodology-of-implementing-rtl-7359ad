// tb_rx_dma_ctrl: self-checking test of the receive DMA control machine.
//
// Checks that a Start of Frame with DMA disabled does nothing, that with DMA
// enabled the engine is started once and kept running, and that done pulses
// only after the end of the frame, an empty FIFO and an idle engine.
module tb_rx_dma_ctrl;
  logic clk = 0, rst_n = 0, dma_en = 0, sof = 0, rx_done = 0, fifo_empty = 1, eng_idle = 1;
  logic eng_start, eng_run, busy, done;
  int checks = 0, failures = 0, nstart = 0, ndone = 0;

  rx_dma_ctrl dut (.*);
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
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    sof = 1; @(negedge clk); sof = 0;
    check(nstart == 0 && !eng_run, "disabled");
    dma_en = 1;
    for (int t = 0; t < 5; t++) begin
      sof = 1; @(negedge clk); sof = 0;
      check(nstart == t + 1 && eng_run, "started");
      sof = 1; @(negedge clk); sof = 0;          // a stray start while running
      check(nstart == t + 1, "single start");
      fifo_empty = 0; eng_idle = 0;
      repeat (5) @(negedge clk);
      rx_done = 1; @(negedge clk); rx_done = 0;
      repeat (3) @(negedge clk);
      check(ndone == t && eng_run, "waits for drain");
      fifo_empty = 1; repeat (2) @(negedge clk);
      check(ndone == t, "waits for engine idle");
      eng_idle = 1; repeat (2) @(negedge clk);
      check(ndone == t + 1 && !eng_run && !busy, "done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
