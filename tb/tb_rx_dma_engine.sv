// tb_rx_dma_engine: self-checking test of the receive DMA engine.
//
// A FIFO model is filled with random bytes at random times; a memory model
// acknowledges writes after random delays. Checks that every byte lands at
// base+index in order, that nothing is written while run is low, the byte
// count, and restart at a new address.
module tb_rx_dma_engine;
  logic clk = 0, rst_n = 0, start = 0, run = 0, fifo_empty;
  logic [31:0] base_addr = 0, mem_addr;
  logic [7:0] fifo_rdata, mem_wdata;
  logic fifo_rd, mem_req, mem_ack = 0, idle;
  logic [15:0] count;
  int checks = 0, failures = 0;
  byte unsigned fq[$];
  byte unsigned mem[logic [31:0]];

  rx_dma_engine #(.AW(32)) dut (.*);
  always #5 clk = ~clk;

  assign fifo_empty = (fq.size() == 0);
  assign fifo_rdata = fifo_empty ? 8'h00 : fq[0];

  always @(negedge clk) mem_ack = mem_req && ($urandom % 3 == 0);
  always @(posedge clk) if (rst_n) begin
    if (mem_req && mem_ack) mem[mem_addr] = mem_wdata;
    if (fifo_rd) void'(fq.pop_front());
    if (mem_req && !run) begin checks++; failures++; $display("FAIL: request while stopped"); end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input logic [31:0] a, input int n);
    byte unsigned d[$];
    base_addr = a; start = 1; @(negedge clk); start = 0;
    for (int k = 0; k < 5; k++) fq.push_back(8'($urandom));   // arrives before run
    repeat (10) @(negedge clk);
    checks++; if (!idle || count != 0) begin failures++; $display("FAIL: moved before run"); end
    d = fq;
    run = 1;
    for (int k = 5; k < n; k++) begin
      byte unsigned b = 8'($urandom);
      repeat ($urandom % 6) @(negedge clk);
      fq.push_back(b); d.push_back(b);
    end
    while (!fifo_empty || !idle) @(negedge clk);
    run = 0;
    checks++; if (count != 16'(n)) begin failures++; $display("FAIL: count %0d of %0d", count, n); end
    foreach (d[k]) begin
      checks++;
      if (!mem.exists(a + k) || mem[a + k] != d[k]) begin failures++; $display("FAIL: byte %0d", k); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    frame(32'h0000_4000, 60);
    frame(32'h0001_0010, 33);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
