// tb_tx_dma_engine: self-checking test of the transmit DMA engine.
//
// A memory model answers reads after a random delay with data that is a
// function of the address; a consumer pops the FIFO side slowly so that it
// fills up. Checks addresses, data order, that no write happens while full,
// the done pulse and a second block from a new address.
module tb_tx_dma_engine;
  logic clk = 0, rst_n = 0, start = 0, fifo_full = 0;
  logic [31:0] base_addr = 0, mem_addr;
  logic [15:0] length = 0;
  logic fifo_wr, mem_req, mem_ack = 0, busy, done;
  logic [7:0] fifo_wdata, mem_rdata = 0;
  int checks = 0, failures = 0, ndone = 0;
  byte unsigned got[$];
  int occ = 0;

  tx_dma_engine #(.AW(32)) dut (.*);
  always #5 clk = ~clk;

  function automatic byte unsigned mval(input logic [31:0] a);
    return 8'(a * 7 + (a >> 8) + 3);
  endfunction

  // memory: ack after a random delay
  always @(negedge clk) begin
    mem_ack = 0;
    if (mem_req && ($urandom % 3 == 0)) begin mem_ack = 1; mem_rdata = mval(mem_addr); end
  end
  // FIFO model of depth 8, drained slowly
  always @(posedge clk) if (rst_n) begin
    if (fifo_wr) begin
      checks++;
      if (fifo_full) begin failures++; $display("FAIL: write while full"); end
      got.push_back(fifo_wdata); occ++;
    end
    if (occ > 0 && $urandom % 6 == 0) occ--;
    if (done) ndone++;
  end
  always @(negedge clk) fifo_full = (occ >= 8);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic block(input logic [31:0] a, input int n);
    got = {};
    base_addr = a; length = 16'(n); start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (got.size() != n) begin failures++; $display("FAIL: %0d of %0d bytes", got.size(), n); end
    foreach (got[k]) begin
      checks++;
      if (got[k] != mval(a + k)) begin failures++; $display("FAIL: byte %0d", k); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    block(32'h0000_1000, 40);
    block(32'h0002_00F0, 25);
    checks++;
    if (ndone != 2) begin failures++; $display("FAIL: done pulses %0d", ndone); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
