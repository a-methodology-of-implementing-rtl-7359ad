// tb_sync_fifo: self-checking test of the 128-byte FIFO.
//
// Fills the FIFO to exactly DEPTH entries (full must rise then and not before),
// drains it, then runs random simultaneous pushes and pops against a queue
// model, checking order, count, full and empty.
module tb_sync_fifo;
  localparam int DEPTH = 128;
  logic clk = 0, rst_n = 0, clr = 0, wr = 0, rd = 0;
  logic [7:0] wdata = 0, rdata;
  logic full, empty;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  byte unsigned q[$];

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    check(empty && !full && count == 0, "empty after reset");
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      check(!full, $sformatf("not full at %0d", k));
      wdata = 8'($urandom); wr = !full;
      if (wr) q.push_back(wdata);
      @(posedge clk); #1 wr = 0;
    end
    @(negedge clk);
    check(full && count == DEPTH, "full at DEPTH");
    while (q.size() > 0) begin
      @(negedge clk);
      check(rdata == q.pop_front(), "drain order");
      rd = 1; @(posedge clk); #1 rd = 0;
    end
    @(negedge clk);
    check(empty, "empty after drain");
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      wr = !full && ($urandom % 2);
      rd = !empty && ($urandom % 2);
      wdata = 8'($urandom);
      if (rd) check(rdata == q.pop_front(), "random order");
      if (wr) q.push_back(wdata);
      @(posedge clk); #1;
      check(count == q.size() && empty == (q.size() == 0) && full == (q.size() == DEPTH), "flags");
    end
    wr = 0; rd = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
