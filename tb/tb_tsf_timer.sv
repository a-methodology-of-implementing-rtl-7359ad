// tb_tsf_timer: self-checking test of the TSF timer.
//
// Checks one microsecond tick per CLK_MHZ clocks, loading of both halves with
// carry from the low into the high half, and a single match pulse at the
// compare value.
module tb_tsf_timer;
  localparam int MHZ = 4;
  logic clk = 0, rst_n = 0, wr_lo = 0, wr_hi = 0;
  logic [31:0] wdata = 0;
  logic [63:0] cmp = '1, tsf;
  logic match;
  int checks = 0, failures = 0, nmatch = 0;

  tsf_timer #(.CLK_MHZ(MHZ)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (match) nmatch++;

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
    logic [63:0] t0;
    repeat (3) @(posedge clk); rst_n <= 1;
    @(posedge clk); #1 t0 = tsf;
    repeat (MHZ * 100) @(posedge clk);
    #1 check(tsf - t0 == 100, $sformatf("100 us -> %0d", tsf - t0));
    @(negedge clk); wdata = 32'hFFFF_FFF0; wr_lo = 1; @(negedge clk); wr_lo = 0;
    wdata = 32'h0000_0007; wr_hi = 1; @(negedge clk); wr_hi = 0;
    check(tsf == 64'h0000_0007_FFFF_FFF0, $sformatf("load %h", tsf));
    cmp = 64'h0000_0008_0000_0005;
    repeat (MHZ * 21 + 2) @(posedge clk);
    #1 check(tsf[63:32] == 32'h8 && tsf[31:0] == 32'h5, $sformatf("carry %h", tsf));
    check(nmatch == 1, $sformatf("match pulses %0d", nmatch));
    repeat (MHZ * 10) @(posedge clk);
    check(nmatch == 1, "no second match");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
