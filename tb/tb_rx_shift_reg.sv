// tb_rx_shift_reg: self-checking test of the receive shift register.
//
// Sends random bytes LSB first with irregular gaps between bit strobes, checks
// each assembled byte and that exactly one byte_valid pulse follows each eighth
// bit, and checks that clr realigns the byte boundary.
module tb_rx_shift_reg;
  logic clk = 0, rst_n = 0, clr = 0, bit_en = 0, din = 0;
  logic [7:0] byte_out;
  logic byte_valid;
  int checks = 0, failures = 0;
  int nvalid = 0;
  byte unsigned exp_q[$];

  rx_shift_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && byte_valid) begin
    byte unsigned e;
    nvalid++;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected byte"); end
    else begin
      e = exp_q.pop_front();
      if (byte_out != e) begin failures++; $display("FAIL: got %h exp %h", byte_out, e); end
    end
  end

  task automatic send_bit(input logic b);
    din = b; bit_en = 1; @(negedge clk); bit_en = 0;
    repeat ($urandom % 4) @(negedge clk);
  endtask

  initial begin
    byte unsigned b;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 200; t++) begin
      b = 8'($urandom);
      exp_q.push_back(b);
      for (int i = 0; i < 8; i++) send_bit(b[i]);
    end
    // misalign with 3 stray bits, then realign with clr
    repeat (3) send_bit(1'b1);
    clr = 1; @(negedge clk); clr = 0;
    b = 8'hA5; exp_q.push_back(b);
    for (int i = 0; i < 8; i++) send_bit(b[i]);
    repeat (4) @(posedge clk);
    checks++;
    if (nvalid != 201 || exp_q.size() != 0) begin
      failures++; $display("FAIL: %0d bytes, %0d left", nvalid, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
