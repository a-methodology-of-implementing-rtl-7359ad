// tb_ack_fsm: self-checking test of the automatic ACK machine.
//
// Plays received headers and end-of-frame results and checks that an ACK is
// requested exactly SIFS after a good unicast non-control frame with auto-ACK
// enabled, never otherwise, that the ACK bytes read by index are D4 00 00 00
// and the sender's address, and that ack_done ends the request with ack_sent.
module tb_ack_fsm;
  localparam int MHZ = 2, SIFS = 3, IDX_W = 12;
  logic clk = 0, rst_n = 0, auto_ack_en = 0, rx_busy = 0, byte_valid = 0;
  logic [IDX_W-1:0] byte_idx = 0;
  logic [7:0] byte_in = 0, ack_byte;
  logic rx_done = 0, crc_ok = 0, unicast = 0, ack_done = 0;
  logic [3:0] ack_idx = 0;
  logic ack_req, ack_sent, pending;
  int checks = 0, failures = 0, nsent = 0;

  ack_fsm #(.CLK_MHZ(MHZ), .SIFS_US(SIFS), .IDX_W(IDX_W)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) nsent += int'(ack_sent);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic rx(input logic [7:0] fc0, input logic [47:0] ta, input logic good,
                    input logic uni, input logic en);
    logic expect_ack;
    int wait_cyc;
    auto_ack_en = en;
    rx_busy = 1;
    for (int k = 0; k < 24; k++) begin
      byte_idx = IDX_W'(k);
      byte_in = (k == 0) ? fc0 : (k >= 10 && k < 16) ? ta[8*(k-10) +: 8] : 8'($urandom);
      byte_valid = 1; @(negedge clk); byte_valid = 0; @(negedge clk);
    end
    rx_busy = 0;
    crc_ok = good; unicast = uni;
    rx_done = 1; @(negedge clk); rx_done = 0;
    expect_ack = good && uni && en && fc0[3:2] != 2'b01;
    wait_cyc = 1;
    while (!ack_req && wait_cyc < 40) begin @(negedge clk); wait_cyc++; end
    check(ack_req == expect_ack, $sformatf("ack request %b expected %b", ack_req, expect_ack));
    if (expect_ack) begin
      check(wait_cyc == MHZ * SIFS + 1, $sformatf("SIFS wait %0d", wait_cyc));
      for (int k = 0; k < 10; k++) begin
        ack_idx = 4'(k); #1;
        check(ack_byte == ((k == 0) ? 8'hD4 : (k < 4) ? 8'h00 : ta[8*(k-4) +: 8]),
              $sformatf("ack byte %0d = %h", k, ack_byte));
      end
      repeat (5) @(negedge clk);
      check(ack_req, "request held");
      ack_done = 1; @(negedge clk); ack_done = 0; @(negedge clk);
      check(!ack_req && !pending, "request dropped");
    end
  endtask

  initial begin
    int n = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    rx(8'h08, 48'h0A0B_0C0D_0E0F, 1, 1, 1); n++;   // data frame: ACK
    rx(8'h08, 48'h1112_1314_1516, 0, 1, 1);        // bad FCS
    rx(8'h08, 48'h1112_1314_1516, 1, 0, 1);        // not for us
    rx(8'h08, 48'h1112_1314_1516, 1, 1, 0);        // disabled
    rx(8'hB4, 48'h1112_1314_1516, 1, 1, 1);        // control frame (RTS)
    rx(8'h40, 48'hA1A2_A3A4_A5A6, 1, 1, 1); n++;   // management frame: ACK
    check(nsent == n, $sformatf("ack_sent pulses %0d", nsent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
