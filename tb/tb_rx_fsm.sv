// tb_rx_fsm: self-checking test of the receive state machine.
//
// Plays frames as byte strobes between Start and End of Frame events and
// checks: bytes written to the FIFO in order, byte index, decryption window
// (crypt_active and ks_next from the offset on), latched length and CRC
// result with one rx_done pulse, no reaction while reception is disabled, and
// dropping with an overflow pulse when the FIFO is full.
module tb_rx_fsm;
  localparam int IDX_W = 12;
  logic clk = 0, rst_n = 0, rx_en = 0, sof = 0, eof = 0, byte_valid = 0;
  logic [7:0] byte_in = 0, fifo_wdata;
  logic decrypt_en = 0, crc_ok_now = 0, fifo_full = 0;
  logic [IDX_W-1:0] crypt_ofs = 0, byte_idx, rx_len;
  logic fifo_wr, crypt_active, ks_next, frame_clr, busy, rx_done, overflow, crc_ok;
  int checks = 0, failures = 0, ndone = 0, novf = 0, nks = 0, nclr = 0;
  byte unsigned got[$];

  rx_fsm #(.IDX_W(IDX_W)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (fifo_wr) got.push_back(fifo_wdata);
    ndone += int'(rx_done); novf += int'(overflow); nks += int'(ks_next); nclr += int'(frame_clr);
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic frame(input int n, input int full_from, input logic good, input logic dec, input int ofs);
    byte unsigned d[$];
    int nd0 = ndone, nks0 = nks, nov0 = novf;
    got = {};
    decrypt_en = dec; crypt_ofs = IDX_W'(ofs);
    sof = 1; @(negedge clk); sof = 0;
    for (int k = 0; k < n; k++) begin
      repeat (2 + $urandom % 3) @(negedge clk);
      check(byte_idx == IDX_W'(k), "byte index");
      check(crypt_active == (dec && k >= ofs), "decrypt window");
      fifo_full = (k >= full_from);
      byte_in = 8'($urandom); d.push_back(byte_in);
      byte_valid = 1; @(negedge clk); byte_valid = 0;
    end
    fifo_full = 0;
    crc_ok_now = good;
    repeat (3) @(negedge clk);
    eof = 1; @(negedge clk); eof = 0;
    repeat (3) @(negedge clk);
    crc_ok_now = !good;
    check(ndone == nd0 + 1, "one rx_done");
    check(crc_ok == good, "crc latched");
    check(rx_len == IDX_W'((full_from < n) ? full_from : n), $sformatf("rx_len %0d", rx_len));
    check(novf - nov0 == ((full_from < n) ? n - full_from : 0), "overflow count");
    check(nks - nks0 == (dec ? ((n > ofs) ? n - ofs : 0) : 0), "keystream bytes");
    check(got.size() == ((full_from < n) ? full_from : n), "stored count");
    foreach (got[k]) check(got[k] == d[k], "stored data");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    sof = 1; @(negedge clk); sof = 0;
    byte_valid = 1; @(negedge clk); byte_valid = 0;
    check(!busy && got.size() == 0 && nclr == 0, "ignored while disabled");
    rx_en = 1;
    frame(30, 1000, 1, 0, 0);
    frame(40, 1000, 0, 1, 24);
    frame(20, 12, 1, 0, 0);
    frame(14, 1000, 1, 1, 4);
    check(nclr == 4, "frame_clr per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
