// tb_icv_crc32: self-checking test of the byte-wide ICV CRC-32.
//
// Feeds the ASCII string "123456789" and checks the standard CRC-32 check
// value 0xCBF43926 (the complement of the register). Then, for random byte
// strings, compares the register after every byte with a bit-by-bit model,
// reads the four ICV bytes through `sel`, feeds them back and expects the
// good-ICV constant (`icv_ok`), and checks that a flipped bit clears `icv_ok`.
module tb_icv_crc32;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [7:0] din = 0, icv_byte;
  logic [1:0] sel = 0;
  logic [31:0] crc;
  logic icv_ok;
  int checks = 0, failures = 0;

  icv_crc32 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [31:0] step(input logic [31:0] c, input logic [7:0] b);
    for (int i = 0; i < 8; i++) begin
      logic fb = c[0] ^ b[i];
      c = c >> 1;
      if (fb) c ^= 32'hEDB8_8320;
    end
    return c;
  endfunction

  task automatic feed(input logic [7:0] b);
    din = b; en = 1; @(negedge clk); en = 0;
  endtask

  initial begin
    logic [31:0] m;
    byte unsigned d[$];
    string s = "123456789";
    repeat (2) @(negedge clk); rst_n = 1;
    init = 1; @(negedge clk); init = 0;
    for (int i = 0; i < s.len(); i++) feed(s[i]);
    check(~crc == 32'hCBF4_3926, $sformatf("check value %h", ~crc));
    for (int t = 0; t < 20; t++) begin
      automatic int n = 1 + int'($urandom_range(0, 40));
      automatic logic [7:0] icv [4];
      init = 1; @(negedge clk); init = 0;
      check(crc == 32'hFFFF_FFFF, "preset");
      m = 32'hFFFF_FFFF;
      for (int k = 0; k < n; k++) begin
        automatic logic [7:0] b = 8'($urandom);
        feed(b); m = step(m, b);
        check(crc == m, $sformatf("register after byte %0d", k));
      end
      for (int k = 0; k < 4; k++) begin
        sel = 2'(k); #1;
        check(icv_byte == ~m[8*k +: 8], $sformatf("icv byte %0d", k));
        icv[k] = icv_byte;
      end
      check(!icv_ok || n == 0, "no residue before the ICV");
      if (t % 4 == 3) icv[t % 4][t % 8] = ~icv[t % 4][t % 8];
      for (int k = 0; k < 4; k++) feed(icv[k]);
      check(icv_ok == (t % 4 != 3), $sformatf("icv_ok %0d in test %0d", icv_ok, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
