// tb_rc4_prng: self-checking test of the keystream generator.
//
// Checks the published RC4 vector (key "Key": keystream EB 9F 77 81 B7 34 CA
// 72 A7), then random 8-byte seeds against an RC4 model written in the
// testbench, including a restart with a new seed, and the ready latency of two
// clocks per byte.
module tb_rc4_prng;
  localparam int KB = 8;
  logic clk = 0, rst_n = 0, init = 0, next = 0;
  logic [8*KB-1:0] key = 0;
  logic [7:0] ks;
  logic ready;
  int checks = 0, failures = 0;

  rc4_prng #(.KEY_BYTES(KB)) dut (.*);
  // 3-byte key instance for the published vector
  logic init3 = 0, next3 = 0, ready3;
  logic [7:0] ks3;
  rc4_prng #(.KEY_BYTES(3)) dut3 (.clk, .rst_n, .init(init3), .key(24'h79654B), .next(next3),
                                  .ks(ks3), .ready(ready3));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic void rc4_model(input byte unsigned k[], input int n, output byte unsigned o[]);
    byte unsigned s[256], t;
    int j = 0, i = 0;
    for (int x = 0; x < 256; x++) s[x] = 8'(x);
    for (int x = 0; x < 256; x++) begin
      j = (j + s[x] + k[x % k.size()]) % 256;
      t = s[x]; s[x] = s[j]; s[j] = t;
    end
    o = new[n];
    j = 0;
    for (int x = 0; x < n; x++) begin
      i = (i + 1) % 256;
      j = (j + s[i]) % 256;
      t = s[i]; s[i] = s[j]; s[j] = t;
      o[x] = s[(s[i] + s[j]) % 256];
    end
  endfunction

  initial begin
    byte unsigned exp3[9] = '{8'hEB,8'h9F,8'h77,8'h81,8'hB7,8'h34,8'hCA,8'h72,8'hA7};
    byte unsigned k[], o[];
    int wait_cyc;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    init3 = 1; @(negedge clk); init3 = 0;
    for (int x = 0; x < 9; x++) begin
      while (!ready3) @(negedge clk);
      check(ks3 == exp3[x], $sformatf("vector byte %0d: %h", x, ks3));
      next3 = 1; @(negedge clk); next3 = 0; @(negedge clk);
    end
    for (int t = 0; t < 4; t++) begin
      k = new[KB];
      for (int x = 0; x < KB; x++) begin k[x] = 8'($urandom); key[8*x +: 8] = k[x]; end
      rc4_model(k, 40, o);
      init = 1; @(negedge clk); init = 0;
      wait_cyc = 0;
      while (!ready) begin @(negedge clk); wait_cyc++; end
      check(wait_cyc == 1 + 256 + 2, $sformatf("schedule latency %0d", wait_cyc));
      for (int x = 0; x < 40; x++) begin
        wait_cyc = 0;
        while (!ready) begin @(negedge clk); wait_cyc++; end
        if (x > 0) check(wait_cyc == 2, $sformatf("byte latency %0d", wait_cyc));
        check(ks == o[x], $sformatf("seed %0d byte %0d: %h vs %h", t, x, ks, o[x]));
        if ($urandom % 2) @(negedge clk);
        next = 1; @(negedge clk); next = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
