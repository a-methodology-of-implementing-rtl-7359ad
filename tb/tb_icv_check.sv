// tb_icv_check: self-checking test of the receive-side ICV check.
//
// Delivers frames byte by byte, as the receive state machine does: a header
// of `ofs` bytes, a random body, the four ICV bytes (CRC-32 of the body, low
// byte first, computed here bit by bit) and four random FCS bytes that the ICV
// must ignore. Bytes come with gaps of random length. After each frame it
// checks `icv_ok`: high for a correct ICV, low for a corrupted body byte, a
// corrupted ICV byte, or when checking is disabled. Headers of different
// lengths move the offset.
module tb_icv_check;
  localparam int IDX_W = 12;
  logic clk = 0, rst_n = 0, clr = 0, en = 1, byte_valid = 0;
  logic [IDX_W-1:0] byte_idx = 0, ofs = 0;
  logic [7:0] byte_in = 0;
  logic icv_ok;
  int checks = 0, failures = 0;

  icv_check #(.IDX_W(IDX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [31:0] crc_ref(input byte unsigned d[$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (d[k]) begin
      c ^= {24'h0, d[k]};
      repeat (8) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 24; t++) begin
      automatic byte unsigned f[$], body[$];
      automatic logic [31:0] icv;
      automatic int h = 24 + 4 * (t % 3);
      automatic int n = 1 + int'($urandom_range(0, 60));
      automatic int bad = t % 4;   // 0,1: good; 2: body corrupted; 3: ICV corrupted
      for (int k = 0; k < h; k++) f.push_back(8'($urandom));
      for (int k = 0; k < n; k++) body.push_back(8'($urandom));
      icv = crc_ref(body);
      foreach (body[k]) f.push_back(body[k]);
      for (int k = 0; k < 4; k++) f.push_back(icv[8*k +: 8]);
      for (int k = 0; k < 4; k++) f.push_back(8'($urandom));
      if (bad == 2) f[h + n / 2] ^= 8'h10;
      if (bad == 3) f[h + n + 2] ^= 8'h01;
      ofs = IDX_W'(h);
      en = (t % 8 != 1);
      clr = 1; @(negedge clk); clr = 0;
      foreach (f[k]) begin
        byte_idx = IDX_W'(k); byte_in = f[k]; byte_valid = 1;
        @(negedge clk); byte_valid = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      check(icv_ok == (en && bad < 2), $sformatf("test %0d: icv_ok %0d en %0d bad %0d", t, icv_ok, en, bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
