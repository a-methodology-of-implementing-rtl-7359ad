// tb_crc32_serial: self-checking test of the bit-serial CRC-32 engine.
//
// Feeds the check string "123456789" and random frames LSB first, compares the
// register against a byte-wise reflected CRC-32 computed in the testbench,
// checks the emitted FCS bits in shift-out mode, and checks that a frame
// followed by its FCS leaves the good-frame residue (crc_ok) while a frame with
// one flipped bit does not.
module tb_crc32_serial;
  logic clk = 0, rst_n = 0, init = 0, bit_en = 0, din = 0, shift_out = 0;
  logic [31:0] crc;
  logic crc_ok, fcs_bit;
  int checks = 0, failures = 0;

  crc32_serial dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] crc_ref(input byte unsigned d[$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (d[k]) begin
      c ^= {24'h0, d[k]};
      repeat (8) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_bit(input logic b);
    din <= b; bit_en <= 1; @(posedge clk); bit_en <= 0; @(posedge clk);
  endtask

  task automatic send_bytes(input byte unsigned d[$]);
    foreach (d[k]) for (int i = 0; i < 8; i++) send_bit(d[k][i]);
  endtask

  task automatic start();
    init <= 1; @(posedge clk); init <= 0;
  endtask

  logic [31:0] rev;
  initial begin
    byte unsigned d[$];
    logic [31:0] ref_c, got;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    // check string
    d = '{8'h31,8'h32,8'h33,8'h34,8'h35,8'h36,8'h37,8'h38,8'h39};
    start(); send_bytes(d);
    @(posedge clk);
    for (int i = 0; i < 32; i++) rev[i] = ~crc[31-i];
    check(rev == 32'hCBF4_3926, $sformatf("check value %h", rev));
    for (int t = 0; t < 12; t++) begin
      automatic int n = 1 + ($urandom % 40);
      d = {};
      for (int k = 0; k < n; k++) d.push_back(8'($urandom));
      ref_c = crc_ref(d);
      start(); send_bytes(d);
      // shift out the FCS and compare bit by bit
      shift_out <= 1;
      for (int i = 0; i < 32; i++) begin
        @(posedge clk);
        got[i] = fcs_bit;
        bit_en <= 1; @(posedge clk); bit_en <= 0;
      end
      shift_out <= 0;
      check(got == ref_c, $sformatf("fcs %h vs %h", got, ref_c));
      // receive check: data + FCS gives residue
      start(); send_bytes(d);
      send_bytes('{ref_c[7:0], ref_c[15:8], ref_c[23:16], ref_c[31:24]});
      @(posedge clk);
      check(crc_ok, "residue after good frame");
      // corrupt one bit
      d[0] ^= 8'h01 << ($urandom % 8);
      start(); send_bytes(d);
      send_bytes('{ref_c[7:0], ref_c[15:8], ref_c[23:16], ref_c[31:24]});
      @(posedge clk);
      check(!crc_ok, "no residue after bad frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
