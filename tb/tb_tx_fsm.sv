// tb_tx_fsm: self-checking test of the transmit state machine.
//
// The machine drives a transmit shift register, an XOR and a CRC-32 engine as
// in the design; the testbench plays the PHY (bit strobe every 4 clocks, Start
// of Transmission after tx_request, End of Transmission after it drops), a
// FIFO and a keystream source (bytes 0x40, 0x41, ...). It captures the bits
// handed over after Start of Transmission and checks them against the frame,
// encrypted from the offset, followed by its CRC-32 computed in the
// testbench. It also checks CCA deferral, ACK priority, underrun abort, and a
// frame whose last four bytes are the ICV (CRC-32 of the plaintext body from
// the cipher offset), generated by an icv_crc32 and encrypted with the body.
module tb_tx_fsm;
  localparam int IDX_W = 12;
  logic clk = 0, rst_n = 0, tx_start = 0, encrypt_en = 0, cca_busy = 0, sot = 0, eot = 0, bit_en = 0;
  logic [IDX_W-1:0] tx_len = 0, crypt_ofs = 0;
  logic fifo_empty, ks_ready = 1, ack_req = 0, sr_need;
  logic fifo_rd, ks_next, src_ack, ack_done, crypt_active, sr_load, sr_shift, sr_clr;
  logic crc_init, crc_en, crc_shift_out, fcs_sel, tx_request, busy, pending, tx_done, underrun;
  logic [3:0] ack_idx;
  logic icv_en = 0, icv_sel, icv_upd, icv_ok_unused;
  logic [1:0] icv_k;
  logic [7:0] icv_byte;
  logic [31:0] icv_crc_unused;
  logic [7:0] raw, enc, ks = 8'h40;
  logic sr_dout, sr_busy, fcs_bit, crc_ok, line;
  logic [31:0] crc;
  int checks = 0, failures = 0, ntxd = 0, nund = 0, nackd = 0;
  byte unsigned fq[$];
  logic bits[$];

  tx_fsm #(.IDX_W(IDX_W)) dut (.*);
  tx_shift_reg u_sr (.clk, .rst_n, .clr(sr_clr), .load(sr_load), .din(enc), .bit_en(sr_shift),
                     .dout(sr_dout), .busy(sr_busy), .need(sr_need));
  xor_cipher u_x (.din(raw), .ks, .en(crypt_active), .dout(enc));
  crc32_serial u_crc (.clk, .rst_n, .init(crc_init), .bit_en(crc_en), .din(sr_dout),
                      .shift_out(crc_shift_out), .crc, .crc_ok, .fcs_bit);

  assign fifo_empty = (fq.size() == 0);
  icv_crc32 u_icv (.clk, .rst_n, .init(crc_init), .en(icv_upd), .din(raw), .sel(icv_k),
                   .crc(icv_crc_unused), .icv_byte, .icv_ok(icv_ok_unused));

  assign raw  = src_ack ? 8'hA0 + 8'(ack_idx) :
                icv_sel ? icv_byte : (fifo_empty ? 8'h00 : fq[0]);
  assign line = fcs_sel ? fcs_bit : sr_dout;

  always #5 clk = ~clk;
  int phase = 0;
  logic started = 0;
  always @(negedge clk) begin phase = (phase + 1) % 4; bit_en = (phase == 0); end
  always @(posedge clk) if (rst_n) begin
    if (fifo_rd) void'(fq.pop_front());
    if (ks_next) ks <= ks + 8'd1;
    if (started && tx_request && bit_en) bits.push_back(line);
    if (sot) begin started = 1; bits = {}; end
    if (!tx_request) started = 0;
    ntxd += int'(tx_done); nund += int'(underrun); nackd += int'(ack_done);
  end
  // PHY: answers tx_request with Start of Transmission, its end with End of Transmission
  initial begin
    forever begin
      @(negedge clk);
      if (tx_request) begin
        repeat (5) @(negedge clk);
        sot = 1; @(negedge clk); sot = 0;
        while (tx_request) @(negedge clk);
        repeat (3) @(negedge clk);
        eot = 1; @(negedge clk); eot = 0;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic check_bits(input byte unsigned exp[$], input string s);
    logic [31:0] f = crc_ref(exp);
    byte unsigned all[$] = exp;
    all.push_back(f[7:0]); all.push_back(f[15:8]); all.push_back(f[23:16]); all.push_back(f[31:24]);
    if (bits.size() != 8 * all.size()) begin
      string t = "";
      foreach (bits[k]) t = {t, bits[k] ? "1" : "0"};
      $display("INFO got %s", t);
      t = "";
      foreach (all[k]) for (int i = 0; i < 8; i++) t = {t, all[k][i] ? "1" : "0"};
      $display("INFO exp %s", t);
    end
    check(bits.size() == 8 * all.size(), $sformatf("%s: %0d bits, expected %0d", s, bits.size(), 8 * all.size()));
    if (bits.size() == 8 * all.size())
      foreach (all[k]) begin
        logic [7:0] b;
        for (int i = 0; i < 8; i++) b[i] = bits[8*k + i];
        check(b == all[k], $sformatf("%s: byte %0d %h vs %h", s, k, b, all[k]));
      end
  endtask

  initial begin
    byte unsigned d[$], e[$];
    int n;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    // 1: plain frame, channel busy first
    n = 20; d = {};
    for (int k = 0; k < n; k++) d.push_back(8'($urandom));
    fq = d; tx_len = IDX_W'(n);
    cca_busy = 1;
    tx_start = 1; @(negedge clk); tx_start = 0;
    repeat (50) @(negedge clk);
    check(!tx_request && pending, "deferred while channel busy");
    bits = {};
    cca_busy = 0;
    while (ntxd == 0) @(negedge clk);
    check_bits(d, "plain");
    // 2: encrypted from offset 6; keystream starts at current ks
    n = 16; d = {}; e = {};
    for (int k = 0; k < n; k++) d.push_back(8'($urandom));
    for (int k = 0; k < n; k++) e.push_back((k >= 6) ? d[k] ^ (ks + 8'(k - 6)) : d[k]);
    fq = d; tx_len = IDX_W'(n); encrypt_en = 1; crypt_ofs = 6; bits = {};
    tx_start = 1; @(negedge clk); tx_start = 0;
    while (ntxd == 1) @(negedge clk);
    check_bits(e, "encrypted");
    encrypt_en = 0;
    // 3: ACK has priority over a pending data frame
    fq = d; tx_len = IDX_W'(n); bits = {};
    ack_req = 1; tx_start = 1; @(negedge clk); tx_start = 0;
    while (nackd == 0) @(negedge clk);
    ack_req = 0;
    e = {};
    for (int k = 0; k < 10; k++) e.push_back(8'hA0 + 8'(k));
    check_bits(e, "ack first");
    bits = {};
    while (ntxd == 2) @(negedge clk);
    check_bits(d, "data after ack");
    // 4: underrun: only 5 of 12 bytes present
    fq = {}; for (int k = 0; k < 5; k++) fq.push_back(8'($urandom));
    tx_len = 12; bits = {};
    tx_start = 1; @(negedge clk); tx_start = 0;
    while (busy || pending) @(negedge clk);
    check(nund == 1 && ntxd == 3, $sformatf("underrun %0d tx_done %0d", nund, ntxd));
    check(bits.size() == 41, $sformatf("bits before abort %0d", bits.size()));  // 5 bytes + the missed slot
    // 5: encrypted frame with ICV: 18 body bytes from the FIFO, 4 ICV bytes generated
    n = 18; d = {}; e = {};
    for (int k = 0; k < n; k++) d.push_back(8'($urandom));
    begin
      byte unsigned body[$];
      logic [31:0] icv;
      for (int k = 6; k < n; k++) body.push_back(d[k]);
      icv = crc_ref(body);
      fq = d;
      for (int k = 0; k < 4; k++) d.push_back(icv[8*k +: 8]);
    end
    for (int k = 0; k < n + 4; k++) e.push_back((k >= 6) ? d[k] ^ (ks + 8'(k - 6)) : d[k]);
    tx_len = IDX_W'(n + 4); encrypt_en = 1; icv_en = 1; crypt_ofs = 6; bits = {};
    tx_start = 1; @(negedge clk); tx_start = 0;
    while (ntxd == 3) @(negedge clk);
    check_bits(e, "encrypted with icv");
    check(fq.size() == 0 && nund == 1, "icv bytes not taken from fifo");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
