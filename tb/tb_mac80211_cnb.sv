// tb_mac80211_cnb: end-to-end test of the IEEE 802.11 customized network block.
//
// Runs the top at its default parameters (44 MHz system clock, 11 Mbit/s bit
// clocks, 128-byte FIFOs, 8-byte WEP seeds, 10 us SIFS). The testbench plays
// the PHY (bit clocks of four system clocks, receive frames LSB first, transmit
// handshake and bit capture), the processor (register bus) and a byte memory
// answering both DMA ports after random delays. Scenario:
//   1. unicast data frame received by DMA, automatic ACK returned after SIFS;
//   2. broadcast frame with a corrupted FCS (no ACK), 3. multicast frame;
//   4. WEP-encrypted transmission from memory with a generated ICV, deferred
//      while CCA is busy;
//   5. that frame looped back into the receiver, decrypted and ICV-checked;
//   6. transmit underrun, 7. TSF compare event, 8. receive FIFO overflow;
//   9. the overflowed frame read by the processor through RXFIFO, then the
//      receive FIFO flushed; 10. a frame written by the processor through
//      TXFIFO (no DMA) and transmitted.
// Expected frames, FCS and RC4 keystream are computed in the testbench. Each
// mechanism is counted and one that never happened counts as a failure.
module tb_mac80211_cnb;
  import mac_pkg::*;

  logic clk = 0, rst_n = 0;
  logic rx_clock = 0, rx_data = 0, rx_frame = 0, tx_clock = 0, tx_data, tx_request;
  logic tx_ready = 0, cca = 0;
  logic up_sel = 0, up_we = 0;
  logic [4:0] up_addr = 0;
  logic [31:0] up_wdata = 0, up_rdata;
  logic irq;
  logic rxm_req, rxm_ack = 0, txm_req, txm_ack = 0;
  logic [31:0] rxm_addr, txm_addr;
  logic [7:0] rxm_wdata, txm_rdata;

  mac80211_cnb dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int m_rx_good = 0, m_rx_bad = 0, m_unicast = 0, m_bcast = 0, m_mcast = 0, m_ack = 0;
  int m_rx_dma = 0, m_tx_dma = 0, m_tx = 0, m_encrypt = 0, m_decrypt = 0, m_defer = 0;
  int m_ovf = 0, m_under = 0, m_tsf = 0, m_irq = 0, m_icv_gen = 0, m_icv_ok = 0;
  int m_cpu_rx = 0, m_cpu_tx = 0, m_flush = 0;

  localparam logic [47:0] STA  = 48'h0605_0403_0200;      // byte 0 = 0x00
  localparam logic [47:0] PEER = 48'h2A29_2827_2622;
  localparam logic [63:0] KEY  = 64'h8877_6655_4433_2211;

  always #5 clk = ~clk;

  // bit clocks: 4 system clocks per bit (11 Mbit/s at 44 MHz), edges on negedge clk
  int ph = 0;
  always @(negedge clk) begin
    ph = (ph + 1) % 4;
    rx_clock = (ph >= 2);
    tx_clock = (ph >= 2);
  end

  // memory shared by both DMA ports
  byte unsigned mem [0:8191];
  always @(negedge clk) begin
    rxm_ack = rxm_req && ($urandom % 3 == 0);
    txm_ack = txm_req && ($urandom % 3 == 0);
    txm_rdata = mem[txm_addr[12:0]];
  end
  always @(posedge clk) if (rst_n && rxm_req && rxm_ack) mem[rxm_addr[12:0]] = rxm_wdata;
  always @(posedge clk) if (rst_n && irq) m_irq++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // ---------------- processor ----------------
  task automatic wr(input reg_addr_e a, input logic [31:0] d);
    @(negedge clk); up_sel = 1; up_we = 1; up_addr = a; up_wdata = d;
    @(negedge clk); up_sel = 0; up_we = 0;
  endtask
  task automatic rd(input reg_addr_e a, output logic [31:0] d);
    @(negedge clk); up_sel = 1; up_we = 0; up_addr = a; #1 d = up_rdata;
    @(negedge clk); up_sel = 0;
  endtask
  task automatic wait_event(input event_e e, input int limit, output logic seen);
    logic [31:0] r;
    seen = 0;
    for (int k = 0; k < limit && !seen; k++) begin
      rd(R_EVENT, r);
      seen = r[e];
    end
    if (seen) wr(R_EVENT, 32'(1) << e);
  endtask

  // ---------------- reference models ----------------
  function automatic logic [31:0] crc_ref(input byte unsigned d[$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (d[k]) begin
      c ^= {24'h0, d[k]};
      repeat (8) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction
  function automatic void add_fcs(ref byte unsigned d[$]);
    logic [31:0] f = crc_ref(d);
    for (int i = 0; i < 4; i++) d.push_back(f[8*i +: 8]);
  endfunction
  function automatic void rc4(input logic [63:0] key, input int n, output byte unsigned o[$]);
    byte unsigned s[256], t;
    int i = 0, j = 0;
    for (int x = 0; x < 256; x++) s[x] = 8'(x);
    for (int x = 0; x < 256; x++) begin
      j = (j + s[x] + key[8*(x % 8) +: 8]) % 256;
      t = s[x]; s[x] = s[j]; s[j] = t;
    end
    o = {}; j = 0;
    for (int x = 0; x < n; x++) begin
      i = (i + 1) % 256; j = (j + s[i]) % 256;
      t = s[i]; s[i] = s[j]; s[j] = t;
      o.push_back(s[(s[i] + s[j]) % 256]);
    end
  endfunction
  function automatic void header(ref byte unsigned d[$], input logic [7:0] fc0,
                                 input logic [47:0] a1, input logic [47:0] a2);
    d = {};
    d.push_back(fc0); d.push_back(8'h00); d.push_back(8'h00); d.push_back(8'h01);
    for (int i = 0; i < 6; i++) d.push_back(a1[8*i +: 8]);
    for (int i = 0; i < 6; i++) d.push_back(a2[8*i +: 8]);
    for (int i = 0; i < 6; i++) d.push_back(8'h30 + 8'(i));
    d.push_back(8'h10); d.push_back(8'h00);
  endfunction

  // ---------------- PHY ----------------
  task automatic phy_rx(input byte unsigned d[$]);
    @(negedge rx_clock);
    rx_frame = 1;
    foreach (d[k]) for (int i = 0; i < 8; i++) begin
      rx_data = d[k][i];
      @(negedge rx_clock);
    end
    rx_frame = 0;
  endtask

  byte unsigned tx_cap[$];
  int tx_frames = 0, tx_bits = 0;
  longint t_rx_end = 0, t_tx_req = 0;
  always @(negedge rx_frame) t_rx_end = $time;
  initial begin
    logic [7:0] b;
    forever begin
      @(posedge tx_request);
      t_tx_req = $time;
      repeat (8) @(posedge clk);
      @(negedge tx_clock);
      tx_ready = 1;
      tx_cap = {}; tx_bits = 0;
      forever begin
        @(posedge tx_clock);
        if (!tx_request) break;
        b[tx_bits % 8] = tx_data;
        tx_bits++;
        if (tx_bits % 8 == 0) tx_cap.push_back(b);
      end
      @(negedge tx_clock);
      tx_ready = 0;
      tx_frames++;
      $display("INFO tx frame %0d at %0t: %0d bits src_ack=%b", tx_frames, $time, tx_bits, dut.tx_src_ack);
    end
  end

  task automatic wait_tx(input int n);
    int k = 0;
    while (tx_frames < n && k < 100000) begin @(negedge clk); k++; end
    check(tx_frames >= n, "transmission finished");
    repeat (20) @(negedge clk);
  endtask

  task automatic check_mem(input int base, input byte unsigned d[$], input int from, input int to,
                           input string s);
    int bad = 0;
    for (int k = from; k < to; k++) if (mem[base + k] != d[k]) bad++;
    check(bad == 0, $sformatf("%s: %0d bytes differ in memory", s, bad));
  endtask

  task automatic check_frame(input byte unsigned exp[$], input string s);
    int bad = 0;
    check(tx_cap.size() == exp.size() && tx_bits == 8 * exp.size(),
          $sformatf("%s: %0d bits, expected %0d", s, tx_bits, 8 * exp.size()));
    foreach (exp[k]) if (k < tx_cap.size() && tx_cap[k] != exp[k]) bad++;
    check(bad == 0, $sformatf("%s: %0d bytes differ on the line", s, bad));
  endtask

  // ---------------- scenario ----------------
  initial begin
    byte unsigned f[$], e[$], ks[$], ack[$];
    logic [31:0] r;
    logic seen;
    int n0;
    for (int k = 0; k < 8192; k++) mem[k] = 8'h00;
    repeat (5) @(negedge clk); rst_n = 1;

    wr(R_STA_LO, STA[31:0]); wr(R_STA_HI, {16'h0, STA[47:32]});
    wr(R_EVMASK, 32'h1FFF);
    wr(R_CTRL, (1 << C_RX_EN) | (1 << C_RX_DMA_EN) | (1 << C_AUTO_ACK));

    // 1. unicast data frame -> DMA to 0x100, ACK after SIFS
    header(f, 8'h08, STA, PEER);
    for (int k = 0; k < 40; k++) f.push_back(8'($urandom));
    add_fcs(f);
    wr(R_RXDMA_ADDR, 32'h100);
    n0 = tx_frames;
    phy_rx(f);
    wait_event(EV_RX_DMA, 200, seen);
    check(seen, "rx DMA done (unicast)"); m_rx_dma += int'(seen);
    check_mem(32'h100, f, 0, f.size(), "unicast frame");
    rd(R_RX_LEN, r); check(r == f.size(), $sformatf("rx length %0d", r));
    rd(R_STATUS, r);
    check(r[2] && r[3] && !r[4] && !r[5], $sformatf("status good unicast %h", r));
    m_rx_good += int'(r[2]); m_unicast += int'(r[3]);
    wait_tx(n0 + 1);
    ack = {8'hD4, 8'h00, 8'h00, 8'h00};
    for (int i = 0; i < 6; i++) ack.push_back(PEER[8*i +: 8]);
    add_fcs(ack);
    check_frame(ack, "ACK");
    check((t_tx_req - t_rx_end) / 10 >= 440 && (t_tx_req - t_rx_end) / 10 <= 460,
          $sformatf("SIFS %0d clocks", (t_tx_req - t_rx_end) / 10));
    wait_event(EV_ACK_SENT, 50, seen);
    check(seen, "ack sent event"); m_ack += int'(seen);

    // 2. broadcast frame with corrupted FCS -> no ACK
    header(f, 8'h08, 48'hFFFF_FFFF_FFFF, PEER);
    for (int k = 0; k < 20; k++) f.push_back(8'($urandom));
    add_fcs(f);
    f[30] ^= 8'h04;
    wr(R_RXDMA_ADDR, 32'h300);
    n0 = tx_frames;
    phy_rx(f);
    wait_event(EV_RX_DMA, 200, seen);
    check(seen, "rx DMA done (broadcast)"); m_rx_dma += int'(seen);
    check_mem(32'h300, f, 0, f.size(), "broadcast frame");
    rd(R_STATUS, r);
    check(!r[2] && !r[3] && r[4] && !r[5], $sformatf("status bad broadcast %h", r));
    m_rx_bad += int'(!r[2]); m_bcast += int'(r[4]);
    repeat (700) @(negedge clk);
    check(tx_frames == n0 && !tx_request, "no ACK for a bad frame");

    // 3. multicast frame
    header(f, 8'h08, 48'h0000_5E00_0001, PEER);
    for (int k = 0; k < 10; k++) f.push_back(8'($urandom));
    add_fcs(f);
    wr(R_RXDMA_ADDR, 32'h400);
    phy_rx(f);
    wait_event(EV_RX_DMA, 200, seen);
    m_rx_dma += int'(seen);
    rd(R_STATUS, r);
    check(r[2] && r[5] && !r[3] && !r[4], $sformatf("status multicast %h", r));
    m_mcast += int'(r[5]);

    // 4. encrypted transmission from memory at 0x800, body encrypted from byte 24
    header(f, 8'h08, PEER, STA);
    for (int k = 0; k < 60; k++) f.push_back(8'($urandom));
    foreach (f[k]) mem[32'h800 + k] = f[k];
    wr(R_TXKEY_LO, KEY[31:0]); wr(R_TXKEY_HI, KEY[63:32]);
    wr(R_RXKEY_LO, KEY[31:0]); wr(R_RXKEY_HI, KEY[63:32]);
    wr(R_CTRL, (1 << C_RX_EN) | (1 << C_RX_DMA_EN) | (1 << C_AUTO_ACK) | (1 << C_TXKEY_INIT));
    do rd(R_STATUS, r); while (!r[9]);
    wr(R_CRYPT_OFS, (24 << 16) | 24);
    wr(R_TXDMA_ADDR, 32'h800); wr(R_TXDMA_LEN, f.size()); wr(R_TX_LEN, f.size() + ICV_LEN);
    wr(R_CTRL, (1 << C_RX_EN) | (1 << C_RX_DMA_EN) | (1 << C_AUTO_ACK) | (1 << C_TX_ENCRYPT) |
               (1 << C_TX_ICV) | (1 << C_TXDMA_GO));
    wait_event(EV_TX_DMA, 300, seen);
    check(seen, "tx DMA done"); m_tx_dma += int'(seen);
    cca = 1;
    n0 = tx_frames;
    wr(R_CTRL, (1 << C_RX_EN) | (1 << C_RX_DMA_EN) | (1 << C_AUTO_ACK) | (1 << C_TX_ENCRYPT) |
               (1 << C_TX_ICV) | (1 << C_TX_START));
    repeat (200) @(negedge clk);
    rd(R_STATUS, r);
    check(!tx_request && r[1] && r[10], "transmission deferred while channel busy");
    m_defer += int'(!tx_request && r[1]);
    cca = 0;
    wait_tx(n0 + 1);
    // plaintext ICV = CRC-32 of the body, low byte first, then body and ICV encrypted
    begin
      byte unsigned body[$];
      logic [31:0] icv;
      for (int k = 24; k < f.size(); k++) body.push_back(f[k]);
      icv = crc_ref(body);
      e = f;
      for (int k = 0; k < ICV_LEN; k++) e.push_back(icv[8*k +: 8]);
    end
    rc4(KEY, e.size() - 24, ks);
    for (int k = 24; k < e.size(); k++) e[k] = e[k] ^ ks[k - 24];
    add_fcs(e);
    check_frame(e, "encrypted frame with ICV");
    m_icv_gen += int'(tx_cap.size() == e.size() && tx_cap[f.size()] == e[f.size()]);
    for (int k = 24; k < f.size() && k < tx_cap.size(); k++)
      m_encrypt += int'(tx_cap[k] == e[k] && e[k] != f[k]);
    wait_event(EV_TX_DONE, 50, seen);
    check(seen, "tx done event"); m_tx += int'(seen);

    // 5. loop the encrypted frame back into the receiver and decrypt it
    wr(R_CTRL, (1 << C_RX_EN) | (1 << C_RX_DMA_EN) | (1 << C_RX_DECRYPT) | (1 << C_RX_ICV) |
               (1 << C_RXKEY_INIT));
    do rd(R_STATUS, r); while (!r[8]);
    wr(R_RXDMA_ADDR, 32'hA00);
    phy_rx(tx_cap);
    wait_event(EV_RX_DMA, 300, seen);
    m_rx_dma += int'(seen);
    check_mem(32'hA00, f, 0, f.size(), "decrypted frame");
    rd(R_STATUS, r);
    check(r[2], "looped frame FCS good");
    check(r[12], "looped frame ICV good");
    m_icv_ok += int'(r[12]);
    m_decrypt += int'(seen && mem[32'hA00 + 40] == f[40]);

    // 6. transmit underrun: 16 bytes in memory, 64 announced
    wr(R_CTRL, (1 << C_RX_EN) | (1 << C_RX_DMA_EN));
    wr(R_TXDMA_ADDR, 32'h800); wr(R_TXDMA_LEN, 16); wr(R_TX_LEN, 64);
    wr(R_CTRL, (1 << C_RX_EN) | (1 << C_RX_DMA_EN) | (1 << C_TXDMA_GO));
    wait_event(EV_TX_DMA, 300, seen);
    m_tx_dma += int'(seen);
    n0 = tx_frames;
    wr(R_CTRL, (1 << C_RX_EN) | (1 << C_RX_DMA_EN) | (1 << C_TX_START));
    wait_tx(n0 + 1);
    wait_event(EV_TX_UNDER, 50, seen);
    check(seen && tx_bits == 16 * 8 + 1, $sformatf("underrun after %0d bits", tx_bits));
    m_under += int'(seen);

    // 7. TSF compare event
    wr(R_TSF_HI, 0); wr(R_TSF_LO, 32'h1000);
    wr(R_TSFCMP_HI, 0); wr(R_TSFCMP_LO, 32'h1000 + 20);
    repeat (19 * 44) @(negedge clk);
    rd(R_EVENT, r);
    check(!r[EV_TSF_MATCH], "TSF event not early");
    wait_event(EV_TSF_MATCH, 200, seen);
    check(seen, "TSF compare event"); m_tsf += int'(seen);
    rd(R_TSF_LO, r);
    check(r >= 32'h1000 + 20 && r < 32'h1000 + 40, $sformatf("TSF %h", r));

    // 8. overflow: DMA off, 140-byte frame into the 128-byte FIFO
    wr(R_CTRL, (1 << C_RX_EN));
    header(f, 8'h08, STA, PEER);
    for (int k = 0; k < 140 - 24 - 4; k++) f.push_back(8'($urandom));
    add_fcs(f);
    phy_rx(f);
    wait_event(EV_RX_OVF, 200, seen);
    check(seen, "overflow event"); m_ovf += int'(seen);
    rd(R_RX_LEN, r);
    check(r == 128, $sformatf("stored %0d of 140", r));

    // 9. processor reads the first bytes of the overflowed frame, then flushes
    begin
      int bad = 0;
      for (int k = 0; k < 32; k++) begin
        rd(R_RXFIFO, r);
        bad += int'(r[8:0] != {1'b1, f[k]});
      end
      check(bad == 0, $sformatf("RXFIFO bytes: %0d wrong", bad));
      m_cpu_rx += int'(bad == 0);
    end
    rd(R_STATUS, r);
    check(!r[13], "receive FIFO still holds bytes");
    wr(R_CTRL, (1 << C_RX_EN) | (1 << C_RXFIFO_CLR));
    rd(R_STATUS, r);
    check(r[13], "receive FIFO flushed");
    m_flush += int'(r[13]);
    rd(R_RXFIFO, r);
    check(!r[8], "RXFIFO reads empty");

    // 10. processor writes a frame into the transmit FIFO and sends it
    header(f, 8'h08, PEER, STA);
    for (int k = 0; k < 8; k++) f.push_back(8'($urandom));
    wr(R_CTRL, (1 << C_RX_EN) | (1 << C_TXFIFO_CLR));
    foreach (f[k]) wr(R_TXFIFO, 32'(f[k]));
    n0 = tx_frames;
    wr(R_TX_LEN, f.size());
    wr(R_CTRL, (1 << C_RX_EN) | (1 << C_TX_START));
    wait_tx(n0 + 1);
    e = f;
    add_fcs(e);
    check_frame(e, "frame written by the processor");
    m_cpu_tx += int'(tx_cap.size() == e.size() && tx_cap[e.size() - 1] == e[e.size() - 1]);

    // every mechanism happened
    check(m_rx_good > 0, "mechanism: good reception");
    check(m_rx_bad > 0, "mechanism: FCS error");
    check(m_unicast > 0, "mechanism: unicast match");
    check(m_bcast > 0, "mechanism: broadcast");
    check(m_mcast > 0, "mechanism: multicast");
    check(m_ack > 0, "mechanism: automatic ACK");
    check(m_rx_dma >= 4, "mechanism: receive DMA");
    check(m_tx_dma >= 2, "mechanism: transmit DMA");
    check(m_tx > 0, "mechanism: data transmission");
    check(m_encrypt > 0, "mechanism: encryption");
    check(m_decrypt > 0, "mechanism: decryption");
    check(m_defer > 0, "mechanism: CCA deferral");
    check(m_under > 0, "mechanism: transmit underrun");
    check(m_ovf > 0, "mechanism: receive overflow");
    check(m_tsf > 0, "mechanism: TSF event");
    check(m_irq > 0, "mechanism: interrupt");
    check(m_icv_gen > 0, "mechanism: ICV generated");
    check(m_icv_ok > 0, "mechanism: ICV checked");
    check(m_cpu_rx > 0, "mechanism: processor FIFO read");
    check(m_cpu_tx > 0, "mechanism: processor FIFO write");
    check(m_flush > 0, "mechanism: FIFO flush");
    $display("INFO mechanisms: rx_good=%0d rx_bad=%0d uni=%0d bcast=%0d mcast=%0d ack=%0d rx_dma=%0d tx_dma=%0d tx=%0d enc=%0d dec=%0d defer=%0d under=%0d ovf=%0d tsf=%0d irq_cycles=%0d icv_gen=%0d icv_ok=%0d cpu_rx=%0d cpu_tx=%0d flush=%0d",
             m_rx_good, m_rx_bad, m_unicast, m_bcast, m_mcast, m_ack, m_rx_dma, m_tx_dma, m_tx,
             m_encrypt, m_decrypt, m_defer, m_under, m_ovf, m_tsf, m_irq, m_icv_gen, m_icv_ok,
             m_cpu_rx, m_cpu_tx, m_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
