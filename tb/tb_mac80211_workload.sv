// tb_mac80211_workload: maximum-size frames at 11 Mbit/s through the 128-byte
// FIFOs.
//
// Runs the block at its default parameters (44 MHz, 4 clocks per bit, 128-byte
// FIFOs). The memory answers each DMA request after a random delay, and in
// the middle of each frame it stops answering for 3000 clocks (about 94 byte
// times). Checks:
//   1. reception of a 2346-byte frame (the largest 802.11 MPDU, FCS included)
//      by DMA: every byte reaches memory, FCS good, no overflow, and the
//      receive FIFO never holds more than 128 bytes;
//   2. transmission of a 2342-byte frame (plus FCS) with the transmit DMA and
//      the transmission started by the same register write: the bytes on
//      the line match the frame and its FCS, and there is no underrun;
//   3. a stall longer than the FIFO can absorb (128 bytes = 4096 clocks):
//      the receive overflow event appears, which shows the FIFO depth is
//      what protects the frame in cases 1 and 2.
// The largest FIFO occupancy seen in cases 1 and 2 is printed.
module tb_mac80211_workload;
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
  int stall = 0;                 // clocks during which the memory does not answer
  int rx_max = 0, tx_max = 0;    // largest FIFO occupancy seen
  localparam logic [47:0] STA  = 48'h0605_0403_0200;
  localparam logic [47:0] PEER = 48'h2A29_2827_2622;

  always #5 clk = ~clk;

  int ph = 0;
  always @(negedge clk) begin
    ph = (ph + 1) % 4;
    rx_clock = (ph >= 2);
    tx_clock = (ph >= 2);
  end

  byte unsigned mem [0:8191];
  always @(negedge clk) begin
    if (stall > 0) stall--;
    rxm_ack = rxm_req && (stall == 0) && ($urandom % 4 == 0);
    txm_ack = txm_req && (stall == 0) && ($urandom % 4 == 0);
    txm_rdata = mem[txm_addr[12:0]];
  end
  always @(posedge clk) if (rst_n) begin
    if (rxm_req && rxm_ack) mem[rxm_addr[12:0]] = rxm_wdata;
    if (int'(dut.u_rx_fifo.count) > rx_max) rx_max = int'(dut.u_rx_fifo.count);
    if (int'(dut.u_tx_fifo.count) > tx_max) tx_max = int'(dut.u_tx_fifo.count);
  end

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic wr(input reg_addr_e a, input logic [31:0] d);
    @(negedge clk); up_sel = 1; up_we = 1; up_addr = a; up_wdata = d;
    @(negedge clk); up_sel = 0; up_we = 0;
  endtask
  task automatic rd(input reg_addr_e a, output logic [31:0] d);
    @(negedge clk); up_sel = 1; up_we = 0; up_addr = a; #1 d = up_rdata;
    @(negedge clk); up_sel = 0;
  endtask

  function automatic void add_fcs(ref byte unsigned d[$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (d[k]) begin
      c ^= {24'h0, d[k]};
      repeat (8) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    c = ~c;
    for (int i = 0; i < 4; i++) d.push_back(c[8*i +: 8]);
  endfunction

  function automatic void make_frame(ref byte unsigned d[$], input logic [47:0] a1,
                                     input logic [47:0] a2, input int body);
    d = {};
    d.push_back(8'h08); d.push_back(8'h00); d.push_back(8'h00); d.push_back(8'h01);
    for (int i = 0; i < 6; i++) d.push_back(a1[8*i +: 8]);
    for (int i = 0; i < 6; i++) d.push_back(a2[8*i +: 8]);
    for (int i = 0; i < 8; i++) d.push_back(8'(i));
    for (int i = 0; i < body; i++) d.push_back(8'($urandom));
  endfunction

  task automatic phy_rx(input byte unsigned d[$], input int stall_at, input int stall_len);
    @(negedge rx_clock);
    rx_frame = 1;
    foreach (d[k]) begin
      if (k == stall_at) stall = stall_len;
      for (int i = 0; i < 8; i++) begin
        rx_data = d[k][i];
        @(negedge rx_clock);
      end
    end
    rx_frame = 0;
  endtask

  byte unsigned tx_cap[$];
  int tx_frames = 0, tx_bits = 0;
  initial begin
    logic [7:0] b;
    forever begin
      @(posedge tx_request);
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
        if (tx_bits == 8 * 1000) stall = 3000;
      end
      @(negedge tx_clock);
      tx_ready = 0;
      tx_frames++;
    end
  end

  task automatic wait_event_bit(input event_e e, input int limit, output logic seen);
    logic [31:0] r;
    seen = 0;
    for (int k = 0; k < limit && !seen; k++) begin
      rd(R_EVENT, r);
      seen = r[e];
    end
  endtask

  initial begin
    byte unsigned f[$];
    logic [31:0] r;
    logic seen;
    int bad;
    repeat (4) @(negedge clk); rst_n = 1;
    repeat (4) @(negedge clk);
    wr(R_STA_LO, STA[31:0]); wr(R_STA_HI, 32'(STA[47:32]));

    // 1. 2346-byte frame received by DMA, memory stalled mid-frame
    make_frame(f, STA, PEER, 2346 - 24 - 4);
    add_fcs(f);
    wr(R_RXDMA_ADDR, 32'h0);
    wr(R_CTRL, (1 << C_RX_EN) | (1 << C_RX_DMA_EN));
    phy_rx(f, 1200, 3000);
    wait_event_bit(EV_RX_DMA, 500, seen);
    check(seen, "receive DMA finished");
    rd(R_EVENT, r);
    check(!r[EV_RX_OVF], "no receive overflow");
    rd(R_STATUS, r);
    check(r[2], "FCS good");
    rd(R_RX_LEN, r);
    check(r == 2346, $sformatf("stored length %0d", r));
    bad = 0;
    foreach (f[k]) if (mem[k] != f[k]) bad++;
    check(bad == 0, $sformatf("%0d received bytes differ in memory", bad));
    check(rx_max > 64 && rx_max <= 128, $sformatf("receive FIFO peak %0d", rx_max));
    $display("INFO receive FIFO peak during the 3000-clock stall: %0d of 128 bytes", rx_max);
    wr(R_EVENT, 32'hFFFF_FFFF);

    // 2. 2342-byte frame (+FCS) streamed from memory while it is sent
    make_frame(f, PEER, STA, 2342 - 24);
    foreach (f[k]) mem[32'h1000 + k] = f[k];
    wr(R_TXDMA_ADDR, 32'h1000); wr(R_TXDMA_LEN, f.size()); wr(R_TX_LEN, f.size());
    wr(R_CTRL, (1 << C_RX_EN) | (1 << C_RX_DMA_EN) | (1 << C_TXDMA_GO) | (1 << C_TX_START));
    while (tx_frames == 0) @(negedge clk);
    repeat (20) @(negedge clk);
    rd(R_EVENT, r);
    check(!r[EV_TX_UNDER] && r[EV_TX_DONE], $sformatf("no underrun, frame done (events %h)", r));
    add_fcs(f);
    check(tx_bits == 8 * f.size(), $sformatf("%0d bits sent, expected %0d", tx_bits, 8 * f.size()));
    bad = 0;
    foreach (f[k]) if (k >= tx_cap.size() || tx_cap[k] != f[k]) bad++;
    check(bad == 0, $sformatf("%0d transmitted bytes differ", bad));
    check(tx_max > 32 && tx_max <= 128, $sformatf("transmit FIFO peak %0d", tx_max));
    wr(R_EVENT, 32'hFFFF_FFFF);

    // 3. a 5000-clock memory stall exceeds what 128 bytes can cover
    make_frame(f, STA, PEER, 600);
    add_fcs(f);
    wr(R_RXDMA_ADDR, 32'h0);
    phy_rx(f, 100, 5000);
    wait_event_bit(EV_RX_OVF, 10, seen);
    check(seen, "overflow when the stall is longer than the FIFO covers");

    $display("INFO transmit FIFO peak: %0d of 128 bytes", tx_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
