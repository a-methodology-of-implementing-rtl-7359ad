// mac80211_cnb: customized network block for an IEEE 802.11 MAC.
//
// The general parameterized MAC architecture configured for IEEE 802.11: a
// receiver section and a transmitter section around a shared events section and
// control register section.
//   Receive:  PHY bit clock/data -> bit strobes -> CRC-32 (checks, in parallel)
//             and shift register -> XOR with the receive keystream (optional WEP
//             decryption) -> address decode, ICV check and 128-byte FIFO ->
//             DMA engine -> receive memory port. State machines: receive, keystream generator,
//             automatic ACK transmission, DMA control.
//   Transmit: memory port -> DMA engine -> 128-byte FIFO -> XOR with the
//             transmit keystream (optional WEP encryption, with the ICV
//             generated and appended to the body) -> shift register ->
//             PHY data, with the CRC-32 computed on the outgoing bits and
//             appended as FCS. State machines: transmit, keystream generator,
//             DMA control.
// Interfaces: PHY (rx_clock/rx_data/rx_frame, tx_clock/tx_data/tx_request/
// tx_ready, cca), processor register bus (up_*) with interrupt, and two byte
// memory ports (rxm_* writes, txm_* reads) with request/acknowledge. Without
// DMA the processor moves FIFO data through the RXFIFO/TXFIFO registers.
// Everything runs on `clk`, which must be at least four times the bit rate;
// CLK_MHZ sets the microsecond base of the TSF timer and of SIFS. The block
// structure and the 128-byte FIFOs follow the document; signal protocols, the
// register map, the WEP/ACK details (from IEEE 802.11) and the single clock are
// this design's choices.
module mac80211_cnb
  import mac_pkg::*;
#(
  parameter int unsigned CLK_MHZ    = 44,
  parameter int unsigned FIFO_DEPTH = 128,
  parameter int unsigned KEY_BYTES  = 8,
  parameter int unsigned SIFS_US    = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  // PHY receive
  input  logic        rx_clock,
  input  logic        rx_data,
  input  logic        rx_frame,
  // PHY transmit
  input  logic        tx_clock,
  output logic        tx_data,
  output logic        tx_request,
  input  logic        tx_ready,
  input  logic        cca,
  // processor interface
  input  logic        up_sel,
  input  logic        up_we,
  input  logic [4:0]  up_addr,
  input  logic [31:0] up_wdata,
  output logic [31:0] up_rdata,
  output logic        irq,
  // receive memory data path
  output logic        rxm_req,
  output logic [31:0] rxm_addr,
  output logic [7:0]  rxm_wdata,
  input  logic        rxm_ack,
  // transmit memory data path
  output logic        txm_req,
  output logic [31:0] txm_addr,
  input  logic        txm_ack,
  input  logic [7:0]  txm_rdata
);
  localparam int unsigned IDX_W = 12;
  localparam int unsigned CW    = $clog2(FIFO_DEPTH) + 1;

  ctrl_t   ctrl;
  status_t status;

  // ---------------- events, registers, TSF ----------------
  logic sof, eof, sot, eot, cca_clear, cca_busy;
  logic [NUM_EVENTS-1:0] int_ev, ev_status, ev_clr, ev_mask;
  logic [63:0] tsf, tsf_cmp;
  logic tsf_wr_lo, tsf_wr_hi, tsf_match;
  // processor FIFO path (used when DMA is off)
  logic cpu_rxf_pop, cpu_txf_push;
  logic [7:0] cpu_txf_wdata;
  logic [7:0] rxf_rdata;   // receive FIFO head, read by DMA or processor

  events u_events (
    .clk, .rst_n, .rx_frame, .tx_ready, .cca, .int_ev, .ev_clr, .ev_mask,
    .sof, .eof, .sot, .eot, .cca_clear, .cca_busy, .ev_status, .irq
  );

  ctrl_regs u_regs (
    .clk, .rst_n, .up_sel, .up_we, .up_addr, .up_wdata, .up_rdata,
    .ctrl, .status, .ev_status, .ev_clr, .ev_mask, .tsf, .tsf_wr_lo, .tsf_wr_hi, .tsf_cmp,
    .rxf_rdata, .rxf_pop(cpu_rxf_pop), .txf_push(cpu_txf_push), .txf_wdata(cpu_txf_wdata)
  );

  tsf_timer #(.CLK_MHZ(CLK_MHZ)) u_tsf (
    .clk, .rst_n, .wr_lo(tsf_wr_lo), .wr_hi(tsf_wr_hi), .wdata(up_wdata), .cmp(tsf_cmp),
    .tsf, .match(tsf_match)
  );

  // ---------------- receiver section ----------------
  logic rx_bit_en, rx_bit;
  logic [31:0] rx_crc;
  logic rx_crc_ok_now, rx_fcs_unused;
  logic [7:0] rx_raw, rx_plain, rx_ks;
  logic rx_byte_valid, rx_frame_clr, rx_crypt_active, rx_ks_next, rx_ks_ready;
  logic [IDX_W-1:0] rx_idx, rx_len;
  logic rx_busy, rx_done, rx_overflow, rx_crc_ok;
  logic addr_done, unicast, broadcast, multicast;
  logic rxf_wr, rxf_rd, rxd_fifo_rd, rxf_full, rxf_empty;
  logic [7:0] rxf_wdata;
  logic [CW-1:0] rxf_count;
  logic rxd_start, rxd_run, rxd_idle, rxd_busy, rxd_done;
  logic [15:0] rxd_count;

  net_clk_sync u_rx_sync (.clk, .rst_n, .net_clk(rx_clock), .net_data(rx_data),
                          .bit_en(rx_bit_en), .data_s(rx_bit));

  crc32_serial u_rx_crc (
    .clk, .rst_n, .init(rx_frame_clr), .bit_en(rx_bit_en && rx_busy), .din(rx_bit),
    .shift_out(1'b0), .crc(rx_crc), .crc_ok(rx_crc_ok_now), .fcs_bit(rx_fcs_unused)
  );

  rx_shift_reg u_rx_sr (
    .clk, .rst_n, .clr(rx_frame_clr), .bit_en(rx_bit_en && rx_busy), .din(rx_bit),
    .byte_out(rx_raw), .byte_valid(rx_byte_valid)
  );

  xor_cipher u_rx_xor (.din(rx_raw), .ks(rx_ks), .en(rx_crypt_active), .dout(rx_plain));

  rc4_prng #(.KEY_BYTES(KEY_BYTES)) u_rx_prng (
    .clk, .rst_n, .init(ctrl.rxkey_init), .key(ctrl.rx_key[8*KEY_BYTES-1:0]),
    .next(rx_ks_next), .ks(rx_ks), .ready(rx_ks_ready)
  );

  addr_decode #(.IDX_W(IDX_W)) u_addr (
    .clk, .rst_n, .clr(rx_frame_clr), .byte_valid(rx_byte_valid && rx_busy), .byte_idx(rx_idx),
    .byte_in(rx_plain), .sta_addr(ctrl.sta_addr), .addr_done, .unicast, .broadcast, .multicast
  );

  rx_fsm #(.IDX_W(IDX_W)) u_rx_fsm (
    .clk, .rst_n, .rx_en(ctrl.rx_en), .sof, .eof, .byte_valid(rx_byte_valid), .byte_in(rx_plain),
    .decrypt_en(ctrl.rx_decrypt), .crypt_ofs(ctrl.rx_crypt_ofs), .crc_ok_now(rx_crc_ok_now),
    .fifo_full(rxf_full), .fifo_wr(rxf_wr), .fifo_wdata(rxf_wdata), .byte_idx(rx_idx),
    .crypt_active(rx_crypt_active), .ks_next(rx_ks_next), .frame_clr(rx_frame_clr),
    .busy(rx_busy), .rx_done, .overflow(rx_overflow), .rx_len, .crc_ok(rx_crc_ok)
  );

  // the receive DMA engine owns the FIFO read port while receive DMA is enabled
  assign rxf_rd = rxd_fifo_rd || (cpu_rxf_pop && !ctrl.rx_dma_en && !rxf_empty);

  sync_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(8)) u_rx_fifo (
    .clk, .rst_n, .clr(ctrl.rxfifo_clr), .wr(rxf_wr), .wdata(rxf_wdata), .rd(rxf_rd), .rdata(rxf_rdata),
    .full(rxf_full), .empty(rxf_empty), .count(rxf_count)
  );

  rx_dma_ctrl u_rx_dma_ctrl (
    .clk, .rst_n, .dma_en(ctrl.rx_dma_en), .sof(sof && ctrl.rx_en), .rx_done, .fifo_empty(rxf_empty),
    .eng_idle(rxd_idle), .eng_start(rxd_start), .eng_run(rxd_run), .busy(rxd_busy), .done(rxd_done)
  );

  rx_dma_engine #(.AW(32)) u_rx_dma (
    .clk, .rst_n, .start(rxd_start), .base_addr(ctrl.rxdma_addr), .run(rxd_run),
    .fifo_empty(rxf_empty), .fifo_rdata(rxf_rdata), .fifo_rd(rxd_fifo_rd),
    .mem_req(rxm_req), .mem_addr(rxm_addr), .mem_wdata(rxm_wdata), .mem_ack(rxm_ack),
    .idle(rxd_idle), .count(rxd_count)
  );

  logic rx_icv_ok;

  icv_check #(.IDX_W(IDX_W)) u_rx_icv (
    .clk, .rst_n, .clr(rx_frame_clr), .en(ctrl.rx_icv), .byte_valid(rx_byte_valid && rx_busy),
    .byte_idx(rx_idx), .byte_in(rx_plain), .ofs(ctrl.rx_crypt_ofs), .icv_ok(rx_icv_ok)
  );

  // ---------------- automatic ACK ----------------
  logic [3:0] ack_idx;
  logic [7:0] ack_byte;
  logic ack_req, ack_done, ack_sent, ack_pending;

  ack_fsm #(.CLK_MHZ(CLK_MHZ), .SIFS_US(SIFS_US), .IDX_W(IDX_W)) u_ack (
    .clk, .rst_n, .auto_ack_en(ctrl.auto_ack), .rx_busy, .byte_valid(rx_byte_valid),
    .byte_idx(rx_idx), .byte_in(rx_plain), .rx_done, .crc_ok(rx_crc_ok), .unicast,
    .ack_idx, .ack_done, .ack_byte, .ack_req, .ack_sent, .pending(ack_pending)
  );

  // ---------------- transmitter section ----------------
  logic tx_bit_en, tx_clk_data_unused;
  logic txf_wr, txf_rd, txf_full, txf_empty, txe_fifo_wr;
  logic [7:0] txf_wdata, txf_rdata, txe_fifo_wdata;
  logic [CW-1:0] txf_count;
  logic [7:0] tx_raw, tx_enc, tx_ks;
  logic tx_ks_next, tx_ks_ready, tx_src_ack, tx_crypt_active;
  logic sr_load, sr_shift, sr_clr, sr_need, sr_busy, sr_dout;
  logic crc_init, crc_en, crc_shift_out, fcs_sel, tx_fcs_bit, tx_crc_ok_unused;
  logic [31:0] tx_crc;
  logic tx_busy, tx_pending, tx_done, tx_underrun;
  logic txd_start, txd_busy, txd_done, txe_busy, txe_done;
  logic [31:0] txd_addr;
  logic [15:0] txd_len;

  net_clk_sync u_tx_sync (.clk, .rst_n, .net_clk(tx_clock), .net_data(1'b0),
                          .bit_en(tx_bit_en), .data_s(tx_clk_data_unused));

  tx_dma_ctrl #(.AW(32)) u_tx_dma_ctrl (
    .clk, .rst_n, .go(ctrl.txdma_go), .addr(ctrl.txdma_addr), .len(ctrl.txdma_len),
    .eng_done(txe_done), .eng_start(txd_start), .eng_addr(txd_addr), .eng_len(txd_len),
    .busy(txd_busy), .done(txd_done)
  );

  tx_dma_engine #(.AW(32)) u_tx_dma (
    .clk, .rst_n, .start(txd_start), .base_addr(txd_addr), .length(txd_len),
    .fifo_full(txf_full), .fifo_wr(txe_fifo_wr), .fifo_wdata(txe_fifo_wdata),
    .mem_req(txm_req), .mem_addr(txm_addr), .mem_ack(txm_ack), .mem_rdata(txm_rdata),
    .busy(txe_busy), .done(txe_done)
  );

  // processor writes reach the FIFO only while the transmit DMA engine is idle
  assign txf_wr    = txe_fifo_wr || (cpu_txf_push && !txe_busy && !txf_full);
  assign txf_wdata = txe_busy ? txe_fifo_wdata : cpu_txf_wdata;

  sync_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(8)) u_tx_fifo (
    .clk, .rst_n, .clr(ctrl.txfifo_clr), .wr(txf_wr), .wdata(txf_wdata), .rd(txf_rd), .rdata(txf_rdata),
    .full(txf_full), .empty(txf_empty), .count(txf_count)
  );

  rc4_prng #(.KEY_BYTES(KEY_BYTES)) u_tx_prng (
    .clk, .rst_n, .init(ctrl.txkey_init), .key(ctrl.tx_key[8*KEY_BYTES-1:0]),
    .next(tx_ks_next), .ks(tx_ks), .ready(tx_ks_ready)
  );

  logic tx_icv_sel, tx_icv_upd;
  logic [1:0] tx_icv_k;
  logic [7:0] tx_icv_byte;
  logic [31:0] tx_icv_crc_unused;
  logic tx_icv_ok_unused;

  icv_crc32 u_tx_icv (
    .clk, .rst_n, .init(crc_init), .en(tx_icv_upd), .din(txf_rdata), .sel(tx_icv_k),
    .crc(tx_icv_crc_unused), .icv_byte(tx_icv_byte), .icv_ok(tx_icv_ok_unused)
  );

  assign tx_raw = tx_src_ack ? ack_byte : (tx_icv_sel ? tx_icv_byte : txf_rdata);

  xor_cipher u_tx_xor (.din(tx_raw), .ks(tx_ks), .en(tx_crypt_active), .dout(tx_enc));

  tx_fsm #(.IDX_W(IDX_W)) u_tx_fsm (
    .clk, .rst_n, .tx_start(ctrl.tx_start), .tx_len(ctrl.tx_len), .encrypt_en(ctrl.tx_encrypt),
    .icv_en(ctrl.tx_icv), .icv_sel(tx_icv_sel), .icv_k(tx_icv_k), .icv_upd(tx_icv_upd),
    .crypt_ofs(ctrl.tx_crypt_ofs), .cca_busy, .sot, .eot, .bit_en(tx_bit_en),
    .fifo_empty(txf_empty), .ks_ready(tx_ks_ready), .ack_req, .sr_need,
    .fifo_rd(txf_rd), .ks_next(tx_ks_next), .src_ack(tx_src_ack), .ack_idx, .ack_done,
    .crypt_active(tx_crypt_active), .sr_load, .sr_shift, .sr_clr, .crc_init, .crc_en, .crc_shift_out,
    .fcs_sel, .tx_request, .busy(tx_busy), .pending(tx_pending), .tx_done, .underrun(tx_underrun)
  );

  tx_shift_reg u_tx_sr (
    .clk, .rst_n, .clr(sr_clr), .load(sr_load), .din(tx_enc), .bit_en(sr_shift),
    .dout(sr_dout), .busy(sr_busy), .need(sr_need)
  );

  crc32_serial u_tx_crc (
    .clk, .rst_n, .init(crc_init), .bit_en(crc_en), .din(sr_dout), .shift_out(crc_shift_out),
    .crc(tx_crc), .crc_ok(tx_crc_ok_unused), .fcs_bit(tx_fcs_bit)
  );

  assign tx_data = fcs_sel ? tx_fcs_bit : sr_dout;

  // ---------------- events and status ----------------
  always_comb begin
    int_ev = '0;
    int_ev[EV_TSF_MATCH] = tsf_match;
    int_ev[EV_RX_DMA]    = rxd_done;
    int_ev[EV_TX_DMA]    = txd_done;
    int_ev[EV_RX_DONE]   = rx_done;
    int_ev[EV_TX_DONE]   = tx_done;
    int_ev[EV_ACK_SENT]  = ack_sent;
    int_ev[EV_RX_OVF]    = rx_overflow;
    int_ev[EV_TX_UNDER]  = tx_underrun;

    status = '0;
    status.rx_busy      = rx_busy;
    status.tx_busy      = tx_busy || tx_pending;
    status.rx_crc_ok    = rx_crc_ok;
    status.rx_unicast   = unicast;
    status.rx_broadcast = broadcast;
    status.rx_multicast = multicast;
    status.rx_dma_busy  = rxd_busy;
    status.tx_dma_busy  = txd_busy || txe_busy;
    status.rxkey_ready  = rx_ks_ready;
    status.txkey_ready  = tx_ks_ready;
    status.cca_busy     = cca_busy;
    status.ack_pending  = ack_pending;
    status.rx_icv_ok    = rx_icv_ok;
    status.rxf_empty    = rxf_empty;
    status.txf_full     = txf_full;
    status.rx_len       = rx_len;
  end
endmodule
