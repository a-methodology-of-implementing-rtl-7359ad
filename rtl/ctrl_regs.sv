// ctrl_regs: control registers section with the processor interface.
//
// A bank of 32-bit registers on a simple synchronous bus: with `up_sel` high a
// write (`up_we`) takes effect at the clock edge, and `up_rdata` shows the
// addressed register combinationally. Register map (word addresses, see
// mac_pkg::reg_addr_e): CTRL (enables in bits 0..4, 9, 10; bits 5..8 are
// one-cycle commands: start transmission, start transmit DMA, start
// receive/transmit key schedule),
// STATUS (read only), EVENT (write one to clear), EVMASK, station address,
// transmit and receive WEP seeds, cipher start offsets (tx in 11:0, rx in
// 27:16), transmit frame length, transmit DMA address/length, receive DMA
// address, received length (read only), TSF counter and TSF compare value.
// The TSF halves are written through `tsf_wr_lo/hi`. RXFIFO and TXFIFO give
// the processor the FIFO data path for use without DMA: reading RXFIFO shows
// the head of the receive FIFO (bit 8 = a byte was there) and raises `rxf_pop`
// for each clock `up_sel` is high, so a read must select it for one clock;
// writing TXFIFO raises `txf_push` with the byte on `txf_wdata`. The top
// decides whether the FIFO takes the pop or push. CTRL bits 11 and 12 flush the
// receive and transmit FIFO. The document lists the kinds of registers (state
// machine control, DMA, encryption, status, TSF) and says FIFOs connect to the
// DMA engines "or to the control registers section"; the map and bus are this
// design's choices.
module ctrl_regs
  import mac_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  up_sel,
  input  logic                  up_we,
  input  logic [4:0]            up_addr,
  input  logic [31:0]           up_wdata,
  output logic [31:0]           up_rdata,
  output ctrl_t                 ctrl,
  input  status_t               status,
  input  logic [NUM_EVENTS-1:0] ev_status,
  output logic [NUM_EVENTS-1:0] ev_clr,
  output logic [NUM_EVENTS-1:0] ev_mask,
  input  logic [63:0]           tsf,
  output logic                  tsf_wr_lo,
  output logic                  tsf_wr_hi,
  output logic [63:0]           tsf_cmp,
  input  logic [7:0]            rxf_rdata,
  output logic                  rxf_pop,
  output logic                  txf_push,
  output logic [7:0]            txf_wdata
);
  logic wr;
  assign wr = up_sel && up_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl    <= '0;
      ev_mask <= '0;
      tsf_cmp <= '1;
    end else begin
      ctrl.tx_start   <= 1'b0;
      ctrl.txdma_go   <= 1'b0;
      ctrl.rxkey_init <= 1'b0;
      ctrl.txkey_init <= 1'b0;
      ctrl.rxfifo_clr <= 1'b0;
      ctrl.txfifo_clr <= 1'b0;
      if (wr) begin
        case (reg_addr_e'(up_addr))
          R_CTRL: begin
            ctrl.rx_en      <= up_wdata[C_RX_EN];
            ctrl.rx_dma_en  <= up_wdata[C_RX_DMA_EN];
            ctrl.auto_ack   <= up_wdata[C_AUTO_ACK];
            ctrl.rx_decrypt <= up_wdata[C_RX_DECRYPT];
            ctrl.tx_encrypt <= up_wdata[C_TX_ENCRYPT];
            ctrl.tx_start   <= up_wdata[C_TX_START];
            ctrl.txdma_go   <= up_wdata[C_TXDMA_GO];
            ctrl.rxkey_init <= up_wdata[C_RXKEY_INIT];
            ctrl.txkey_init <= up_wdata[C_TXKEY_INIT];
            ctrl.tx_icv     <= up_wdata[C_TX_ICV];
            ctrl.rx_icv     <= up_wdata[C_RX_ICV];
            ctrl.rxfifo_clr <= up_wdata[C_RXFIFO_CLR];
            ctrl.txfifo_clr <= up_wdata[C_TXFIFO_CLR];
          end
          R_EVMASK:     ev_mask                 <= up_wdata[NUM_EVENTS-1:0];
          R_STA_LO:     ctrl.sta_addr[31:0]     <= up_wdata;
          R_STA_HI:     ctrl.sta_addr[47:32]    <= up_wdata[15:0];
          R_TXKEY_LO:   ctrl.tx_key[31:0]       <= up_wdata;
          R_TXKEY_HI:   ctrl.tx_key[63:32]      <= up_wdata;
          R_RXKEY_LO:   ctrl.rx_key[31:0]       <= up_wdata;
          R_RXKEY_HI:   ctrl.rx_key[63:32]      <= up_wdata;
          R_CRYPT_OFS: begin
            ctrl.tx_crypt_ofs <= up_wdata[11:0];
            ctrl.rx_crypt_ofs <= up_wdata[27:16];
          end
          R_TX_LEN:     ctrl.tx_len             <= up_wdata[11:0];
          R_TXDMA_ADDR: ctrl.txdma_addr         <= up_wdata;
          R_TXDMA_LEN:  ctrl.txdma_len          <= up_wdata[15:0];
          R_RXDMA_ADDR: ctrl.rxdma_addr         <= up_wdata;
          R_TSFCMP_LO:  tsf_cmp[31:0]           <= up_wdata;
          R_TSFCMP_HI:  tsf_cmp[63:32]          <= up_wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    ev_clr    = '0;
    tsf_wr_lo = wr && (up_addr == R_TSF_LO);
    tsf_wr_hi = wr && (up_addr == R_TSF_HI);
    if (wr && up_addr == R_EVENT) ev_clr = up_wdata[NUM_EVENTS-1:0];
  end

  assign rxf_pop   = up_sel && !up_we && (up_addr == R_RXFIFO);
  assign txf_push  = wr && (up_addr == R_TXFIFO);
  assign txf_wdata = up_wdata[7:0];

  always_comb begin
    up_rdata = '0;
    case (reg_addr_e'(up_addr))
      R_CTRL: begin
        up_rdata[4:0] = {ctrl.tx_encrypt, ctrl.rx_decrypt, ctrl.auto_ack,
                         ctrl.rx_dma_en, ctrl.rx_en};
        up_rdata[C_TX_ICV] = ctrl.tx_icv;
        up_rdata[C_RX_ICV] = ctrl.rx_icv;
      end
      R_STATUS:     up_rdata[14:0] = {status.txf_full, status.rxf_empty, status.rx_icv_ok, status.ack_pending, status.cca_busy, status.txkey_ready,
                                      status.rxkey_ready, status.tx_dma_busy, status.rx_dma_busy,
                                      status.rx_multicast, status.rx_broadcast, status.rx_unicast,
                                      status.rx_crc_ok, status.tx_busy, status.rx_busy};
      R_EVENT:      up_rdata[NUM_EVENTS-1:0] = ev_status;
      R_EVMASK:     up_rdata[NUM_EVENTS-1:0] = ev_mask;
      R_STA_LO:     up_rdata = ctrl.sta_addr[31:0];
      R_STA_HI:     up_rdata[15:0] = ctrl.sta_addr[47:32];
      R_TXKEY_LO:   up_rdata = ctrl.tx_key[31:0];
      R_TXKEY_HI:   up_rdata = ctrl.tx_key[63:32];
      R_RXKEY_LO:   up_rdata = ctrl.rx_key[31:0];
      R_RXKEY_HI:   up_rdata = ctrl.rx_key[63:32];
      R_CRYPT_OFS:  up_rdata = {4'h0, ctrl.rx_crypt_ofs, 4'h0, ctrl.tx_crypt_ofs};
      R_TX_LEN:     up_rdata[11:0] = ctrl.tx_len;
      R_TXDMA_ADDR: up_rdata = ctrl.txdma_addr;
      R_TXDMA_LEN:  up_rdata[15:0] = ctrl.txdma_len;
      R_RXDMA_ADDR: up_rdata = ctrl.rxdma_addr;
      R_RX_LEN:     up_rdata[11:0] = status.rx_len;
      R_TSF_LO:     up_rdata = tsf[31:0];
      R_TSF_HI:     up_rdata = tsf[63:32];
      R_TSFCMP_LO:  up_rdata = tsf_cmp[31:0];
      R_TSFCMP_HI:  up_rdata = tsf_cmp[63:32];
      R_RXFIFO:     up_rdata[8:0] = {!status.rxf_empty, rxf_rdata};
      default:      up_rdata = '0;
    endcase
  end
endmodule
