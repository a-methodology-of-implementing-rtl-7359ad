// mac_pkg: types and constants shared by the IEEE 802.11 customized network block.
//
// Holds the CRC-32 constants of the 802.11 frame check sequence, the event
// numbering used by the events section and the event register, the register
// map seen by the processor, and the control/status bundles that pass between
// the control registers and the state machines. The FCS constants come from
// IEEE 802.11; the register map and event numbering are this design's choice.
package mac_pkg;

  // CRC-32 generator x^32+x^26+...+1, shifted MSB first; good-frame residue.
  localparam logic [31:0] CRC_POLY    = 32'h04C1_1DB7;
  localparam logic [31:0] CRC_RESIDUE = 32'hC704_DD7B;

  // WEP ICV: the same CRC-32, computed byte-wise in reflected form
  // (register shifted LSB first). Register value after data plus a correct ICV.
  localparam logic [31:0] ICV_POLY_REFL = 32'hEDB8_8320;
  localparam logic [31:0] ICV_RESIDUE   = 32'hDEBB_20E3;
  localparam int unsigned ICV_LEN       = 4;

  // ACK control frame: frame control byte 0 (type 01 control, subtype 1101).
  localparam logic [7:0] ACK_FC0 = 8'hD4;
  localparam int unsigned ACK_LEN = 10;  // bytes before the FCS

  // Event numbers (bit positions in the event register).
  typedef enum int unsigned {
    EV_SOF        = 0,   // start of received frame
    EV_EOF        = 1,   // end of received frame
    EV_SOT        = 2,   // start of transmission (PHY ready)
    EV_EOT        = 3,   // end of transmission
    EV_CCA_CLEAR  = 4,   // channel became idle
    EV_TSF_MATCH  = 5,   // TSF reached compare value
    EV_RX_DMA     = 6,   // receive DMA block done
    EV_TX_DMA     = 7,   // transmit DMA block done
    EV_RX_DONE    = 8,   // frame received (status latched)
    EV_TX_DONE    = 9,   // frame transmitted
    EV_ACK_SENT   = 10,  // automatic ACK transmitted
    EV_RX_OVF     = 11,  // receive FIFO overflow
    EV_TX_UNDER   = 12   // transmit FIFO underrun
  } event_e;
  localparam int unsigned NUM_EVENTS = 13;

  // Register word addresses.
  typedef enum logic [4:0] {
    R_CTRL       = 5'h00,
    R_STATUS     = 5'h01,
    R_EVENT      = 5'h02,
    R_EVMASK     = 5'h03,
    R_STA_LO     = 5'h04,
    R_STA_HI     = 5'h05,
    R_TXKEY_LO   = 5'h06,
    R_TXKEY_HI   = 5'h07,
    R_RXKEY_LO   = 5'h08,
    R_RXKEY_HI   = 5'h09,
    R_CRYPT_OFS  = 5'h0A,
    R_TX_LEN     = 5'h0B,
    R_TXDMA_ADDR = 5'h0C,
    R_TXDMA_LEN  = 5'h0D,
    R_RXDMA_ADDR = 5'h0E,
    R_RX_LEN     = 5'h0F,
    R_TSF_LO     = 5'h10,
    R_TSF_HI     = 5'h11,
    R_TSFCMP_LO  = 5'h12,
    R_TSFCMP_HI  = 5'h13,
    R_RXFIFO     = 5'h14,   // read: bit 8 valid, 7:0 byte; pops the byte
    R_TXFIFO     = 5'h15    // write: pushes bits 7:0
  } reg_addr_e;

  // R_CTRL bits. Bits 5..8, 11 and 12 are commands: they read back as 0.
  // Bits 9/10 enable ICV generation (transmit) and checking (receive).
  localparam int unsigned C_RX_EN      = 0;
  localparam int unsigned C_RX_DMA_EN  = 1;
  localparam int unsigned C_AUTO_ACK   = 2;
  localparam int unsigned C_RX_DECRYPT = 3;
  localparam int unsigned C_TX_ENCRYPT = 4;
  localparam int unsigned C_TX_START   = 5;
  localparam int unsigned C_TXDMA_GO   = 6;
  localparam int unsigned C_RXKEY_INIT = 7;
  localparam int unsigned C_TXKEY_INIT = 8;
  localparam int unsigned C_TX_ICV     = 9;
  localparam int unsigned C_RX_ICV     = 10;
  localparam int unsigned C_RXFIFO_CLR = 11;
  localparam int unsigned C_TXFIFO_CLR = 12;

  // Control bundle: registers to state machines.
  typedef struct packed {
    logic        rx_en;
    logic        rx_dma_en;
    logic        auto_ack;
    logic        rx_decrypt;
    logic        tx_encrypt;
    logic        tx_start;      // one-cycle command
    logic        txdma_go;      // one-cycle command
    logic        rxkey_init;    // one-cycle command
    logic        txkey_init;    // one-cycle command
    logic        tx_icv;
    logic        rx_icv;
    logic        rxfifo_clr;    // one-cycle command
    logic        txfifo_clr;    // one-cycle command
    logic [47:0] sta_addr;
    logic [63:0] tx_key;
    logic [63:0] rx_key;
    logic [11:0] tx_crypt_ofs;
    logic [11:0] rx_crypt_ofs;
    logic [11:0] tx_len;
    logic [31:0] txdma_addr;
    logic [15:0] txdma_len;
    logic [31:0] rxdma_addr;
  } ctrl_t;

  // Status bundle: state machines to registers.
  typedef struct packed {
    logic        rx_busy;
    logic        tx_busy;
    logic        rx_crc_ok;
    logic        rx_unicast;
    logic        rx_broadcast;
    logic        rx_multicast;
    logic        rx_dma_busy;
    logic        tx_dma_busy;
    logic        rxkey_ready;
    logic        txkey_ready;
    logic        cca_busy;
    logic        ack_pending;
    logic        rx_icv_ok;
    logic        rxf_empty;
    logic        txf_full;
    logic [11:0] rx_len;
  } status_t;

endpackage
