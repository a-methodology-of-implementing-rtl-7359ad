// rx_fsm: receive state machine.
//
// While reception is enabled, a Start of Frame event opens a frame: it pulses
// `frame_clr` (realigns the shift register, presets the CRC, clears the address
// decoder) and zeroes the byte index. Each byte from the shift register, already
// passed through the XOR, is written to the receive FIFO and the index advances;
// a byte that finds the FIFO full is dropped and `overflow` pulses. `byte_idx`
// is the position of the byte now arriving; `crypt_active` tells the XOR to
// decrypt it (decryption enabled and index at or past `crypt_ofs`), and
// `ks_next` consumes one keystream byte per decrypted byte. The End of Frame
// event closes the frame: `crc_ok` and `rx_len` (bytes stored, FCS included)
// are latched and `rx_done` pulses. The document's receive state machine
// "accepts the receive bytes and stores them in the FIFO"; the frame
// delimiting, overflow handling and offset-based decryption are this design's.
module rx_fsm #(
  parameter int unsigned IDX_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rx_en,
  input  logic             sof,
  input  logic             eof,
  input  logic             byte_valid,
  input  logic [7:0]       byte_in,
  input  logic             decrypt_en,
  input  logic [IDX_W-1:0] crypt_ofs,
  input  logic             crc_ok_now,
  input  logic             fifo_full,
  output logic             fifo_wr,
  output logic [7:0]       fifo_wdata,
  output logic [IDX_W-1:0] byte_idx,
  output logic             crypt_active,
  output logic             ks_next,
  output logic             frame_clr,
  output logic             busy,
  output logic             rx_done,
  output logic             overflow,
  output logic [IDX_W-1:0] rx_len,
  output logic             crc_ok
);
  typedef enum logic [1:0] {IDLE, RECV, DONE} state_e;
  state_e state;
  logic [IDX_W-1:0] stored;

  assign busy         = (state == RECV);
  assign frame_clr    = (state == IDLE) && rx_en && sof;
  assign crypt_active = busy && decrypt_en && (byte_idx >= crypt_ofs);
  assign fifo_wr      = busy && byte_valid && !fifo_full;
  assign fifo_wdata   = byte_in;
  assign ks_next      = busy && byte_valid && crypt_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; byte_idx <= '0; stored <= '0; rx_len <= '0; crc_ok <= 1'b0;
      rx_done <= 1'b0; overflow <= 1'b0;
    end else begin
      rx_done  <= 1'b0;
      overflow <= 1'b0;
      case (state)
        IDLE: if (frame_clr) begin
          byte_idx <= '0; stored <= '0; state <= RECV;
        end
        RECV: begin
          if (byte_valid) begin
            byte_idx <= byte_idx + 1'b1;
            if (fifo_full) overflow <= 1'b1;
            else           stored   <= stored + 1'b1;
          end
          if (eof) state <= DONE;
        end
        DONE: begin
          rx_len  <= stored;
          crc_ok  <= crc_ok_now;
          rx_done <= 1'b1;
          state   <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
