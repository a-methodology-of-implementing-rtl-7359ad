// tx_fsm: transmit state machine.
//
// A `tx_start` command marks a data frame of `tx_len` bytes (FCS excluded) as
// pending. From IDLE the machine picks a pending ACK first (from the automatic
// control-frame machine, ACK_LEN bytes, never encrypted), otherwise a pending
// data frame once CCA reports the channel idle. It presets the CRC, raises
// `tx_request` to the PHY and preloads the first byte into the shift register.
// After the Start of Transmission event every bit strobe hands one bit to the
// PHY (`sr_shift` advances the shift register); whenever the shift register runs empty the next byte is loaded from the
// FIFO (or the ACK generator), passed through the XOR (`crypt_active` for bytes
// at or past `crypt_ofs` when encryption is on, consuming a keystream byte via
// `ks_next`). If a bit is due and no byte could be loaded, the frame is
// aborted and `underrun` pulses. After the last byte the line switches to the
// CRC engine (`fcs_sel`, `crc_shift_out`) for 32 bit strobes, then
// `tx_request` drops and the End of Transmission event completes the frame
// (`tx_done` for a data frame, `ack_done` for an ACK). `crc_en` tells the CRC
// engine which strobes carry frame bits. With `icv_en` the last ICV_LEN of the
// `tx_len` bytes are not taken from the FIFO: `icv_sel` selects the ICV
// generator instead, `icv_k` names the ICV byte, and `icv_upd` feeds each
// plaintext FIFO byte at or past `crypt_ofs` to the ICV CRC as it is loaded.
// The document's transmit state machine
// "accepts data from FIFO and transmits them over the network"; the PHY
// handshake, CCA gating, ACK priority and underrun rule are this design's.
module tx_fsm
  import mac_pkg::*;
#(
  parameter int unsigned IDX_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tx_start,
  input  logic [IDX_W-1:0] tx_len,
  input  logic             encrypt_en,
  input  logic             icv_en,
  input  logic [IDX_W-1:0] crypt_ofs,
  input  logic             cca_busy,
  input  logic             sot,
  input  logic             eot,
  input  logic             bit_en,
  input  logic             fifo_empty,
  input  logic             ks_ready,
  input  logic             ack_req,
  input  logic             sr_need,
  output logic             fifo_rd,
  output logic             ks_next,
  output logic             src_ack,
  output logic [3:0]       ack_idx,
  output logic             ack_done,
  output logic             crypt_active,
  output logic             icv_sel,
  output logic [1:0]       icv_k,
  output logic             icv_upd,
  output logic             sr_load,
  output logic             sr_shift,
  output logic             sr_clr,
  output logic             crc_init,
  output logic             crc_en,
  output logic             crc_shift_out,
  output logic             fcs_sel,
  output logic             tx_request,
  output logic             busy,
  output logic             pending,
  output logic             tx_done,
  output logic             underrun
);
  typedef enum logic [2:0] {IDLE, REQ, DATA, FCS, TAIL} state_e;
  state_e state;

  logic [IDX_W-1:0] idx, len;
  logic [5:0]       fcs_cnt;
  logic             avail, more, aborted;

  assign more         = (idx < len);
  assign crypt_active = !src_ack && encrypt_en && (idx >= crypt_ofs);
  assign icv_sel      = !src_ack && icv_en && 
                        (({1'b0, idx} + (IDX_W+1)'(ICV_LEN)) >= {1'b0, len});
  assign icv_k        = idx[1:0] - len[1:0];
  assign avail        = src_ack || ((icv_sel || !fifo_empty) && (!crypt_active || ks_ready));
  assign ack_idx      = idx[3:0];

  always_comb begin
    sr_load = 1'b0;
    if ((state == REQ || state == DATA) && sr_need && more && avail &&
        !(state == DATA && bit_en))
      sr_load = 1'b1;
  end

  assign sr_shift      = (state == DATA) && bit_en;
  assign fifo_rd       = sr_load && !src_ack && !icv_sel;
  assign icv_upd       = fifo_rd && (idx >= crypt_ofs);
  assign ks_next       = sr_load && crypt_active;
  assign crc_en        = (state == DATA && bit_en && !sr_need) || (state == FCS && bit_en);
  assign crc_shift_out = (state == FCS);
  assign fcs_sel       = (state == FCS);
  assign tx_request    = (state == REQ || state == DATA || state == FCS);
  assign busy          = (state != IDLE);
  assign crc_init      = (state == IDLE);
  // combinational so that the ACK machine drops its request on the same edge
  // on which this machine returns to IDLE
  assign ack_done      = (state == TAIL) && eot && src_ack;
  assign sr_clr        = (state == IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; idx <= '0; len <= '0; fcs_cnt <= '0; src_ack <= 1'b0;
      pending <= 1'b0; tx_done <= 1'b0; underrun <= 1'b0; aborted <= 1'b0;
    end else begin
      tx_done  <= 1'b0;
      underrun <= 1'b0;
      if (tx_start) pending <= 1'b1;
      case (state)
        IDLE: begin
          idx <= '0; fcs_cnt <= '0; aborted <= 1'b0;
          if (ack_req) begin
            src_ack <= 1'b1; len <= IDX_W'(ACK_LEN); state <= REQ;
          end else if ((pending || tx_start) && !cca_busy) begin
            src_ack <= 1'b0; len <= tx_len; state <= REQ;
          end
        end
        REQ: begin
          if (sr_load) idx <= idx + 1'b1;
          if (sot) state <= DATA;
        end
        DATA: begin
          if (sr_load) idx <= idx + 1'b1;
          if (bit_en && sr_need) begin
            if (more) begin
              underrun <= 1'b1; aborted <= 1'b1; state <= TAIL;
            end
          end else if (sr_need && !more) begin
            state <= FCS;
          end
        end
        FCS: if (bit_en) begin
          fcs_cnt <= fcs_cnt + 1'b1;
          if (fcs_cnt == 6'd31) state <= TAIL;
        end
        TAIL: if (eot) begin
          if (!src_ack) begin
            pending <= 1'b0;
            if (!aborted) tx_done <= 1'b1;
          end
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
