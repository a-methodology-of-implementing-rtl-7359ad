// ack_fsm: automatic control-frame transmission state machine.
//
// Watches the received bytes and keeps the first frame control byte (index 0)
// and the transmitter address (address 2, indices 10..15). When a frame ends
// (`rx_done`) with a good FCS, addressed to this station (`unicast`), not itself
// a control frame, and automatic acknowledgement is enabled, it waits SIFS
// (SIFS_US microseconds of CLK_MHZ clocks) and then raises `ack_req`. The
// transmit state machine reads the ACK frame a byte at a time by `ack_idx`
// from `ack_byte` (frame control D4 00, duration 00 00, receiver address = the
// saved address 2; the FCS is added by the transmitter) and reports the end of
// transmission with `ack_done`, which drops the request and pulses `ack_sent`.
// Sending a control frame automatically after a correct unicast reception is
// the document's; the ACK format and SIFS value come from IEEE 802.11.
module ack_fsm
  import mac_pkg::*;
#(
  parameter int unsigned CLK_MHZ = 44,
  parameter int unsigned SIFS_US = 10,
  parameter int unsigned IDX_W   = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             auto_ack_en,
  input  logic             rx_busy,
  input  logic             byte_valid,
  input  logic [IDX_W-1:0] byte_idx,
  input  logic [7:0]       byte_in,
  input  logic             rx_done,
  input  logic             crc_ok,
  input  logic             unicast,
  input  logic [3:0]       ack_idx,
  input  logic             ack_done,
  output logic [7:0]       ack_byte,
  output logic             ack_req,
  output logic             ack_sent,
  output logic             pending
);
  localparam int unsigned SIFS_CYC = CLK_MHZ * SIFS_US;
  localparam int unsigned CW = $clog2(SIFS_CYC + 1);

  typedef enum logic [1:0] {IDLE, SIFS, REQ} state_e;
  state_e state;
  logic [7:0]    fc0;
  logic [47:0]   ta;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fc0 <= '0; ta <= '0;
    end else if (rx_busy && byte_valid) begin
      if (byte_idx == '0) fc0 <= byte_in;
      if (byte_idx >= IDX_W'(10) && byte_idx < IDX_W'(16))
        ta[8*(byte_idx - IDX_W'(10)) +: 8] <= byte_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; cnt <= '0; ack_sent <= 1'b0;
    end else begin
      ack_sent <= 1'b0;
      case (state)
        IDLE: if (rx_done && crc_ok && unicast && auto_ack_en && fc0[3:2] != 2'b01) begin
          cnt <= '0; state <= SIFS;
        end
        SIFS: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(SIFS_CYC - 1)) state <= REQ;
        end
        REQ: if (ack_done) begin
          ack_sent <= 1'b1; state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    case (ack_idx)
      4'd0:    ack_byte = ACK_FC0;
      4'd1, 4'd2, 4'd3: ack_byte = 8'h00;
      default: ack_byte = (ack_idx <= 4'd9) ? ta[8*(ack_idx - 4'd4) +: 8] : 8'h00;
    endcase
  end

  assign ack_req = (state == REQ);
  assign pending = (state != IDLE);
endmodule
