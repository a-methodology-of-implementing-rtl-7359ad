// addr_decode: receive address decoder (a parallel function of the receiver).
//
// Watches the received bytes together with their position in the frame and
// collects the receiver address (address 1, bytes ADDR_OFFSET..ADDR_OFFSET+5 of
// the IEEE 802.11 MAC header, first byte in bits 7:0). When the sixth address
// byte has been taken `addr_done` rises and the flags are valid until the next
// `clr` (Start of Frame): `unicast` when the address equals `sta_addr`,
// `broadcast` when it is all ones, `multicast` when its group bit (bit 0 of the
// first byte) is set and it is not broadcast. Flags settle one cycle after the
// last address byte. Comparing the packet address with the station address to
// classify unicast/broadcast/multicast follows the document; the header offset
// and group bit come from IEEE 802.11.
module addr_decode #(
  parameter int unsigned ADDR_OFFSET = 4,
  parameter int unsigned IDX_W       = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             byte_valid,
  input  logic [IDX_W-1:0] byte_idx,
  input  logic [7:0]       byte_in,
  input  logic [47:0]      sta_addr,
  output logic             addr_done,
  output logic             unicast,
  output logic             broadcast,
  output logic             multicast
);
  logic [47:0] addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0; addr_done <= 1'b0;
    end else if (clr) begin
      addr_done <= 1'b0;
    end else if (byte_valid && byte_idx >= IDX_W'(ADDR_OFFSET) &&
                 byte_idx < IDX_W'(ADDR_OFFSET + 6)) begin
      addr[8*(byte_idx - IDX_W'(ADDR_OFFSET)) +: 8] <= byte_in;
      if (byte_idx == IDX_W'(ADDR_OFFSET + 5)) addr_done <= 1'b1;
    end
  end

  always_comb begin
    broadcast = addr_done && (addr == '1);
    multicast = addr_done && addr[0] && !(addr == '1);
    unicast   = addr_done && (addr == sta_addr);
  end
endmodule
