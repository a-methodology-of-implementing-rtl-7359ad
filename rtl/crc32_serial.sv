// crc32_serial: bit-serial CRC-32 engine (IEEE 802.11 frame check sequence).
//
// One instance sits on the receive serial line and one on the transmit serial
// line, next to the shift register, without altering the bit stream. The
// register is preset to all ones by `init`; at every `bit_en` it takes `din`
// (first bit of each byte = its LSB) through the generator 0x04C11DB7, MSB-first
// shift. On receive, after the last FCS bit `crc_ok` is high when the register
// holds the good-frame residue 0xC704DD7B. On transmit, `shift_out` turns the
// register into a plain shift register: `fcs_bit` (inverted MSB) is the next FCS
// bit and each `bit_en` moves to the following one, so 32 strobes emit the FCS
// x^31 term first. Results update on the clock edge that takes a bit.
// The role of the block follows the document; polynomial and bit order follow
// IEEE 802.11; the FCS shift mode is this design's way of appending the FCS.
module crc32_serial
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        bit_en,
  input  logic        din,
  input  logic        shift_out,
  output logic [31:0] crc,
  output logic        crc_ok,
  output logic        fcs_bit
);
  logic fb;
  assign fb = crc[31] ^ din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        crc <= '1;
    else if (init)     crc <= '1;
    else if (bit_en) begin
      if (shift_out)   crc <= {crc[30:0], 1'b1};
      else             crc <= {crc[30:0], 1'b0} ^ (fb ? CRC_POLY : 32'h0);
    end
  end

  assign crc_ok  = (crc == CRC_RESIDUE);
  assign fcs_bit = ~crc[31];
endmodule
