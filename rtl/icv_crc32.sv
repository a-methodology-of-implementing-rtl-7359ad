// icv_crc32: byte-wide CRC-32 for the WEP integrity check value (ICV).
//
// A parallel function in the transmit and receive sections: it works on whole
// bytes of frame body, next to the XOR, rather than on the serial line. The
// register is preset to all ones by `init`; on each `en` it absorbs `din`
// (all eight bits, LSB first, in one clock) using the reflected form of the
// CRC-32 generator (0xEDB88320, shifted LSB first). This gives the same CRC-32
// as the 802.11 FCS, and lets the ICV bytes be read straight out of the
// register: `icv_byte` is byte `sel` (0 = first sent) of the one's complement
// of the register. After the body and a correct ICV have been absorbed, the
// register holds the constant 0xDEBB20E3 and `icv_ok` is high. The register
// updates on the clock edge that takes a byte; outputs are combinational from
// the register. That an ICV is a parallel function added to the packet follows
// the document; the CRC-32 and the byte order of the ICV follow IEEE 802.11;
// the byte-parallel form is this design's choice.
module icv_crc32
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  din,
  input  logic [1:0]  sel,
  output logic [31:0] crc,
  output logic [7:0]  icv_byte,
  output logic        icv_ok
);
  logic [31:0] nxt;

  always_comb begin
    nxt = crc;
    for (int i = 0; i < 8; i++) begin
      nxt = (nxt[0] ^ din[i]) ? ((nxt >> 1) ^ ICV_POLY_REFL) : (nxt >> 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    crc <= '1;
    else if (init) crc <= '1;
    else if (en)   crc <= nxt;
  end

  assign icv_byte = ~crc[8*sel +: 8];
  assign icv_ok   = (crc == ICV_RESIDUE);
endmodule
