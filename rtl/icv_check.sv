// icv_check: receive-side WEP integrity check.
//
// Checks the ICV of a decrypted frame while it is being received. The receive
// section only learns where a frame ends at End of Frame, and the last four
// bytes are then the FCS, which the ICV does not cover. So the decrypted bytes
// pass through a four-byte delay line, and a byte reaches the CRC (icv_crc32)
// only when four newer bytes have arrived behind it. Bytes before index `ofs`
// (the 802.11 header and the IV field) are not included. Once the frame has
// ended, the CRC has absorbed the body and the ICV, and `icv_ok` is high
// when the ICV was correct and checking is enabled (`en`). `clr` (start of
// frame) empties the delay line and presets the CRC; `byte_valid` with
// `byte_idx`/`byte_in` delivers each decrypted byte. `icv_ok` is valid from
// the clock after the last byte until the next `clr`. Checking the ICV in
// hardware is this design's extension of the document's parallel functions;
// the check itself follows IEEE 802.11.
module icv_check
  import mac_pkg::*;
#(
  parameter int unsigned IDX_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic             byte_valid,
  input  logic [IDX_W-1:0] byte_idx,
  input  logic [7:0]       byte_in,
  input  logic [IDX_W-1:0] ofs,
  output logic             icv_ok
);
  logic [7:0] dly [ICV_LEN];
  logic [ICV_LEN-1:0] in_body;
  logic [31:0] crc_unused;
  logic [7:0]  byte_unused;
  logic        ok_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_body <= '0;
      for (int i = 0; i < ICV_LEN; i++) dly[i] <= '0;
    end else if (clr) begin
      in_body <= '0;
    end else if (byte_valid) begin
      dly[0]  <= byte_in;
      for (int i = 1; i < ICV_LEN; i++) dly[i] <= dly[i-1];
      in_body <= {in_body[ICV_LEN-2:0], byte_idx >= ofs};
    end
  end

  icv_crc32 u_crc (
    .clk, .rst_n, .init(clr), .en(byte_valid && in_body[ICV_LEN-1]), .din(dly[ICV_LEN-1]),
    .sel(2'd0), .crc(crc_unused), .icv_byte(byte_unused), .icv_ok(ok_now)
  );

  assign icv_ok = en && ok_now;
endmodule
