// xor_cipher: parallel XOR of a data byte with a keystream byte.
//
// This is the parallel encryption/decryption function of WEP: the same XOR
// encrypts plaintext on the transmit side and recovers it on the receive side.
// When `en` is low the byte passes unchanged (unencrypted part of the frame).
// Purely combinational. The function follows the document; the enable is this
// design's way of limiting the cipher to the encrypted part of a frame.
module xor_cipher (
  input  logic [7:0] din,
  input  logic [7:0] ks,
  input  logic       en,
  output logic [7:0] dout
);
  always_comb dout = en ? (din ^ ks) : din;
endmodule
