// xor_key_gate: the key-mixing stage of the cipher. Each bit of the data
// nibble is XORed with the bit of the key in the same position
// (dout[i] = din[i] ^ key[i]). Applying it twice with the same key restores
// the data, so the same block serves encryption and decryption.
// Combinational. The width is a parameter; its default of 4 matches the
// four-line XOR gates of the encryption and decryption networks.
module xor_key_gate #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] din,
  input  logic [W-1:0] key,
  output logic [W-1:0] dout
);
  always_comb dout = din ^ key;
endmodule
