// rlg_decrypt: recovers one 8-bit pixel from its ciphertext and the 4-bit
// key that encrypted it.
//
// It is rlg_encrypt run backwards. Every gate of the encryption network is
// its own inverse, so the same gate types appear here in reverse order:
//   upper XOR  (en[7:4] ^ key): lines 3..1 -> upper Fredkin -> upper
//              Toffoli -> upper SCL inputs A,B,C; line 0 -> Feynman A
//   lower XOR  (en[3:0] ^ key): line 3 -> Feynman B; lines 2..0 -> lower
//              Fredkin -> lower Toffoli -> lower SCL inputs B,C,D
//   Feynman    P -> upper SCL input D, Q -> lower SCL input A
//   upper SCL  -> de[7:4], lower SCL -> de[3:0]
// The order of stages follows the design's decryption block diagram; the
// port-level wiring mirrors rlg_encrypt exactly, which is what makes
// de == pix hold for every pixel and key.
// Purely combinational.
module rlg_decrypt
  import rlgcd_pkg::*;
(
  input  pixel_t en,    // encrypted pixel
  input  key_t   key,   // the key nibble used to encrypt it
  output pixel_t de     // decrypted pixel
);
  logic [3:0] x_hi, x_lo;          // after key XOR
  logic [2:0] u_fred, l_fred;      // after Fredkin
  logic [2:0] u_tof, l_tof;        // after Toffoli
  logic       fy_p, fy_q;          // after Feynman

  xor_key_gate #(.W(KEY_W)) u_xor_hi (.din(en[7:4]), .key(key), .dout(x_hi));
  xor_key_gate #(.W(KEY_W)) u_xor_lo (.din(en[3:0]), .key(key), .dout(x_lo));

  feynman_gate u_feyn (.a(x_hi[0]), .b(x_lo[3]), .p(fy_p), .q(fy_q));

  fredkin_gate u_fred_hi (.a(x_hi[3]), .b(x_hi[2]), .c(x_hi[1]),
                          .p(u_fred[2]), .q(u_fred[1]), .r(u_fred[0]));
  fredkin_gate u_fred_lo (.a(x_lo[2]), .b(x_lo[1]), .c(x_lo[0]),
                          .p(l_fred[2]), .q(l_fred[1]), .r(l_fred[0]));

  toffoli_gate u_tof_hi (.a(u_fred[2]), .b(u_fred[1]), .c(u_fred[0]),
                         .p(u_tof[2]), .q(u_tof[1]), .r(u_tof[0]));
  toffoli_gate u_tof_lo (.a(l_fred[2]), .b(l_fred[1]), .c(l_fred[0]),
                         .p(l_tof[2]), .q(l_tof[1]), .r(l_tof[0]));

  scl_gate u_scl_hi (.a(u_tof[2]), .b(u_tof[1]), .c(u_tof[0]), .d(fy_p),
                     .p(de[7]), .q(de[6]), .r(de[5]), .s(de[4]));
  scl_gate u_scl_lo (.a(fy_q), .b(l_tof[2]), .c(l_tof[1]), .d(l_tof[0]),
                     .p(de[3]), .q(de[2]), .r(de[1]), .s(de[0]));
endmodule
