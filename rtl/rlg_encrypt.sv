// rlg_encrypt: encrypts one 8-bit pixel with a 4-bit key using a network of
// reversible gates.
//
// Structure (upper half works on pix[7:4], lower half on pix[3:0]):
//   upper SCL  (A..D = pix[7], pix[6], pix[5], pix[4])
//              P,Q,R -> upper Toffoli -> upper Fredkin -> en[7:5]
//              S     -> Feynman input A
//   lower SCL  (A..D = pix[3], pix[2], pix[1], pix[0])
//              P     -> Feynman input B
//              Q,R,S -> lower Toffoli -> lower Fredkin -> en[2:0]
//   Feynman    P -> en[4], Q -> en[3]
//   Each nibble is finally XORed with the same 4-bit key, key[3] on the
//   most significant line of the nibble.
// The chain of gates, their order, and the split of each SCL's outputs
// between Toffoli and Feynman follow the design's encryption block diagram.
// Which port of a gate each line lands on (top-to-bottom order A, B, C, D),
// which Feynman output feeds which XOR gate, and the key bit order are
// read from the positions of the lines in that diagram and are this
// design's choices where the drawing leaves room.
//
// Every stage is reversible, so rlg_decrypt inverts the whole network by
// running the same gates in the opposite order with the same key.
// Purely combinational: the ciphertext is valid in the same cycle as the
// pixel and key.
module rlg_encrypt
  import rlgcd_pkg::*;
(
  input  pixel_t pix,   // plain pixel
  input  key_t   key,   // key nibble from the key generator
  output pixel_t en     // encrypted pixel
);
  // SCL stage
  logic u_p, u_q, u_r, u_s;
  logic l_p, l_q, l_r, l_s;
  // Toffoli stage
  logic [2:0] u_tof, l_tof;
  // Fredkin stage
  logic [2:0] u_fred, l_fred;
  // Feynman stage
  logic fy_p, fy_q;

  scl_gate u_scl_hi (.a(pix[7]), .b(pix[6]), .c(pix[5]), .d(pix[4]),
                     .p(u_p), .q(u_q), .r(u_r), .s(u_s));
  scl_gate u_scl_lo (.a(pix[3]), .b(pix[2]), .c(pix[1]), .d(pix[0]),
                     .p(l_p), .q(l_q), .r(l_r), .s(l_s));

  toffoli_gate u_tof_hi (.a(u_p), .b(u_q), .c(u_r),
                         .p(u_tof[2]), .q(u_tof[1]), .r(u_tof[0]));
  toffoli_gate u_tof_lo (.a(l_q), .b(l_r), .c(l_s),
                         .p(l_tof[2]), .q(l_tof[1]), .r(l_tof[0]));

  fredkin_gate u_fred_hi (.a(u_tof[2]), .b(u_tof[1]), .c(u_tof[0]),
                          .p(u_fred[2]), .q(u_fred[1]), .r(u_fred[0]));
  fredkin_gate u_fred_lo (.a(l_tof[2]), .b(l_tof[1]), .c(l_tof[0]),
                          .p(l_fred[2]), .q(l_fred[1]), .r(l_fred[0]));

  feynman_gate u_feyn (.a(u_s), .b(l_p), .p(fy_p), .q(fy_q));

  xor_key_gate #(.W(KEY_W)) u_xor_hi (.din({u_fred, fy_p}), .key(key), .dout(en[7:4]));
  xor_key_gate #(.W(KEY_W)) u_xor_lo (.din({fy_q, l_fred}), .key(key), .dout(en[3:0]));
endmodule
