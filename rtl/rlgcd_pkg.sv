// rlgcd_pkg: types and constants shared by the reversible-logic pixel
// cipher. A pixel is one 8-bit word; it is split into an upper and a lower
// nibble, each of which runs through its own chain of reversible gates and
// is XORed with a 4-bit key nibble. The key comes from a 4-cell cellular
// automaton (the main key source) or a 4-bit LFSR (the alternative source).
package rlgcd_pkg;

  localparam int unsigned PIXEL_W = 8;  // pixel word width (8-bit pixels)
  localparam int unsigned KEY_W   = 4;  // key bits fed to each XOR gate

  typedef logic [PIXEL_W-1:0] pixel_t;
  typedef logic [KEY_W-1:0]   key_t;

  // Key source selection for the top level.
  typedef enum logic {
    KEY_CA   = 1'b0,  // hybrid rule 90/150 cellular automaton
    KEY_LFSR = 1'b1   // XNOR-feedback linear feedback shift register
  } key_src_e;

endpackage
