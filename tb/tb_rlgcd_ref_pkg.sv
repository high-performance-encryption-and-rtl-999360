// tb_rlgcd_ref_pkg: bit-level reference models used by the testbenches.
// They are written from the gate equations directly (controlled swap,
// controlled inversion, neighbour XORs) and share no code with the RTL.
package tb_rlgcd_ref_pkg;

  // Reference encryption of one pixel with a 4-bit key.
  function automatic logic [7:0] ref_encrypt(input logic [7:0] x, input logic [3:0] k);
    logic s_hi, s_lo;
    logic [2:0] t_hi, t_lo, f_hi, f_lo;
    logic fy_a, fy_b;
    // SCL: the fourth line is flipped when A and (B or C)
    s_hi = x[4] ^ (x[7] && (x[6] || x[5]));
    s_lo = x[0] ^ (x[3] && (x[2] || x[1]));
    // Toffoli: third line flipped when both controls are 1
    t_hi = {x[7], x[6], x[5] ^ (x[7] && x[6])};
    t_lo = {x[2], x[1], s_lo ^ (x[2] && x[1])};
    // Fredkin: lines 2 and 3 swapped when the control is 1
    f_hi = t_hi[2] ? {t_hi[2], t_hi[0], t_hi[1]} : t_hi;
    f_lo = t_lo[2] ? {t_lo[2], t_lo[0], t_lo[1]} : t_lo;
    // Feynman between the upper SCL's S and the lower SCL's P
    fy_a = s_hi;
    fy_b = (s_hi != x[3]);
    return {f_hi[2] ^ k[3], f_hi[1] ^ k[2], f_hi[0] ^ k[1], fy_a ^ k[0],
            fy_b ^ k[3],    f_lo[2] ^ k[2], f_lo[1] ^ k[1], f_lo[0] ^ k[0]};
  endfunction

  // Reference next state of the 4-cell CA: cell 1 rule 150, cells 2-4 rule 90,
  // zero beyond both ends. Bit 0 is cell 1.
  function automatic logic [3:0] ref_ca_next(input logic [3:0] c);
    logic [3:0] n;
    n[0] = c[0] ^ c[1];
    n[1] = c[0] ^ c[2];
    n[2] = c[1] ^ c[3];
    n[3] = c[2];
    return n;
  endfunction

  // Reference next state of the 4-bit LFSR: bit 1 <= XNOR(bit 2, bit 4),
  // other bits shift up by one. Bit 0 is bit 1.
  function automatic logic [3:0] ref_lfsr_next(input logic [3:0] r);
    return {r[2], r[1], r[0], (r[1] == r[3])};
  endfunction

endpackage
