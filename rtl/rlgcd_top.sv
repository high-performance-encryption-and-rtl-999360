// rlgcd_top: reversible-logic pixel cipher, transmitter and receiver side
// by side.
//
// A stream of 8-bit pixels enters at in_pix/in_valid. The transmitter
// encrypts each pixel with rlg_encrypt, using the current 4-bit output of
// its key generator as the key, and registers the ciphertext (enc_pix,
// enc_valid). The receiver decrypts that registered ciphertext with
// rlg_decrypt, using a second, identical key generator, and registers the
// result (dec_pix, dec_valid), which equals the original pixel.
//
// Key generation: each side has a cellular automaton (ca_keygen, the main
// key source) and an LFSR (lfsr_keygen, the alternative). key_sel picks
// which one keys the pixel presented with it (0 = cellular automaton,
// 1 = LFSR); both generators advance by one step for every valid pixel.
// seed_load loads ca_seed and lfsr_seed into the generators; a pixel
// presented in the same cycle still uses the key from before the load.
// The receiver sees every step, load and key selection exactly one cycle
// after the transmitter, together with the ciphertext it belongs to, so its
// key generators always hold the key the transmitter used.
//
// Timing: one pixel per clock; enc_pix appears one cycle after in_pix and
// dec_pix two cycles after it. Reset is asynchronous and active low.
//
// The encryption and decryption networks and the two key generators follow
// the design; the valid/seed interface, the registers, the key source
// select and the use of a mirrored key generator on the receiving side are
// this design's own choices.
module rlgcd_top
  import rlgcd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // key generator seeding
  input  logic   seed_load,
  input  key_t   ca_seed,
  input  key_t   lfsr_seed,
  // plain pixel stream
  input  logic   in_valid,
  input  pixel_t in_pix,
  input  logic   key_sel,     // 0: cellular automaton key, 1: LFSR key
  // encrypted pixel stream
  output logic   enc_valid,
  output pixel_t enc_pix,
  // decrypted pixel stream
  output logic   dec_valid,
  output pixel_t dec_pix
);
  // ---------------------------------------------------------------- transmitter
  key_t     ca_tx, lfsr_tx, key_tx;
  pixel_t   enc_comb;
  key_src_e sel_tx;

  ca_keygen   #(.N(KEY_W)) u_ca_tx   (.clk, .rst_n, .load(seed_load), .seed(ca_seed),
                                      .step(in_valid), .state(ca_tx));
  lfsr_keygen #(.N(KEY_W)) u_lfsr_tx (.clk, .rst_n, .load(seed_load), .seed(lfsr_seed),
                                      .step(in_valid), .state(lfsr_tx));

  always_comb begin
    sel_tx = key_src_e'(key_sel);
    key_tx = (sel_tx == KEY_LFSR) ? lfsr_tx : ca_tx;
  end

  rlg_encrypt u_enc (.pix(in_pix), .key(key_tx), .en(enc_comb));

  // Channel register: ciphertext plus the control the receiver mirrors.
  key_src_e sel_q;
  logic     load_q;
  key_t     ca_seed_q, lfsr_seed_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_valid   <= 1'b0;
      enc_pix     <= '0;
      sel_q       <= KEY_CA;
      load_q      <= 1'b0;
      ca_seed_q   <= '0;
      lfsr_seed_q <= '0;
    end else begin
      enc_valid   <= in_valid;
      load_q      <= seed_load;
      if (in_valid) begin
        enc_pix <= enc_comb;
        sel_q   <= sel_tx;
      end
      if (seed_load) begin
        ca_seed_q   <= ca_seed;
        lfsr_seed_q <= lfsr_seed;
      end
    end
  end

  // ------------------------------------------------------------------- receiver
  key_t   ca_rx, lfsr_rx, key_rx;
  pixel_t dec_comb;

  ca_keygen   #(.N(KEY_W)) u_ca_rx   (.clk, .rst_n, .load(load_q), .seed(ca_seed_q),
                                      .step(enc_valid), .state(ca_rx));
  lfsr_keygen #(.N(KEY_W)) u_lfsr_rx (.clk, .rst_n, .load(load_q), .seed(lfsr_seed_q),
                                      .step(enc_valid), .state(lfsr_rx));

  always_comb key_rx = (sel_q == KEY_LFSR) ? lfsr_rx : ca_rx;

  rlg_decrypt u_dec (.en(enc_pix), .key(key_rx), .de(dec_comb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_valid <= 1'b0;
      dec_pix   <= '0;
    end else begin
      dec_valid <= enc_valid;
      if (enc_valid) dec_pix <= dec_comb;
    end
  end
endmodule
