// tb_rlgcd_top: end-to-end test of the pixel cipher at its default
// configuration. A 64 x 64 test image (4096 pixels, generated here from a
// gradient plus a pseudo-random pattern) is streamed in with random idle
// cycles, random key source selection and occasional reseeding of the key
// generators. The testbench keeps its own models of the two key generators
// and of the encryption, and checks:
//  - every enc_pix, one cycle after its pixel, against the reference
//    ciphertext (latency 1), and enc_valid only then
//  - every dec_pix, two cycles after its pixel, equal to the pixel
//    (latency 2), and dec_valid only then
//  - that the image is actually changed by encryption
// It counts how often each mechanism occurred (CA-keyed pixels, LFSR-keyed
// pixels, switches of key source between pixels, reseeds, reseeds in the
// same cycle as a pixel, idle cycles) and fails if one never did.
module tb_rlgcd_top;
  import tb_rlgcd_ref_pkg::*;

  localparam int W = 64, H = 64, NPIX = W * H;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       seed_load = 1'b0, in_valid = 1'b0, key_sel = 1'b0;
  logic [3:0] ca_seed = '0, lfsr_seed = '0;
  logic [7:0] in_pix = '0;
  logic       enc_valid, dec_valid;
  logic [7:0] enc_pix, dec_pix;

  int checks = 0, failures = 0;
  int n_ca = 0, n_lfsr = 0, n_switch = 0, n_reseed = 0, n_reseed_px = 0, n_idle = 0;
  int n_enc = 0, n_dec = 0, n_changed = 0;

  rlgcd_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50 * NPIX) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected outputs, indexed by the cycle on which they must appear.
  logic [7:0] exp_enc [$];
  logic [7:0] exp_dec [$];
  logic       exp_ev [$];
  logic       exp_dv [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // Output monitor: compare each cycle with what the driver predicted.
  always @(posedge clk) begin
    if (rst_n && exp_ev.size() > 0) begin
      #1;
      check(enc_valid == exp_ev[0], $sformatf("enc_valid=%b exp=%b", enc_valid, exp_ev[0]));
      if (exp_ev[0]) begin
        check(enc_pix == exp_enc[0], $sformatf("enc_pix=%h exp=%h", enc_pix, exp_enc[0]));
        n_enc++;
      end
      if (exp_dv.size() > 1) begin
        check(dec_valid == exp_dv[0], $sformatf("dec_valid=%b exp=%b", dec_valid, exp_dv[0]));
        if (exp_dv[0]) begin
          check(dec_pix == exp_dec[0], $sformatf("dec_pix=%h exp=%h", dec_pix, exp_dec[0]));
          n_dec++;
        end
        void'(exp_dv.pop_front());
        void'(exp_dec.pop_front());
      end
      void'(exp_ev.pop_front());
      void'(exp_enc.pop_front());
    end
  end

  initial begin
    automatic logic [3:0] m_ca, m_lfsr, key;
    automatic logic prev_sel = 1'b0;
    automatic bit have_prev = 1'b0;
    automatic int p = 0;

    m_ca = 4'b0001;
    m_lfsr = 4'b0000;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    // dec lags enc by one cycle: prime its queue with one idle slot
    exp_dv.push_back(1'b0);
    exp_dec.push_back('0);

    while (p < NPIX) begin
      automatic logic [7:0] px;
      automatic bit v, ld;
      @(negedge clk);
      v  = ($urandom_range(0, 3) != 0);
      ld = ($urandom_range(0, 199) == 0);
      in_valid  = v;
      seed_load = ld;
      ca_seed   = 4'($urandom_range(1, 15));
      lfsr_seed = 4'($urandom_range(0, 14));
      key_sel   = ($urandom_range(0, 2) == 0);
      px        = 8'((p % W) * 4 + (p / W)) ^ 8'($urandom_range(0, 15));
      in_pix    = px;
      if (ld) n_reseed++;
      if (ld && v) n_reseed_px++;
      if (v) begin
        key = key_sel ? m_lfsr : m_ca;
        if (key_sel) n_lfsr++; else n_ca++;
        if (have_prev && prev_sel != key_sel) n_switch++;
        prev_sel  = key_sel;
        have_prev = 1'b1;
        exp_enc.push_back(ref_encrypt(px, key));
        exp_dec.push_back(px);
        if (ref_encrypt(px, key) != px) n_changed++;
        p++;
      end else begin
        n_idle++;
        exp_enc.push_back('0);
        exp_dec.push_back('0);
      end
      exp_ev.push_back(v);
      exp_dv.push_back(v);
      // key generator models
      if (ld) begin
        m_ca = ca_seed; m_lfsr = lfsr_seed;
      end else if (v) begin
        m_ca = ref_ca_next(m_ca); m_lfsr = ref_lfsr_next(m_lfsr);
      end
    end
    @(negedge clk);
    in_valid = 1'b0; seed_load = 1'b0;
    exp_ev.push_back(1'b0); exp_enc.push_back('0);
    exp_dv.push_back(1'b0); exp_dec.push_back('0);
    repeat (4) @(posedge clk);
    #2;

    check(n_enc == NPIX, $sformatf("%0d ciphertexts seen, expected %0d", n_enc, NPIX));
    check(n_dec == NPIX, $sformatf("%0d decrypted pixels seen, expected %0d", n_dec, NPIX));
    check(n_changed > NPIX / 2, $sformatf("only %0d of %0d pixels changed by encryption", n_changed, NPIX));
    $display("mechanisms: ca_keyed=%0d lfsr_keyed=%0d key_switches=%0d reseeds=%0d reseed_with_pixel=%0d idle_cycles=%0d",
             n_ca, n_lfsr, n_switch, n_reseed, n_reseed_px, n_idle);
    check(n_ca > 0,        "no CA-keyed pixel");
    check(n_lfsr > 0,      "no LFSR-keyed pixel");
    check(n_switch > 0,    "no key source switch");
    check(n_reseed > 0,    "no reseed");
    check(n_reseed_px > 0, "no reseed in a pixel cycle");
    check(n_idle > 0,      "no idle cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
