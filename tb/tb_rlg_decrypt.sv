// tb_rlg_decrypt: exhaustive check of the pixel decryption network. Every
// pixel (256) is encrypted under every key (16) by the reference model and
// fed to the decryption network, which must return the original pixel.
// Decrypting with a key that differs from the encryption key must not
// return the pixel for the whole image (checked per key pair).
module tb_rlg_decrypt;
  import tb_rlgcd_ref_pkg::*;
  logic [7:0] en, de;
  logic [3:0] key;
  int checks = 0, failures = 0;

  rlg_decrypt dut (.en, .key, .de);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      for (int v = 0; v < 256; v++) begin
        key = 4'(k);
        en  = ref_encrypt(8'(v), 4'(k));
        #1;
        checks++;
        if (de !== 8'(v)) begin
          failures++;
          if (failures < 10) $display("FAIL key=%h en=%h de=%h exp=%h", key, en, de, 8'(v));
        end
      end
    end
    // Wrong key: at least one pixel of the 256 must come out different.
    for (int k = 0; k < 16; k++) begin
      automatic int wrong = 0;
      for (int v = 0; v < 256; v++) begin
        key = 4'(k ^ 1);
        en  = ref_encrypt(8'(v), 4'(k));
        #1;
        if (de !== 8'(v)) wrong++;
      end
      checks++;
      if (wrong == 0) begin
        failures++;
        $display("FAIL key %h decrypts data encrypted with key %h", k ^ 1, k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
