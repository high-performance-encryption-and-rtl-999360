// tb_rlg_encrypt: exhaustive check of the pixel encryption network.
// Every pixel (256) under every key (16) is compared with the bit-level
// reference model. For each key the 256 ciphertexts must also all differ,
// i.e. the network is a permutation of the pixel values and can be undone.
module tb_rlg_encrypt;
  import tb_rlgcd_ref_pkg::*;
  logic [7:0] pix, en;
  logic [3:0] key;
  int checks = 0, failures = 0;

  rlg_encrypt dut (.pix, .key, .en);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      bit seen [256];
      automatic int distinct = 0;
      for (int i = 0; i < 256; i++) seen[i] = 1'b0;
      for (int v = 0; v < 256; v++) begin
        logic [7:0] exp;
        key = 4'(k);
        pix = 8'(v);
        #1;
        exp = ref_encrypt(pix, key);
        checks++;
        if (en !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL pix=%h key=%h en=%h exp=%h", pix, key, en, exp);
        end
        if (!seen[en]) distinct++;
        seen[en] = 1'b1;
      end
      checks++;
      if (distinct != 256) begin
        failures++;
        $display("FAIL key=%h maps 256 pixels onto %0d values", k, distinct);
      end
    end
    // A few fixed vectors, worked out by hand from the gate equations.
    key = 4'h0; pix = 8'h00; #1; checks++; if (en !== 8'h00) begin failures++; $display("FAIL 00/0 -> %h", en); end
    key = 4'h0; pix = 8'hFF; #1; checks++; if (en !== 8'hAF) begin failures++; $display("FAIL FF/0 -> %h", en); end
    key = 4'hF; pix = 8'h00; #1; checks++; if (en !== 8'hFF) begin failures++; $display("FAIL 00/F -> %h", en); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
