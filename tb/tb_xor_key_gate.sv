// tb_xor_key_gate: exhaustive check of the 4-bit key XOR (256 patterns).
// Each output bit must be 1 exactly when the data bit and key bit differ.
module tb_xor_key_gate;
  logic [3:0] din, key, dout;
  int checks = 0, failures = 0;

  xor_key_gate dut (.din, .key, .dout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [3:0] exp;
      {din, key} = 8'(v);
      #1;
      for (int i = 0; i < 4; i++) exp[i] = (din[i] != key[i]);
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL din=%b key=%b dout=%b exp=%b", din, key, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
