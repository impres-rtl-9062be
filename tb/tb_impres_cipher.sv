// tb_impres_cipher: the checksum cipher against the reference Feistel model,
// at the default 4 rounds. Also checks that distinct checksums give distinct
// ciphertexts under one key and that a one-bit key change alters the output.
module tb_impres_cipher;
  import impres_ref_pkg::*;

  logic [63:0] key;
  logic [31:0] plain, ciph;
  int checks = 0, failures = 0;

  impres_cipher dut (.key_i(key), .plain_i(plain), .cipher_o(ciph));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] seen [logic [31:0]];
    logic [31:0] c0;
    int changed;
    for (int i = 0; i < 20000; i++) begin
      key   = {$urandom, $urandom};
      plain = $urandom;
      #1;
      checks++;
      if (ciph != ref_encrypt(key, plain)) begin
        failures++;
        if (failures < 5) $display("key %h plain %h: %h expected %h", key, plain, ciph,
                                   ref_encrypt(key, plain));
      end
    end
    // Injective on a sample of consecutive checksums.
    key = 64'h0123_4567_89AB_CDEF;
    for (int i = 0; i < 4096; i++) begin
      plain = 32'(i);
      #1;
      checks++;
      if (seen.exists(ciph)) failures++;
      seen[ciph] = plain;
    end
    // Key sensitivity.
    changed = 0;
    plain = 32'hCAFE_F00D;
    key = 64'h0123_4567_89AB_CDEF;
    #1 c0 = ciph;
    for (int b = 0; b < 64; b++) begin
      key = 64'h0123_4567_89AB_CDEF ^ (64'd1 << b);
      #1;
      if (ciph != c0) changed++;
    end
    checks++;
    if (changed != 64) begin
      failures++;
      $display("only %0d of 64 key bits change the ciphertext", changed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
