// tb_rlgcd_decrypt: checks the decryption block.
//  1. For all 256 words x 16 keys, the ciphertext from the reference
//     encryption model decrypts to the original word.
//  2. For all 256 ciphertexts x 16 keys, the output equals the closed-form
//     inverse model in rlgcd_ref_pkg.
//  3. Decrypting with a wrong key does not give back the plaintext for
//     every word (the key matters).
module tb_rlgcd_decrypt;
  import rlgcd_pkg::*;
  import rlgcd_ref_pkg::*;
  word_t e, d;
  key_t  k;
  int checks = 0, failures = 0;

  rlgcd_decrypt dut (.e(e), .k(k), .d(d));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int kk = 0; kk < 16; kk++) begin
      for (int n = 0; n < 256; n++) begin
        k = key_t'(kk);
        e = enc_model(word_t'(n), k);
        #1;
        checks++;
        if (d !== word_t'(n)) begin
          failures++;
          $display("FAIL round trip i=%b k=%b e=%b d=%b", word_t'(n), k, e, d);
        end
        e = word_t'(n);
        #1;
        checks++;
        if (d !== dec_model(e, k)) begin
          failures++;
          $display("FAIL dec e=%b k=%b d=%b exp=%b", e, k, d, dec_model(e, k));
        end
      end
    end
    for (int kk = 1; kk < 16; kk++) begin
      int wrong;
      wrong = 0;
      for (int n = 0; n < 256; n++) begin
        e = enc_model(word_t'(n), 4'b0000);
        k = key_t'(kk);
        #1;
        if (d != word_t'(n)) wrong++;
      end
      checks++;
      if (wrong != 256) begin
        failures++;
        $display("FAIL wrong key %b still decrypts %0d words", key_t'(kk), 256 - wrong);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_rlgcd_decrypt
