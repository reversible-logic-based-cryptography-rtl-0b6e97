// tb_rlgcd_encrypt: checks the encryption block.
//  1. All 256 words x 16 keys against the closed-form model in rlgcd_ref_pkg.
//  2. For each key the 256 ciphertexts are distinct (the cipher is a
//     bijection, so it can be decrypted).
//  3. Key linearity as printed in the reference timing diagram: for a fixed
//     plaintext, ciphertexts under keys k1 and k2 differ by {k1^k2, k1^k2}.
//     The plaintext/key pairs of that diagram (11111111 with keys 0001,
//     1001, 0011, 1101, 0101, 0010, 0110, and 01111111 with 0100) are used.
module tb_rlgcd_encrypt;
  import rlgcd_pkg::*;
  import rlgcd_ref_pkg::*;
  word_t i, e;
  key_t  k;
  int checks = 0, failures = 0;
  bit [255:0] seen;

  rlgcd_encrypt dut (.i(i), .k(k), .e(e));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam key_t FIG_KEYS [7] = '{4'b0001, 4'b1001, 4'b0011, 4'b1101,
                                    4'b0101, 4'b0010, 4'b0110};

  initial begin
    // 1 and 2
    for (int kk = 0; kk < 16; kk++) begin
      seen = '0;
      for (int n = 0; n < 256; n++) begin
        i = word_t'(n);
        k = key_t'(kk);
        #1;
        checks++;
        if (e !== enc_model(i, k)) begin
          failures++;
          $display("FAIL enc i=%b k=%b e=%b exp=%b", i, k, e, enc_model(i, k));
        end
        checks++;
        if (seen[e]) begin
          failures++;
          $display("FAIL enc not a bijection for k=%b (e=%b repeats)", k, e);
        end
        seen[e] = 1'b1;
      end
    end
    // 3
    begin
      word_t e_ref;
      i = 8'b1111_1111;
      k = 4'b0100;
      #1;
      e_ref = e;
      foreach (FIG_KEYS[n]) begin
        k = FIG_KEYS[n];
        #1;
        checks++;
        if ((e ^ e_ref) !== {k ^ 4'b0100, k ^ 4'b0100}) begin
          failures++;
          $display("FAIL key linearity i=%b k=%b", i, k);
        end
      end
      i = 8'b0111_1111;
      k = 4'b0001;
      #1;
      e_ref = e;
      k = 4'b0100;
      #1;
      checks++;
      if ((e ^ e_ref) !== 8'b0101_0101) begin
        failures++;
        $display("FAIL key linearity i=%b", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_rlgcd_encrypt
