// tb_rlgcd_fig6: replays the reference simulation sequence through the
// encryption and decryption blocks.
//
// The sequence is the one of the design's published timing diagram: the
// plaintext 01111111 under key 0100, then 11111111 under the keys 0001,
// 1001, 0011, 1101, 0101, 0010, 0001, 1101, 0110, 1101, one word per 10 ns
// step. For each step the testbench checks
//   - decrypted word == plaintext (the property the diagram demonstrates),
//   - ciphertext == closed-form model of this implementation,
//   - ciphertext differences between steps with the same plaintext equal
//     {k1^k2, k1^k2}, which the printed ciphertexts also satisfy.
// The printed ciphertext values themselves come from gate equations that are
// not given, and are not compared.
module tb_rlgcd_fig6;
  import rlgcd_pkg::*;
  import rlgcd_ref_pkg::*;

  localparam int STEPS = 11;
  localparam word_t B [STEPS] = '{8'b0111_1111, 8'b1111_1111, 8'b1111_1111, 8'b1111_1111,
                                  8'b1111_1111, 8'b1111_1111, 8'b1111_1111, 8'b1111_1111,
                                  8'b1111_1111, 8'b1111_1111, 8'b1111_1111};
  localparam key_t  K [STEPS] = '{4'b0100, 4'b0001, 4'b1001, 4'b0011, 4'b1101, 4'b0101,
                                  4'b0010, 4'b0001, 4'b1101, 4'b0110, 4'b1101};
  // Ciphertexts printed in the diagram; only their pairwise XORs are used.
  localparam word_t TE [STEPS] = '{8'b1111_1001, 8'b1110_1100, 8'b0110_0100, 8'b1100_1110,
                                  8'b0010_0000, 8'b1010_1000, 8'b1101_1111, 8'b1110_1100,
                                  8'b0010_0000, 8'b1001_1011, 8'b0010_0000};

  word_t b, te, td;
  key_t  k;
  word_t te_seen [STEPS];
  int checks = 0, failures = 0;

  rlgcd_encrypt u_enc (.i(b),  .k(k), .e(te));
  rlgcd_decrypt u_dec (.e(te), .k(k), .d(td));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < STEPS; n++) begin
      b = B[n];
      k = K[n];
      #10;
      te_seen[n] = te;
      $display("b=%b k=%b te=%b td=%b", b, k, te, td);
      checks++;
      if (td !== b) begin
        failures++;
        $display("FAIL step %0d td=%b b=%b", n, td, b);
      end
      checks++;
      if (te !== enc_model(b, k)) begin
        failures++;
        $display("FAIL step %0d te=%b exp=%b", n, te, enc_model(b, k));
      end
    end
    for (int n = 2; n < STEPS; n++) begin
      // the printed pairs satisfy the same relation as the design
      checks++;
      if ((TE[n] ^ TE[1]) !== (te_seen[n] ^ te_seen[1])) begin
        failures++;
        $display("FAIL step %0d ciphertext difference %b, printed %b",
                 n, te_seen[n] ^ te_seen[1], TE[n] ^ TE[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_rlgcd_fig6
