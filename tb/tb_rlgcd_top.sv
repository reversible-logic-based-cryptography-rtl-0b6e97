// tb_rlgcd_top: end-to-end test of the cipher at its default parameters.
//
// A 64 x 64 binary image (a filled disc on a striped background) is
// generated, eight pixels per word, most significant bit first. A 32-bit
// random watermark is embedded two bits per word in the 3rd and 4th least
// significant bits of every eighth pixel position (bits 2 and 3 of the first
// 16 words). The 512 words are streamed through the top one per clock with
// a fresh key for every word. For each word the testbench checks
//   - the key against its own model of the key LFSR,
//   - the ciphertext against the closed-form encryption model,
//   - the decrypted word against the plaintext,
// and at the end that the recovered image and the extracted watermark match
// the originals and that the stream took exactly one cycle per word.
// Mechanisms counted (each must occur): key change, key hold (key_next low),
// reset reload of the seed, watermarked words, ciphertext differing from
// plaintext, and a run of one plaintext under changing keys whose
// ciphertexts differ exactly by the key differences.
module tb_rlgcd_top;
  import rlgcd_pkg::*;
  import rlgcd_ref_pkg::*;

  localparam int W = 64, H = 64, WORDS = W * H / 8;
  localparam logic [15:0] SEED = 16'hACE1;  // the top's default

  logic  clk = 1'b0, rst_n = 1'b0, key_next = 1'b0;
  word_t plain_i, cipher_o, plain_o;
  key_t  key_o;

  int checks = 0, failures = 0, cycles = 0;
  int n_key_change = 0, n_key_hold = 0, n_reset = 0, n_wm = 0, n_scrambled = 0, n_fixed_pt = 0;

  word_t       image [WORDS];
  word_t       recovered [WORDS];
  logic [31:0] wm, wm_out;
  logic [15:0] lfsr;

  rlgcd_top dut (
    .clk(clk), .rst_n(rst_n), .key_next(key_next),
    .plain_i(plain_i), .key_o(key_o), .cipher_o(cipher_o), .plain_o(plain_o)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Apply one word in the current cycle and check all three outputs.
  task automatic one_word(input word_t w, input bit step_key, output word_t d);
    plain_i = w;
    #1;
    check(key_o === lfsr[3:0], $sformatf("key %b exp %b", key_o, lfsr[3:0]));
    check(cipher_o === enc_model(w, lfsr[3:0]),
          $sformatf("cipher %b exp %b (w=%b k=%b)", cipher_o, enc_model(w, lfsr[3:0]), w, key_o));
    check(plain_o === w, $sformatf("plain_o %b exp %b", plain_o, w));
    if (cipher_o != w) n_scrambled++;
    d = plain_o;
    key_next = step_key;
    @(negedge clk);
    if (step_key) begin
      lfsr = lfsr16_step(lfsr);
    end
    key_next = 1'b0;
  endtask

  initial begin
    word_t d;
    key_t  k_prev;
    int    start;
    // image: disc of radius 20 at the centre, diagonal stripes elsewhere
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int dx, dy;
        logic px;
        dx = x - W / 2;
        dy = y - H / 2;
        px = (dx * dx + dy * dy < 400) ? 1'b1 : (((x + y) % 11) == 0);
        image[(y * W + x) / 8][7 - (x % 8)] = px;
      end
    // watermark: 32 random bits, two per word into bits 3 and 2
    wm = $urandom(7);
    for (int n = 0; n < 16; n++) begin
      image[n][3] = wm[2 * n + 1];
      image[n][2] = wm[2 * n];
      n_wm++;
    end

    // reset
    plain_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    lfsr  = SEED;
    @(negedge clk);

    // stream the image, new key per word
    start = cycles;
    for (int n = 0; n < WORDS; n++) begin
      k_prev = key_o;
      one_word(image[n], 1'b1, d);
      recovered[n] = d;
      if (key_o != k_prev) n_key_change++;
    end
    check(cycles - start == WORDS, $sformatf("stream took %0d cycles for %0d words", cycles - start, WORDS));
    foreach (image[n]) check(recovered[n] === image[n], $sformatf("recovered word %0d", n));
    for (int n = 0; n < 16; n++) begin
      wm_out[2 * n + 1] = recovered[n][3];
      wm_out[2 * n]     = recovered[n][2];
    end
    check(wm_out === wm, $sformatf("watermark %h exp %h", wm_out, wm));

    // key hold: several words without stepping the key
    k_prev = key_o;
    for (int n = 0; n < 8; n++) begin
      one_word(word_t'($urandom), 1'b0, d);
      check(key_o === k_prev, "key changed while key_next low");
      n_key_hold++;
    end

    // one plaintext under changing keys, as in the reference timing diagram
    begin
      word_t e0;
      key_t  k0;
      plain_i = 8'hFF;
      #1;
      e0 = cipher_o;
      k0 = key_o;
      for (int n = 0; n < 10; n++) begin
        one_word(8'hFF, 1'b1, d);
        #1;
        check((cipher_o ^ e0) === {key_o ^ k0, key_o ^ k0}, "fixed plaintext, key difference");
        n_fixed_pt++;
      end
    end

    // reset mid-stream reloads the seed
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    lfsr  = SEED;
    check(key_o === SEED[3:0], "key after reset");
    n_reset++;
    for (int n = 0; n < 8; n++) one_word(image[n], 1'b1, d);

    $display("mechanisms: key_change=%0d key_hold=%0d reset=%0d watermarked=%0d scrambled=%0d fixed_plaintext=%0d",
             n_key_change, n_key_hold, n_reset, n_wm, n_scrambled, n_fixed_pt);
    check(n_key_change > 0, "no key change seen");
    check(n_key_hold > 0,   "no key hold seen");
    check(n_reset > 0,      "no reset seen");
    check(n_wm > 0,         "no watermarked word");
    check(n_scrambled > 0,  "ciphertext never differed from plaintext");
    check(n_fixed_pt > 0,   "no fixed-plaintext run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_rlgcd_top
