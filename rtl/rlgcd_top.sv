// rlgcd_top: reversible-logic cipher with random keys, encryption and
// decryption side by side.
//
// A word of eight binary pixels (plain_i) is encrypted with the current
// random 4-bit key, and the ciphertext is fed straight into the decryption
// block with the same key, so plain_o reproduces plain_i. This is the
// arrangement used to verify the cipher end to end: the key generator stands
// for the shared secret of a sender and a receiver.
//
//   random_key_gen --key--+--> rlgcd_encrypt --cipher_o--> rlgcd_decrypt --> plain_o
//   plain_i --------------+-----------^                        ^
//                         +------------------------------------+
//
// Timing: the cipher datapath is combinational and takes one word per
// cycle. The key is registered; pulsing key_next for a cycle steps the key
// generator so a fresh key applies from the next rising edge on. rst_n is
// synchronous and active low. Chaining both blocks in one top and the
// key_next handshake are this implementation's choices.
module rlgcd_top
  import rlgcd_pkg::*;
#(
  parameter int unsigned       LFSR_W = 16,
  parameter logic [LFSR_W-1:0] SEED   = 16'hACE1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  key_next,
  input  word_t plain_i,
  output key_t  key_o,
  output word_t cipher_o,
  output word_t plain_o
);
  key_t key;

  random_key_gen #(.LFSR_W(LFSR_W), .SEED(SEED)) u_keygen (
    .clk  (clk),
    .rst_n(rst_n),
    .next (key_next),
    .key  (key)
  );

  rlgcd_encrypt u_enc (.i(plain_i),  .k(key), .e(cipher_o));
  rlgcd_decrypt u_dec (.e(cipher_o), .k(key), .d(plain_o));

  assign key_o = key;
endmodule : rlgcd_top
