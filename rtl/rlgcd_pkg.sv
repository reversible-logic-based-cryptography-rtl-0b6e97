// rlgcd_pkg: widths and types shared by the reversible-gate cipher.
//
// The cipher works on 8-bit words (eight binary pixels of a watermarked
// image) split into two 4-bit nibbles, and uses a 4-bit key that is XORed
// onto each nibble. These widths are the ones the design is defined for.
package rlgcd_pkg;

  localparam int unsigned DATA_W = 8;  // plaintext / ciphertext word
  localparam int unsigned NIB_W  = 4;  // one half of a word, one SCL gate
  localparam int unsigned KEY_W  = 4;  // key XORed onto each half

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [NIB_W-1:0]  nibble_t;
  typedef logic [KEY_W-1:0]  key_t;

endpackage : rlgcd_pkg
