// key_xor: the key-mixing stage of the cipher, one per 4-bit half.
//
// XORs a 4-bit nibble with the 4-bit key, bit j with bit j. In the
// encryption block it is the last stage, in the decryption block the first;
// because XOR with the same key cancels, the two blocks need no other key
// handling. Combinational.
module key_xor
  import rlgcd_pkg::*;
(
  input  nibble_t x,  // data nibble
  input  key_t    k,  // key
  output nibble_t y   // x ^ k
);
  always_comb y = x ^ k;
endmodule : key_xor
