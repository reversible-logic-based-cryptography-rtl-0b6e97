// rlgcd_decrypt: decryption block of the reversible-logic cipher.
//
// Undoes rlgcd_encrypt by running the same self-inverse gates in reverse
// order, in one combinational pass:
//
//   e[7:4] -> upper XOR with k -> lines 1..3 -> Fredkin -> Toffoli -> SCL A,B,C
//   e[3:0] -> lower XOR with k -> lines 2..4 -> Fredkin -> Toffoli -> SCL A,B,C
//   upper XOR line 4 (A) and lower XOR line 1 (B) -> CNOT (Feynman) gate
//   Feynman output A -> D of the upper SCL, output A ^ B -> D of the lower SCL
//   SCL outputs P,Q,R,S -> d[7:4] and d[3:0]
//
// The stage order and the Feynman gate between the halves are the design's;
// the line order mirrors the encryption block so that d equals the
// plaintext whenever k is the key used to encrypt.
//
// Interface: e (ciphertext), k (key) in; d (plaintext) out. No clock.
module rlgcd_decrypt
  import rlgcd_pkg::*;
(
  input  word_t e,
  input  key_t  k,
  output word_t d
);
  nibble_t xh, xl;                 // ciphertext halves with the key removed
  logic fu_p, fu_q, fu_r;          // upper Fredkin outputs
  logic tu_p, tu_q, tu_r;          // upper Toffoli outputs
  logic fl_p, fl_q, fl_r;          // lower Fredkin outputs
  logic tl_p, tl_q, tl_r;          // lower Toffoli outputs
  logic c_p, c_q;                  // Feynman gate outputs

  key_xor      u_xor_hi (.x(e[7:4]), .k(k), .y(xh));
  key_xor      u_xor_lo (.x(e[3:0]), .k(k), .y(xl));

  fredkin_gate u_fre_hi (.a(xh[3]), .b(xh[2]), .c(xh[1]), .p(fu_p), .q(fu_q), .r(fu_r));
  toffoli_gate u_tof_hi (.a(fu_p), .b(fu_q), .c(fu_r), .p(tu_p), .q(tu_q), .r(tu_r));

  fredkin_gate u_fre_lo (.a(xl[2]), .b(xl[1]), .c(xl[0]), .p(fl_p), .q(fl_q), .r(fl_r));
  toffoli_gate u_tof_lo (.a(fl_p), .b(fl_q), .c(fl_r), .p(tl_p), .q(tl_q), .r(tl_r));

  cnot_gate    u_feyn   (.a(xh[0]), .b(xl[3]), .p(c_p), .q(c_q));

  scl_gate     u_scl_hi (.a(tu_p), .b(tu_q), .c(tu_r), .d(c_p),
                         .p(d[7]), .q(d[6]), .r(d[5]), .s(d[4]));
  scl_gate     u_scl_lo (.a(tl_p), .b(tl_q), .c(tl_r), .d(c_q),
                         .p(d[3]), .q(d[2]), .r(d[1]), .s(d[0]));
endmodule : rlgcd_decrypt
