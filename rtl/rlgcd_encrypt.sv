// rlgcd_encrypt: encryption block of the reversible-logic cipher.
//
// One 8-bit word is encrypted in a single combinational pass built only from
// reversible gates plus the key XOR:
//
//   i[7:4] -> SCL -> (first three lines) Toffoli -> Fredkin -> upper XOR
//   i[3:0] -> SCL -> (first three lines) Toffoli -> Fredkin -> lower XOR
//   fourth SCL line of each half -> one CNOT that mixes the halves
//   CNOT output A     -> fourth (least significant) line of the upper XOR
//   CNOT output A ^ B -> first  (most significant) line of the lower XOR
//   both XOR stages use the same 4-bit key k
//
//   e[7:5] = upper Fredkin ^ k[3:1]    e[4]   = CNOT A     ^ k[0]
//   e[3]   = CNOT A^B      ^ k[3]      e[2:0] = lower Fredkin ^ k[2:0]
//
// The gate chain, the CNOT between the halves and the shared 4-bit key are
// the design's. The bit order inside each nibble, which CNOT line is the
// control, and the gate equations (see the gate modules) are this
// implementation's reading. Every stage is a bijection for a fixed key, so
// rlgcd_decrypt, which applies the same gates in reverse order, recovers i.
//
// Interface: i (plaintext), k (key) in; e (ciphertext) out. No clock: the
// result is valid one combinational delay after i and k settle.
module rlgcd_encrypt
  import rlgcd_pkg::*;
(
  input  word_t i,
  input  key_t  k,
  output word_t e
);
  // upper half (MSBs)
  logic su_p, su_q, su_r, su_s;
  logic tu_p, tu_q, tu_r;
  logic fu_p, fu_q, fu_r;
  // lower half (LSBs)
  logic sl_p, sl_q, sl_r, sl_s;
  logic tl_p, tl_q, tl_r;
  logic fl_p, fl_q, fl_r;
  // halves mixed by the CNOT
  logic c_p, c_q;

  scl_gate     u_scl_hi (.a(i[7]), .b(i[6]), .c(i[5]), .d(i[4]),
                         .p(su_p), .q(su_q), .r(su_r), .s(su_s));
  toffoli_gate u_tof_hi (.a(su_p), .b(su_q), .c(su_r), .p(tu_p), .q(tu_q), .r(tu_r));
  fredkin_gate u_fre_hi (.a(tu_p), .b(tu_q), .c(tu_r), .p(fu_p), .q(fu_q), .r(fu_r));

  scl_gate     u_scl_lo (.a(i[3]), .b(i[2]), .c(i[1]), .d(i[0]),
                         .p(sl_p), .q(sl_q), .r(sl_r), .s(sl_s));
  toffoli_gate u_tof_lo (.a(sl_p), .b(sl_q), .c(sl_r), .p(tl_p), .q(tl_q), .r(tl_r));
  fredkin_gate u_fre_lo (.a(tl_p), .b(tl_q), .c(tl_r), .p(fl_p), .q(fl_q), .r(fl_r));

  cnot_gate    u_cnot   (.a(su_s), .b(sl_s), .p(c_p), .q(c_q));

  key_xor      u_xor_hi (.x({fu_p, fu_q, fu_r, c_p}), .k(k), .y(e[7:4]));
  key_xor      u_xor_lo (.x({c_q, fl_p, fl_q, fl_r}), .k(k), .y(e[3:0]));
endmodule : rlgcd_encrypt
