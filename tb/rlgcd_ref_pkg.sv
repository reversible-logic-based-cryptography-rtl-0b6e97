// rlgcd_ref_pkg: reference models used by the testbenches.
//
// The cipher is modelled here from closed-form equations rather than from
// the gate netlist, so a wiring slip in the RTL shows up as a mismatch.
// For one half (lines a, b, c from the SCL gate), a Toffoli gate on the third
// line followed by a Fredkin gate controlled by the first line collapses to
//   F(a,b,c) = (a, a ? b^c : b, a ? b : c)
// and the fourth SCL line is (a|b|c) ^ d. The two fourth lines sh and sl
// leave the CNOT as sh and sh^sl. The key is XORed onto both halves.
package rlgcd_ref_pkg;

  function automatic logic [2:0] half_f(input logic a, input logic b, input logic c);
    return a ? {1'b1, b ^ c, b} : {1'b0, b, c};
  endfunction

  function automatic logic [7:0] enc_model(input logic [7:0] i, input logic [3:0] k);
    logic sh, sl;
    sh = (i[7] | i[6] | i[5]) ^ i[4];
    sl = (i[3] | i[2] | i[1]) ^ i[0];
    return {half_f(i[7], i[6], i[5]), sh, sh ^ sl, half_f(i[3], i[2], i[1])} ^ {k, k};
  endfunction

  // Inverse of half_f.
  function automatic logic [2:0] half_inv(input logic [2:0] y);
    return y[2] ? {1'b1, y[0], y[1] ^ y[0]} : y;
  endfunction

  function automatic logic [7:0] dec_model(input logic [7:0] e, input logic [3:0] k);
    logic [7:0] x;
    logic [2:0] hi, lo;
    logic sh, sl;
    x  = e ^ {k, k};
    hi = half_inv(x[7:5]);
    lo = half_inv(x[2:0]);
    sh = x[4];
    sl = x[4] ^ x[3];
    return {hi, sh ^ (|hi), lo, sl ^ (|lo)};
  endfunction

  // One step of the 16-bit key LFSR, x^16 + x^14 + x^13 + x^11 + 1.
  function automatic logic [15:0] lfsr16_step(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

endpackage : rlgcd_ref_pkg
