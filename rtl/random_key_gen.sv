// random_key_gen: source of the 4-bit random keys.
//
// The design only asks for a randomly generated 4-bit key shared by the
// encryptor and the decryptor. This implementation uses a maximal-length
// Fibonacci LFSR (default 16 bits, taps x^16 + x^14 + x^13 + x^11 + 1,
// period 2^16 - 1) and hands out its four low bits as the key, so all
// sixteen key values, 0000 included, occur. The generator choice, its width
// and its seed are this implementation's.
//
// Interface and timing: synchronous, active-low reset loads SEED. While
// `next` is high the register shifts once per rising clock edge, so a new
// key appears on `key` one cycle after `next` is sampled.
module random_key_gen
  import rlgcd_pkg::*;
#(
  parameter int unsigned       LFSR_W = 16,
  parameter logic [LFSR_W-1:0] SEED   = 16'hACE1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic next,
  output key_t key
);
  // Tap positions (1-based, x^n) of a maximal-length polynomial per width.
  function automatic logic [LFSR_W-1:0] tap_mask();
    logic [LFSR_W-1:0] m;
    m = '0;
    unique case (LFSR_W)
      4:  m = LFSR_W'('b1100);                 // x^4 + x^3 + 1
      8:  m = LFSR_W'('b1011_1000);            // x^8 + x^6 + x^5 + x^4 + 1
      16: m = LFSR_W'('b1011_0100_0000_0000);  // x^16 + x^14 + x^13 + x^11 + 1
      32: m = LFSR_W'(32'h8020_0003);          // x^32 + x^22 + x^2 + x + 1
      default: m = '0;
    endcase
    return m;
  endfunction

  localparam logic [LFSR_W-1:0] TAPS = tap_mask();

  logic [LFSR_W-1:0] state;

  initial begin
    assert (TAPS != '0) else $error("random_key_gen: unsupported LFSR_W %0d", LFSR_W);
    assert (SEED != '0) else $error("random_key_gen: SEED must be non-zero");
    assert (LFSR_W >= KEY_W) else $error("random_key_gen: LFSR_W below key width");
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    state <= SEED;
    else if (next) state <= {state[LFSR_W-2:0], ^(state & TAPS)};
  end

  assign key = state[KEY_W-1:0];
endmodule : random_key_gen
