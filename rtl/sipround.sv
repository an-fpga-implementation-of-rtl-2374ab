// sipround -- one SipRound of SipHash, purely combinational.
//
// SipRound is an add-rotate-xor (ARX) network on the four 64-bit state words.
// It runs as two half-rounds. In each half-round the pairs (v0,v1) and
// (v2,v3) are mixed in parallel (modular 64-bit addition, rotation, xor),
// then v0 and v3 and v2 and v1 are mixed crosswise:
//   v0 += v1; v1 <<<= 13; v1 ^= v0; v0 <<<= 32;
//   v2 += v3; v3 <<<= 16; v3 ^= v2;
//   v0 += v3; v3 <<<= 21; v3 ^= v0;
//   v2 += v1; v1 <<<= 17; v1 ^= v2; v2 <<<= 32;
// The rotation amounts and the data flow are those of the SipHash
// specification. The additions are 64-bit additions modulo 2^64, as in that
// specification.
//
// Interface: state_i -> state_o, no clock. Latency zero; the compression loop
// chains C of these in one clock cycle, the finalization pipeline puts one
// per pipeline stage.
module sipround
  import siphash_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  function automatic word_t rotl(word_t x, int unsigned n);
    return (x << n) | (x >> (64 - n));
  endfunction

  // first half-round
  word_t s0, s1, s2, s3;  // after the additions and rotate-xors
  word_t h0;              // v0 after its rotation by 32
  // second half-round
  word_t t0, t1, t2, t3;
  word_t u2;              // v2 after its rotation by 32

  assign s0 = state_i.v0 + state_i.v1;
  assign s1 = rotl(state_i.v1, 13) ^ s0;
  assign h0 = rotl(s0, 32);
  assign s2 = state_i.v2 + state_i.v3;
  assign s3 = rotl(state_i.v3, 16) ^ s2;

  assign t0 = h0 + s3;
  assign t3 = rotl(s3, 21) ^ t0;
  assign t2 = s2 + s1;
  assign t1 = rotl(s1, 17) ^ t2;
  assign u2 = rotl(t2, 32);

  assign state_o = '{v0: t0, v1: t1, v2: u2, v3: t3};

endmodule
